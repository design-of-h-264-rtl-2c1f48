// exp_golomb: Exp-Golomb coder for ue(v), se(v), me(v) and te(v) syntax elements.
//
// A codeword is M zeros, a one and an M-bit INFO field, where
// M = floor(log2(code_num + 1)) and INFO = code_num + 1 - 2^M; written as a
// number it is simply code_num + 1 in 2M + 1 bits.  The k -> code_num mapping:
//   ue: code_num = k;  se: code_num = 2|k| - 1 for k > 0, 2|k| for k <= 0
//   (k read as 6-bit two's complement);  me: coded_block_pattern -> code_num
//   through the intra or inter ROM (48 x 6 bits each, one-cycle address and
//   one-cycle read);  te: a single inverted bit when the element's range is
//   0..1 (exp_golomb_te_max1), otherwise as ue.
// State machine: IDLE (on exp_golomb_start latch the inputs and form
// code_num) -> [ROM_ADDR -> ROM_READ for me(v)] -> CALC_M -> CALC_INFO ->
// CONSTRUCT -> IDLE.  exp_golomb_valid is high for one cycle with the code
// (right-aligned in 13 bits) and its length: 4 cycles after the start for
// ue/se/te, 6 for me, 2 for a one-bit te.  Start is ignored while busy.
// exp_golomb_te_max1 is an input of this design; the start/valid timing of
// the one-bit te case is its own choice.
module exp_golomb
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  logic        exp_golomb_start,
  input  logic [5:0]  exp_golomb_k_param,
  input  eg_map_e     exp_golomb_mode,
  input  logic        exp_golomb_mode_p,     // me(v): 0 intra, 1 inter
  input  logic        exp_golomb_te_max1,    // te(v): range of k is 0..1
  output logic        exp_golomb_busy,
  output logic        exp_golomb_valid,
  output logic [3:0]  exp_golomb_length,
  output logic [12:0] exp_golomb_output
);

  typedef enum logic [2:0] {IDLE, ROM_ADDR, ROM_READ, CALC_M, CALC_INFO, CONSTRUCT} state_e;
  state_e      state;
  logic [6:0]  code_num;
  logic [2:0]  m;
  logic [6:0]  info;
  logic [5:0]  rom_addr;
  logic        rom_inter;
  logic        one_bit;

  // ROMs: cbp -> code_num, built from the codeNum -> cbp table of h264_pkg
  logic [5:0] rom_intra [64];
  logic [5:0] rom_inter_t [64];
  always_comb
    for (int a = 0; a < 64; a++) begin
      rom_intra[a]   = cbp_to_codenum(1'b0, 6'(a));
      rom_inter_t[a] = cbp_to_codenum(1'b1, 6'(a));
    end

  logic signed [5:0] ks;
  assign ks = exp_golomb_k_param;

  assign exp_golomb_busy = (state != IDLE);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state <= IDLE;
      code_num <= '0; m <= '0; info <= '0; rom_addr <= '0; rom_inter <= 1'b0; one_bit <= 1'b0;
      exp_golomb_valid <= 1'b0;
      exp_golomb_length <= '0;
      exp_golomb_output <= '0;
    end else begin
      exp_golomb_valid <= 1'b0;
      case (state)
        IDLE: if (exp_golomb_start) begin
          one_bit <= 1'b0;
          case (exp_golomb_mode)
            EG_UE: begin code_num <= 7'(exp_golomb_k_param); state <= CALC_M; end
            EG_SE: begin
              code_num <= (ks > 0) ? 7'(2*int'(ks) - 1) : 7'(-2*int'(ks));
              state <= CALC_M;
            end
            EG_ME: begin
              rom_addr  <= exp_golomb_k_param;
              rom_inter <= exp_golomb_mode_p;
              state <= ROM_ADDR;
            end
            default: begin   // te(v)
              if (exp_golomb_te_max1) begin
                one_bit  <= 1'b1;
                code_num <= {6'd0, ~exp_golomb_k_param[0]};
                state <= CONSTRUCT;
              end else begin
                code_num <= 7'(exp_golomb_k_param);
                state <= CALC_M;
              end
            end
          endcase
        end
        ROM_ADDR: state <= ROM_READ;
        ROM_READ: begin
          code_num <= 7'(rom_inter ? rom_inter_t[rom_addr] : rom_intra[rom_addr]);
          state <= CALC_M;
        end
        CALC_M: begin
          m <= '0;
          for (int b = 1; b < 7; b++)
            if ((8'(code_num) + 8'd1) >= (8'd1 << b)) m <= 3'(b);
          state <= CALC_INFO;
        end
        CALC_INFO: begin
          info  <= 7'(8'(code_num) + 8'd1 - (8'd1 << m));
          state <= CONSTRUCT;
        end
        CONSTRUCT: begin
          if (one_bit) begin
            exp_golomb_output <= 13'(code_num[0]);
            exp_golomb_length <= 4'd1;
          end else begin
            exp_golomb_output <= 13'((13'd1 << m) | 13'(info));
            exp_golomb_length <= 4'(2*int'(m) + 1);
          end
          exp_golomb_valid <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
