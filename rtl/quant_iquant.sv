// quant_iquant: forward quantisation and rescaling (inverse quantisation) of a
// 4x4 block of core-transform coefficients, sharing sixteen multipliers.
//
//   |Z| = (|W| * MF + f) >> qbits, qbits = 15 + QP/6, f = 682 << (4 + QP/6)
//   (f is about 2^qbits / 3, the intra rounding offset), sign(Z) = sign(W),
//   |Z| limited to 2063 so that CAVLC can code it;
//   W' = Z * V << (QP/6).
// MF and V depend on QP%6 and on the coefficient position (h264_pkg).
//
// State machine, one state per cycle:
//   IDLE           on integer_transform_valid: store signs, load |W| and MF
//                  into the multipliers;
//   WAIT1          multiply;
//   ADD_OFFSET     add f;
//   INV_QUANT_MULT shift by qbits, limit, output the levels (quant_valid), and
//                  load |Z| and V into the same multipliers;
//   IQ_WAIT        multiply;
//   IQ_SCALE       shift left by QP/6;
//   IQ_SIGN        restore the sign, output inverse_quant_valid.
// quant_valid is high 4 cycles after the input, inverse_quant_valid 7 cycles
// after it.  A new block is accepted only in IDLE (busy is low).
module quant_iquant
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       integer_transform_valid,
  input  coef_t      integer_transform [16],
  input  logic [5:0] qp,
  output logic       busy,
  output logic       quant_valid,
  output qcoef_t     quant [16],
  output logic       inverse_quant_valid,
  output dq_t        inverse_quant [16]
);

  typedef enum logic [2:0] {
    IDLE, WAIT1, ADD_OFFSET, INV_QUANT_MULT, IQ_WAIT, IQ_SCALE, IQ_SIGN
  } state_e;
  state_e state;

  logic [17:0] mul_a [16];
  logic [17:0] mul_b [16];
  logic [35:0] prod  [16];
  logic [35:0] acc   [16];
  logic [15:0] sign_q;
  logic [3:0]  qdiv;
  logic [2:0]  qrem;
  logic [21:0] f;
  logic [4:0]  qbits;

  // QP / 6 and QP % 6 by comparison (QP <= 51)
  logic [3:0] div6;
  logic [2:0] rem6;
  always_comb begin
    div6 = 4'd0;
    for (int k = 1; k <= 8; k++)
      if (qp >= 6'(6*k)) div6 = 4'(k);
    rem6 = 3'(qp - 6'(6*int'(div6)));
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state <= IDLE;
      quant_valid <= 1'b0;
      inverse_quant_valid <= 1'b0;
      sign_q <= '0;
      qdiv <= '0; qrem <= '0; f <= '0; qbits <= '0;
      for (int i = 0; i < 16; i++) begin
        mul_a[i] <= '0; mul_b[i] <= '0; prod[i] <= '0; acc[i] <= '0;
        quant[i] <= '0; inverse_quant[i] <= '0;
      end
    end else begin
      quant_valid <= 1'b0;
      inverse_quant_valid <= 1'b0;
      for (int i = 0; i < 16; i++) prod[i] <= mul_a[i] * mul_b[i];
      case (state)
        IDLE: if (integer_transform_valid) begin
          qdiv  <= div6;
          qrem  <= rem6;
          f     <= 22'd682 << (4 + div6);
          qbits <= 5'd15 + 5'(div6);
          for (int i = 0; i < 16; i++) begin
            logic signed [17:0] w;
            w = 18'(integer_transform[i]);
            sign_q[i] <= w[17];
            mul_a[i]  <= w[17] ? -w : w;
            mul_b[i]  <= 18'(mf(rem6, pos_class(4'(i))));
          end
          state <= WAIT1;
        end
        WAIT1: state <= ADD_OFFSET;
        ADD_OFFSET: begin
          for (int i = 0; i < 16; i++) acc[i] <= prod[i] + 36'(f);
          state <= INV_QUANT_MULT;
        end
        INV_QUANT_MULT: begin
          for (int i = 0; i < 16; i++) begin
            logic [35:0] z;
            z = acc[i] >> qbits;
            if (z > 36'(QLIMIT)) z = 36'(QLIMIT);
            quant[i] <= sign_q[i] ? -qcoef_t'(z) : qcoef_t'(z);
            mul_a[i] <= 18'(z);
            mul_b[i] <= 18'(vscale(qrem, pos_class(4'(i))));
          end
          quant_valid <= 1'b1;
          state <= IQ_WAIT;
        end
        IQ_WAIT: state <= IQ_SCALE;
        IQ_SCALE: begin
          for (int i = 0; i < 16; i++) acc[i] <= prod[i] << qdiv;
          state <= IQ_SIGN;
        end
        IQ_SIGN: begin
          for (int i = 0; i < 16; i++)
            inverse_quant[i] <= sign_q[i] ? -dq_t'(acc[i]) : dq_t'(acc[i]);
          inverse_quant_valid <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
