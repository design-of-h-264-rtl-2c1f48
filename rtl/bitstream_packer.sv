// bitstream_packer: joins variable-length codes into 32-bit output words.
//
// Each cycle with in_valid appends the in_len (1..32) low bits of in_code,
// most significant first, to a bit buffer; every time 32 bits are available
// they leave as one word on bitstream (first bit in bit 31) with
// bitstream_valid.  flush pads the pending bits with zeros up to a word
// boundary and emits that word.  One code per cycle is accepted without
// stalls: the buffer never holds more than 31 bits between cycles.
module bitstream_packer (
  input  logic        clk,
  input  logic        rstn,
  input  logic        in_valid,
  input  logic [31:0] in_code,
  input  logic [5:0]  in_len,
  input  logic        flush,
  output logic        bitstream_valid,
  output logic [31:0] bitstream,
  output logic [31:0] words_out,
  output logic        pending
);
  logic [62:0] buffer;   // right-aligned pending bits
  logic [5:0]  fill;     // 0..31
  assign pending = (fill != 6'd0);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      buffer <= '0; fill <= '0; bitstream_valid <= 1'b0; bitstream <= '0; words_out <= '0;
    end else begin
      logic [62:0] b;
      logic [6:0]  n;
      logic [31:0] mask;
      bitstream_valid <= 1'b0;
      b = buffer;
      n = 7'(fill);
      if (in_valid && in_len != 6'd0) begin
        mask = (in_len >= 6'd32) ? 32'hFFFF_FFFF : ((32'd1 << in_len) - 32'd1);
        b = (b << in_len) | 63'(in_code & mask);
        n = n + 7'(in_len);
      end
      if (n >= 7'd32) begin
        bitstream       <= 32'(b >> (n - 7'd32));
        bitstream_valid <= 1'b1;
        words_out       <= words_out + 32'd1;
        n = n - 7'd32;
        b = b & ((63'd1 << n) - 63'd1);
      end else if (flush && n != 7'd0) begin
        bitstream       <= 32'(b << (7'd32 - n));
        bitstream_valid <= 1'b1;
        words_out       <= words_out + 32'd1;
        n = 7'd0;
        b = '0;
      end
      buffer <= b;
      fill   <= 6'(n);
    end
  end
endmodule
