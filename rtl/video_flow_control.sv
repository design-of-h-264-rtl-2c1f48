// video_flow_control: captures the incoming video into two line RAMs of 16
// lines each and hands out whole macroblock rows.
//
// Input stream: while pixel_valid is high inside active_line / active_frame
// the components arrive as Y Y Cb Y Y Cr ... (4:2:0 encoder input).  The luma
// samples are kept; the chroma samples are counted and dropped (chroma is not
// coded by this design).  Four luma samples form one 32-bit RAM word.  Each
// line RAM holds 16 lines of up to MAX_WIDTH samples; while one RAM is being
// read by the encoder the next 16 lines fill the other one.  The width is
// measured from the first line of each frame (must be a multiple of 16).
//
// When the 16th line of a RAM is complete, row_ready pulses with row_bank
// (which RAM) and row_index (macroblock row number).  row_done from the
// reader releases the RAM; a row completing while the other RAM is still
// unreleased sets the sticky overrun flag (the reader was too slow).
// row_done with done_bank releases that RAM.  frame_end pulses when
// active_frame falls.
// Read port: rd_en with rd_bank / rd_line (0..15) / rd_word (x/4); rd_data
// (4 samples, leftmost in bits 7:0) is valid one cycle later.
module video_flow_control #(
  parameter int MAX_WIDTH = 1920
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic        active_frame,
  input  logic        active_line,
  input  logic        pixel_valid,
  input  logic [7:0]  pixel_data,
  output logic        row_ready,
  output logic        row_bank,
  output logic [7:0]  row_index,
  input  logic        row_done,
  input  logic        done_bank,
  output logic [7:0]  mbs_per_row,
  output logic        frame_start,
  output logic        frame_end,
  output logic        overrun,
  input  logic        rd_en,
  input  logic        rd_bank,
  input  logic [3:0]  rd_line,
  input  logic [$clog2(MAX_WIDTH/4)-1:0] rd_word,
  output logic [31:0] rd_data
);
  localparam int WORDS = MAX_WIDTH / 4;
  localparam int WAW   = $clog2(WORDS);

  // addressed as {bank, line, word}: each line owns 2^WAW word slots
  logic [31:0] ram [2*16*(1 << WAW)];

  logic        frame_q, line_q;
  logic [1:0]  comp;          // position in the Y Y C pattern
  logic [11:0] x;             // luma samples in this line
  logic        width_known;
  logic [11:0] line;          // luma line in the frame
  logic [23:0] word_acc;
  logic [1:0]  busy_bank;     // bank holds a row not yet released

  wire  is_luma = pixel_valid && active_line && active_frame && (comp != 2'd2);
  wire  [3:0]  lrow = line[3:0];
  wire         bank = line[4];

  always_ff @(posedge clk) begin
    if (is_luma && x[1:0] == 2'd3)
      ram[{bank, lrow, WAW'(x[11:2])}] <= {pixel_data, word_acc};
    if (rd_en)
      rd_data <= ram[{rd_bank, rd_line, rd_word}];
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      frame_q <= 1'b0; line_q <= 1'b0; comp <= '0; x <= '0; width_known <= 1'b0;
      line <= '0; word_acc <= '0; busy_bank <= '0;
      row_ready <= 1'b0; row_bank <= 1'b0; row_index <= '0; mbs_per_row <= '0;
      frame_start <= 1'b0; frame_end <= 1'b0; overrun <= 1'b0;
    end else begin
      frame_q <= active_frame;
      line_q  <= active_line && active_frame;
      row_ready   <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      if (row_done) busy_bank[done_bank] <= 1'b0;
      if (active_frame && !frame_q) begin
        line <= '0; width_known <= 1'b0;
        frame_start <= 1'b1;
      end
      if (!active_frame && frame_q) frame_end <= 1'b1;
      if (pixel_valid && active_line && active_frame) begin
        comp <= (comp == 2'd2) ? 2'd0 : comp + 2'd1;
        if (is_luma) begin
          x <= x + 12'd1;
          word_acc <= {pixel_data, word_acc[23:8]};
        end
      end
      // end of a line
      if (line_q && !(active_line && active_frame)) begin
        x <= '0;
        comp <= '0;
        if (!width_known) begin
          width_known <= 1'b1;
          mbs_per_row <= 8'(x >> 4);
        end
        line <= line + 12'd1;
        // this line went into a RAM the encoder had not released yet
        if (busy_bank[bank] && !(row_done && done_bank == bank)) overrun <= 1'b1;
        if (lrow == 4'd15) begin
          row_ready <= 1'b1;
          row_bank  <= bank;
          row_index <= 8'(line >> 4);
          busy_bank[bank] <= 1'b1;
        end
      end
    end
  end
endmodule
