// tb_video_flow_control: self-checking test of the input line buffer.
//
// What it checks:
// - Frame 1 is a random 32x48 frame in Y Y C order, with 8 blank cycles
//   between lines.
//   - Each of the three 16-line rows must be announced by row_ready, with
//     row_index = row and row_bank = row[0].
//   - A reader process then reads back all 16 lines of that row. Every word
//     must hold the four luma samples sent, leftmost in bits 7:0. Read data
//     is taken one cycle after rd_en.
//   - The reader then releases the bank with row_done.
//   - Also checked: mbs_per_row = 2, one frame_start and one frame_end
//     pulse, and overrun stays low.
// - Frame 2 is the same frame again, but the reader releases nothing. The
//   third row then lands in a bank that is still busy, so overrun must rise.
//
// Parameters: MAX_WIDTH is 64 here to keep the RAM small.
// Timing: the watchdog ends the run after 200000 cycles.
module tb_video_flow_control;
  localparam int MAXW = 64;
  localparam int W = 32, H = 48;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic active_frame = 1'b0, active_line = 1'b0, pixel_valid = 1'b0;
  logic [7:0] pixel_data = '0;
  logic row_ready, row_bank, row_done = 1'b0, done_bank = 1'b0;
  logic [7:0] row_index, mbs_per_row;
  logic frame_start, frame_end, overrun;
  logic rd_en = 1'b0, rd_bank = 1'b0;
  logic [3:0] rd_line = '0;
  logic [$clog2(MAXW/4)-1:0] rd_word = '0;
  logic [31:0] rd_data;

  video_flow_control #(.MAX_WIDTH(MAXW)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] img [H][W];
  int rows_seen = 0, fs_count = 0, fe_count = 0;
  bit release_rows = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send_frame();
    @(posedge clk); active_frame <= 1'b1;
    repeat (4) @(posedge clk);
    for (int y = 0; y < H; y++) begin
      int c = 0;
      active_line <= 1'b1;
      // 2 luma + 1 chroma per 3 components; W luma samples -> 3W/2 components
      for (int k = 0; k < 3 * W / 2; k++) begin
        @(posedge clk);
        pixel_valid <= 1'b1;
        if (k % 3 == 2) pixel_data <= 8'($urandom);   // chroma, dropped
        else begin pixel_data <= img[y][c]; c++; end
      end
      @(posedge clk); pixel_valid <= 1'b0; active_line <= 1'b0;
      repeat (8) @(posedge clk);
    end
    active_frame <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  // reader: on row_ready read back the whole row and release its bank
  initial begin
    forever begin
      logic bank;
      int r;
      @(posedge clk);
      if (row_ready) begin
        bank = row_bank; r = int'(row_index);
        check(r == rows_seen % 3, $sformatf("row_index %0d", r));
        check(bank == r[0], $sformatf("row_bank %0d for row %0d", bank, r));
        rows_seen++;
        if (release_rows) begin
          for (int l = 0; l < 16; l++)
            for (int w = 0; w < W / 4; w++) begin
              rd_en <= 1'b1; rd_bank <= bank; rd_line <= 4'(l); rd_word <= w[$bits(rd_word)-1:0];
              @(posedge clk); rd_en <= 1'b0;
              @(posedge clk); #1;
              check(rd_data == {img[r*16+l][4*w+3], img[r*16+l][4*w+2],
                                img[r*16+l][4*w+1], img[r*16+l][4*w]},
                    $sformatf("row %0d line %0d word %0d: %h", r, l, w, rd_data));
            end
          row_done <= 1'b1; done_bank <= bank;
          @(posedge clk); row_done <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (frame_start) fs_count++;
    if (frame_end) fe_count++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    send_frame();
    repeat (400) @(posedge clk);
    check(rows_seen == 3, $sformatf("rows announced %0d", rows_seen));
    check(mbs_per_row == 8'(W / 16), $sformatf("mbs_per_row %0d", mbs_per_row));
    check(fs_count == 1 && fe_count == 1, "frame_start / frame_end pulses");
    check(!overrun, "overrun raised with a reader that keeps up");
    // second frame: nothing is released, so the third row overruns
    release_rows = 1'b0;
    send_frame();
    repeat (10) @(posedge clk);
    check(rows_seen == 6, $sformatf("rows announced %0d", rows_seen));
    check(overrun, "overrun not raised with a stalled reader");
    check(fs_count == 2 && fe_count == 2, "frame pulses in frame 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
