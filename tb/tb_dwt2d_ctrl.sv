// tb_dwt2d_ctrl: two frames of N = 8 (4 row pairs) with a randomly idle
// source. Checks, cycle by cycle: the row-start marker and row-pair count of
// every accepted column; in_ready low for exactly two cycles after each row
// pair; row_flush1/row_flush2 exactly 2 and Lr + 4 cycles after each last
// column (Lr, Lc: row and column lifting step latencies); after the last row
// pair, in_ready low until frame_done, col_flush1 over slots 0..N-1 starting
// 2Lr + 6 cycles after the last column, col_flush2 over slots 0..N-1 starting
// Lc cycles after pass 1 ends, and frame_done (with in_ready high again) Lc
// cycles after pass 2 ends.
module tb_dwt2d_ctrl;
  import dwt_pkg::*;
  localparam int N = 8, R = N / 2;
  localparam int F2 = ROW_STEP_LAT + 4;
  localparam int CF1 = 2 * ROW_STEP_LAT + 6, CF2 = CF1 + N + COL_STEP_LAT;
  localparam int DONE = CF2 + N + COL_STEP_LAT;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, accept, pix_sor, row_flush1, row_flush2, col_flush1, col_flush2, frame_done;
  logic [1:0] row_pair;
  logic [2:0] flush_slot;

  dwt2d_ctrl #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int col = 0, rp = 0, frames = 0;
  int last_c = -100;      // cycle of the last column of the latest row pair
  bit last_frame_row = 0; // that row pair was the last of its frame

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      int d;
      d = cyc - last_c;
      chk(accept == (in_valid && in_ready), "accept");
      chk(row_flush1 == (d == 2), "row_flush1 timing");
      chk(row_flush2 == (d == F2), "row_flush2 timing");
      if (last_frame_row) begin
        chk(col_flush1 == (d >= CF1 && d < CF1 + N), "col_flush1 window");
        chk(col_flush2 == (d >= CF2 && d < CF2 + N), "col_flush2 window");
        if (col_flush1) chk(int'(flush_slot) == d - CF1, "col_flush1 slot");
        if (col_flush2) chk(int'(flush_slot) == d - CF2, "col_flush2 slot");
        chk(frame_done == (d == DONE), "frame_done timing");
        if (d >= 1) chk(in_ready == (d >= DONE), "in_ready during frame end");
      end else begin
        chk(!col_flush1 && !col_flush2 && !frame_done, "no column flush inside a frame");
        if (d == 1 || d == 2) chk(!in_ready, "in_ready low after a row pair");
        if (d >= 3) chk(in_ready, "in_ready high inside a row pair");
      end
      if (frame_done) frames++;
      if (accept) begin
        chk(pix_sor == (col == 0), "pix_sor");
        chk(int'(row_pair) == rp, "row_pair");
        if (col == N - 1) begin
          col = 0;
          last_c = cyc;
          last_frame_row = (rp == R - 1);
          rp = (rp + 1) % R;
        end else col++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (frames < 2) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
