// tb_dwt_col_filter: N = 8 column slots, H = 12 rows (6 row pairs) of random
// vertical pairs delivered one per cycle in slot order (with idle cycles),
// then the two flush passes, COL_STEP_LAT cycles apart. Each slot's sequence of (low, high) outputs is
// compared with the reference 1-D 9/7 lifting of that column (recombined
// rounding); the row index of every output and the output count are
// checked. A second frame follows to check that the buffer restarts cleanly.
module tb_dwt_col_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N = 8, R = 6, H = 2 * R;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, flush1 = 0, flush2 = 0;
  logic [2:0] in_slot = '0, flush_slot = '0;
  logic [7:0] in_row = '0;
  sample_t in_top = '0, in_bot = '0;
  logic out_valid, out_last;
  logic [2:0] out_slot;
  logic [7:0] out_row;
  sample_t out_low, out_high;

  dwt_col_filter #(.N(N), .H(H), .RTAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  longint col [N][H];
  longint lo [N][R], hi [N][R];
  int nout [N];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int s, m;
    s = int'(out_slot); m = nout[s];
    checks++;
    if (int'(out_row) != m || longint'(out_low) != lo[s][m] || longint'(out_high) != hi[s][m] || out_last !== (m == R-1)) begin
      failures++;
      $display("slot %0d out %0d: row %0d low %0d high %0d, expected %0d %0d", s, m, out_row, out_low, out_high, lo[s][m], hi[s][m]);
    end
    nout[s]++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int s = 0; s < N; s++) begin
        longint x[], l[], h[];
        x = new[H];
        for (int i = 0; i < H; i++) begin col[s][i] = longint'($urandom_range(2000)) - 1000; x[i] = col[s][i]; end
        dwt1d_rc(x, l, h);
        for (int m = 0; m < R; m++) begin lo[s][m] = l[m]; hi[s][m] = h[m]; end
        nout[s] = 0;
      end
      for (int r = 0; r < R; r++)
        for (int s = 0; s < N; s++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_slot = 3'(s); in_row = 8'(r);
          in_top = sample_t'(col[s][2*r]); in_bot = sample_t'(col[s][2*r+1]);
        end
      @(negedge clk); in_valid = 0;
      for (int s = 0; s < N; s++) begin
        @(negedge clk); flush1 = 1; flush_slot = 3'(s);
      end
      @(negedge clk); flush1 = 0;
      repeat (COL_STEP_LAT - 1) @(negedge clk);
      for (int s = 0; s < N; s++) begin
        @(negedge clk); flush2 = 1; flush_slot = 3'(s);
      end
      @(negedge clk); flush2 = 0;
      repeat (COL_STEP_LAT + 2) @(negedge clk);
      for (int s = 0; s < N; s++) begin
        checks++;
        if (nout[s] != R) begin failures++; $display("frame %0d slot %0d: %0d outputs", f, s, nout[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
