// tb_dwt_row_filter: sends 12 rows of N = 16 random pixels, with random idle
// cycles between pixels and rows, closing each row with flush1 two cycles
// and flush2 L + 4 cycles after its last pixel, L = ROW_STEP_LAT. Every
// L(k), H(k) is compared with the reference 1-D 9/7 lifting; the pair index,
// row tag and first/last flags are checked, and each output must come 2L
// cycles after the odd pixel of pair k+2 (pairs R-2 and R-1: 2L + 2 and
// 2L + 4 cycles after the last pixel).
module tb_dwt_row_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int N = 16, R = N / 2, ROWS = 12, L = ROW_STEP_LAT;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid = 0, pix_sor = 0, flush1, flush2;
  sample_t pix = '0;
  logic [7:0] row_tag = '0;
  logic out_valid, out_first, out_last;
  logic [7:0] out_row_tag;
  logic [2:0] out_k;
  sample_t out_l, out_h;

  dwt_row_filter #(.N(N), .RTAG_W(8)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  longint img [ROWS][N];
  longint lo [ROWS][R], hi [ROWS][R];
  int pair_cyc [ROWS][R];
  int last_cyc [ROWS];
  int f1_q [$], f2_q [$];

  always @(posedge clk) cyc <= cyc + 1;
  assign flush1 = (f1_q.size() > 0) && (f1_q[0] == cyc);
  assign flush2 = (f2_q.size() > 0) && (f2_q[0] == cyc);
  always @(posedge clk) begin
    if (flush1) void'(f1_q.pop_front());
    if (flush2) void'(f2_q.pop_front());
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int r, k, exp_cyc;
    r = int'(out_row_tag); k = int'(out_k);
    nout++;
    checks++;
    if (longint'(out_l) != lo[r][k] || longint'(out_h) != hi[r][k] || out_first !== (k == 0) || out_last !== (k == R-1)) begin
      failures++;
      $display("row %0d k %0d: got L=%0d H=%0d first=%0d last=%0d, expected %0d %0d", r, k, out_l, out_h,
               out_first, out_last, lo[r][k], hi[r][k]);
    end
    exp_cyc = (k < R-2) ? pair_cyc[r][k+2] + 2 * L : last_cyc[r] + ((k == R-2) ? 2 * L + 2 : 2 * L + 4);
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("row %0d k %0d at cycle %0d, expected %0d", r, k, cyc, exp_cyc);
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      longint x[], l[], h[];
      x = new[N];
      for (int j = 0; j < N; j++) begin img[r][j] = longint'($urandom_range(255)); x[j] = img[r][j]; end
      dwt1d(x, l, h);
      for (int k = 0; k < R; k++) begin lo[r][k] = l[k]; hi[r][k] = h[k]; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_sor = (j == 0); pix = sample_t'(img[r][j]); row_tag = 8'(r);
        if (j % 2 == 1) pair_cyc[r][j/2] = cyc;
      end
      last_cyc[r] = cyc;
      f1_q.push_back(cyc + 2);
      f2_q.push_back(cyc + L + 4);
      @(negedge clk); pix_valid = 0;
      @(negedge clk);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (2 * L + 8) @(negedge clk);
    checks++;
    if (nout != ROWS * R) begin failures++; $display("%0d outputs, expected %0d", nout, ROWS * R); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
