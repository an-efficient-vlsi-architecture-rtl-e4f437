// tb_dwt2d_top_small: the end-to-end test of tb_dwt2d_top on an 8 x 8 frame,
// the smallest size, where the edges of the transform overlap most.
//
// Sends two N x N frames of random 8-bit pixels back to back. Frame 0 is sent
// with random idle cycles on in_valid, frame 1 at full rate. Every output
// coefficient (LL, LH, HL, HH) is compared with the integer reference model
// of dwt_ref_pkg (rows first with pre-add rounding, then columns with the
// recombined step's rounding) and, with a tolerance, with the floating-point
// 9/7 transform. It also checks that every coefficient comes
// exactly once, that a full-rate row pair is accepted in N consecutive
// cycles, and the frame length in cycles. It counts, and requires, each
// mechanism of the design: input stalls, back-pressure during row closing,
// row flushes, column flush passes and outputs at all four edges.
module tb_dwt2d_top_small;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N  = 8;
  localparam int R  = N / 2;
  localparam real TOL = 6.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready;
  sample_t     in_top = '0, in_bot = '0;
  logic        out_valid, out_hband, frame_done;
  logic [$clog2(R)-1:0] out_row, out_col;
  sample_t     out_low, out_high;

  dwt2d_top #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_top, .in_bot,
    .out_valid, .out_hband, .out_row, .out_col, .out_low, .out_high, .frame_done
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint img [2][N][N];
  longint exp_lo [2][2][R][R];   // [frame][hband][row][col]
  longint exp_hi [2][2][R][R];
  real    flo [2][2][R][R];
  real    fhi [2][2][R][R];
  bit     seen [2][2][R][R];

  task automatic reference(int f);
    longint rl [N][R];
    longint rh [N][R];
    real    frl [N][R];
    real    frh [N][R];
    longint x[], lo[], hi[];
    real    fx[], flo1[], fhi1[];
    for (int i = 0; i < N; i++) begin
      x = new[N]; fx = new[N];
      for (int j = 0; j < N; j++) begin x[j] = img[f][i][j]; fx[j] = real'(img[f][i][j]); end
      dwt1d(x, lo, hi);
      fdwt1d(fx, flo1, fhi1);
      for (int k = 0; k < R; k++) begin
        rl[i][k] = lo[k]; rh[i][k] = hi[k]; frl[i][k] = flo1[k]; frh[i][k] = fhi1[k];
      end
    end
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < R; k++) begin
        x = new[N]; fx = new[N];
        for (int i = 0; i < N; i++) begin
          x[i]  = (b == 0) ? rl[i][k]  : rh[i][k];
          fx[i] = (b == 0) ? frl[i][k] : frh[i][k];
        end
        dwt1d_rc(x, lo, hi);
        fdwt1d(fx, flo1, fhi1);
        for (int r = 0; r < R; r++) begin
          exp_lo[f][b][r][k] = lo[r];  exp_hi[f][b][r][k] = hi[r];
          flo[f][b][r][k]    = flo1[r]; fhi[f][b][r][k]   = fhi1[r];
          seen[f][b][r][k]   = 0;
        end
      end
  endtask

  // mechanism counters
  int n_stall = 0, n_backpressure = 0, n_rflush1 = 0, n_rflush2 = 0;
  int n_cflush1 = 0, n_cflush2 = 0, n_edge_top = 0, n_edge_bot = 0, n_edge_left = 0, n_edge_right = 0;
  real max_err = 0.0;

  int frame_out = 0;
  int first_accept [2];
  int done_cycle [2];
  int last_col_cycle [2];
  int n_out [2] = '{0, 0};

  always @(posedge clk) if (rst_n) begin
    if (!in_valid && in_ready) n_stall++;
    if (in_valid && !in_ready) n_backpressure++;
    if (dut.row_flush1) n_rflush1++;
    if (dut.row_flush2) n_rflush2++;
    if (dut.col_flush1 && dut.flush_slot == '0) n_cflush1++;
    if (dut.col_flush2 && dut.flush_slot == '0) n_cflush2++;
    if (out_valid && frame_out < 2) begin
      int b, r, k;
      real e1, e2;
      b = int'(out_hband); r = int'(out_row); k = int'(out_col);
      n_out[frame_out]++;
      if (r == 0) n_edge_top++;
      if (r == R-1) n_edge_bot++;
      if (k == 0) n_edge_left++;
      if (k == R-1) n_edge_right++;
      checks++;
      if (seen[frame_out][b][r][k]) begin
        failures++;
        $display("duplicate output frame %0d band %0d row %0d col %0d", frame_out, b, r, k);
      end
      seen[frame_out][b][r][k] = 1;
      checks++;
      if (longint'(out_low) != exp_lo[frame_out][b][r][k] || longint'(out_high) != exp_hi[frame_out][b][r][k]) begin
        failures++;
        if (failures < 10)
          $display("mismatch f%0d band %0d r %0d k %0d: got %0d/%0d exp %0d/%0d", frame_out, b, r, k,
                   out_low, out_high, exp_lo[frame_out][b][r][k], exp_hi[frame_out][b][r][k]);
      end
      e1 = real'(out_low)  - flo[frame_out][b][r][k];
      e2 = real'(out_high) - fhi[frame_out][b][r][k];
      if (e1 < 0) e1 = -e1;
      if (e2 < 0) e2 = -e2;
      if (e1 > max_err) max_err = e1;
      if (e2 > max_err) max_err = e2;
      checks++;
      if (e1 > TOL || e2 > TOL) begin
        failures++;
        if (failures < 10) $display("float error too large f%0d b%0d r%0d k%0d: %f %f", frame_out, b, r, k, e1, e2);
      end
    end
    if (frame_done) begin
      done_cycle[frame_out] = cyc;
      frame_out++;
    end
  end

  task automatic send_frame(int f, bit stalls);
    for (int rp = 0; rp < R; rp++) begin
      int row_start;
      for (int j = 0; j < N; j++) begin
        if (stalls) while ($urandom_range(3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_top   <= sample_t'(img[f][2*rp][j]);
        in_bot   <= sample_t'(img[f][2*rp+1][j]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (rp == 0 && j == 0) first_accept[f] = cyc - 1;
        if (j == 0) row_start = cyc - 1;
        if (!stalls && j == N-1) begin
          checks++;
          if (cyc - 1 - row_start != N - 1) begin
            failures++;
            $display("row pair %0d took %0d cycles, expected %0d", rp, cyc - row_start, N);
          end
        end
        if (rp == R-1 && j == N-1) last_col_cycle[f] = cyc - 1;
      end
    end
    in_valid <= 0;
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          img[f][i][j] = (f == 1 && i < 4) ? ((j % 2 == 1) ? 255 : 0) : longint'($urandom_range(255));
      reference(f);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_frame(0, 1);
    send_frame(1, 0);
    wait (frame_out == 2);
    repeat (5) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (n_out[f] != N * R) begin
        failures++;
        $display("frame %0d: %0d outputs, expected %0d", f, n_out[f], N * R);
      end
    end
    // full-rate frame: N*N/2 input cycles plus 2 closing cycles per row pair
    // boundary, then 2N + 7 + 2 * (ROW_STEP_LAT + COL_STEP_LAT) cycles of row
    // drain, column flushing and draining.
    checks++;
    if (last_col_cycle[1] - first_accept[1] != R * N + 2 * (R - 1) - 1 ||
        done_cycle[1] - last_col_cycle[1] != 2 * N + 7 + 2 * (ROW_STEP_LAT + COL_STEP_LAT)) begin
      failures++;
      $display("frame 1 timing: input %0d cycles, tail %0d cycles",
               last_col_cycle[1] - first_accept[1] + 1, done_cycle[1] - last_col_cycle[1]);
    end
    $display("max |error| vs floating point 9/7: %f", max_err);
    $display("stall=%0d backpressure=%0d rflush1=%0d rflush2=%0d cflush1=%0d cflush2=%0d edges t/b/l/r=%0d/%0d/%0d/%0d",
             n_stall, n_backpressure, n_rflush1, n_rflush2, n_cflush1, n_cflush2,
             n_edge_top, n_edge_bot, n_edge_left, n_edge_right);
    checks++;
    if (n_stall == 0 || n_backpressure == 0 || n_rflush1 != 2 * R || n_rflush2 != 2 * R ||
        n_cflush1 != 2 || n_cflush2 != 2 || n_edge_top == 0 || n_edge_bot == 0 ||
        n_edge_left == 0 || n_edge_right == 0) begin
      failures++;
      $display("a mechanism was not exercised as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
