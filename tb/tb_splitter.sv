// tb_splitter: sends rows of N = 8 pixels with random idle cycles and checks
// that each odd pixel produces the pair (x(2m), x(2m+1)) with the right pair
// index and first flag, and that nothing else produces a pair.
module tb_splitter;
  import dwt_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid = 0, pix_sor = 0;
  sample_t pix = '0, even, odd;
  logic pair_valid, pair_first;
  logic [1:0] pair_idx;
  int checks = 0, failures = 0, npairs = 0;

  splitter #(.N(N)) dut (.clk, .rst_n, .pix_valid, .pix_sor, .pix, .pair_valid, .pair_first, .pair_idx, .even, .odd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t row [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      foreach (row[j]) row[j] = sample_t'($urandom_range(100000)) - 50000;
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        while ($urandom_range(2) == 0) begin
          pix_valid = 0;
          #1;
          checks++;
          if (pair_valid) begin failures++; $display("pair without pixel"); end
          @(negedge clk);
        end
        pix_valid = 1; pix_sor = (j == 0); pix = row[j];
        #1;
        checks++;
        if (pair_valid !== (j % 2 == 1)) begin
          failures++; $display("row %0d pixel %0d: pair_valid %0d", r, j, pair_valid);
        end else if (pair_valid) begin
          npairs++;
          checks++;
          if (even !== row[j-1] || odd !== row[j] || pair_idx !== 2'(j/2) || pair_first !== (j == 1)) begin
            failures++;
            $display("row %0d pair %0d: got %0d %0d idx %0d first %0d", r, j/2, even, odd, pair_idx, pair_first);
          end
        end
      end
      @(negedge clk);
      pix_valid = 0;
    end
    checks++;
    if (npairs != 20 * N / 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
