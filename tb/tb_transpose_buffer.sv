// tb_transpose_buffer: feeds row-filter results (at least one idle cycle
// apart) and checks that each produces the L vertical pair in the same cycle
// (slot 2k) and the H vertical pair in the next cycle (slot 2k+1), with the
// row tag, and that nothing is produced otherwise.
module tb_transpose_buffer;
  import dwt_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [7:0] in_row = '0;
  logic [2:0] in_k = '0;
  sample_t in_l_top = '0, in_h_top = '0, in_l_bot = '0, in_h_bot = '0;
  logic col_valid;
  logic [3:0] col_slot;
  logic [7:0] col_row;
  sample_t col_top, col_bot;
  int checks = 0, failures = 0;

  transpose_buffer #(.N(N), .RTAG_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_col(bit v, logic [3:0] slot, logic [7:0] row, sample_t t, sample_t b);
    #1;
    checks++;
    if (col_valid !== v || (v && (col_slot !== slot || col_row !== row || col_top !== t || col_bot !== b))) begin
      failures++;
      $display("got v=%0d slot=%0d row=%0d %0d/%0d, expected v=%0d slot=%0d row=%0d %0d/%0d",
               col_valid, col_slot, col_row, col_top, col_bot, v, slot, row, t, b);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      sample_t lt, ht, lb, hb;
      logic [7:0] r;
      logic [2:0] k;
      lt = sample_t'($urandom); ht = sample_t'($urandom); lb = sample_t'($urandom); hb = sample_t'($urandom);
      r = 8'($urandom); k = 3'($urandom);
      @(negedge clk);
      in_valid = 1; in_row = r; in_k = k; in_l_top = lt; in_h_top = ht; in_l_bot = lb; in_h_bot = hb;
      expect_col(1, {k, 1'b0}, r, lt, lb);
      @(negedge clk);
      in_valid = 0; in_l_top = '0; in_h_top = '0;
      expect_col(1, {k, 1'b1}, r, ht, hb);
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        expect_col(0, '0, '0, '0, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
