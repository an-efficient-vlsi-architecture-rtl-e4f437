// tb_temporal_buffer: writes random words to random addresses of a 16-entry
// buffer and reads them back, including a read of an address being written
// in the same cycle (must return the old word).
module tb_temporal_buffer;
  localparam int D = 16, W = 24;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  temporal_buffer #(.DEPTH(D), .W(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = 4'($urandom_range(D-1));
      we    = $urandom_range(1) == 1;
      waddr = ($urandom_range(3) == 0) ? raddr : 4'($urandom_range(D-1));
      wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("addr %0d: read %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
