// tb_lift_unit: checks y = i2 + k*(i1 + i3) of the computing unit for the
// alpha and delta coefficients against the reference rounding of
// dwt_ref_pkg, on random and extreme operands. A new operand set enters
// every cycle; each result must appear exactly UNIT_LAT cycles later.
module tb_lift_unit;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 1'b0;
  sample_t i1, i2, i3, ya, yd;
  int checks = 0, failures = 0;
  longint exp_a [$], exp_d [$];
  logic   exp_v [$];

  always #5 clk = ~clk;

  lift_unit #(.K(ALPHA)) u_a (.clk, .i1, .i2, .i3, .y(ya));
  lift_unit #(.K(DELTA)) u_d (.clk, .i1, .i2, .i3, .y(yd));

  // after every edge: the operands applied UNIT_LAT edges ago are at y
  always @(posedge clk) begin
    #1;
    if (exp_v.size() == UNIT_LAT) begin
      if (exp_v[0]) begin
        checks += 2;
        if (longint'(ya) != exp_a[0] || longint'(yd) != exp_d[0]) begin
          failures++;
          $display("alpha %0d exp %0d, delta %0d exp %0d", ya, exp_a[0], yd, exp_d[0]);
        end
      end
      void'(exp_v.pop_front()); void'(exp_a.pop_front()); void'(exp_d.pop_front());
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint a, longint b, longint c);
    @(negedge clk);
    i1 = sample_t'(a); i2 = sample_t'(b); i3 = sample_t'(c);
    exp_a.push_back(b + rmul(CA, a + c));
    exp_d.push_back(b + rmul(CD, a + c));
    exp_v.push_back(1'b1);
  endtask

  initial begin
    check(0, 0, 0);
    check(1, 0, 0);
    check(-1, 0, 0);
    check(255, 100, 255);
    check(-4000, 7, 3000);
    for (int n = 0; n < 2000; n++)
      check(longint'($urandom_range(20000)) - 10000, longint'($urandom_range(20000)) - 10000,
            longint'($urandom_range(20000)) - 10000);
    repeat (UNIT_LAT + 1) begin @(negedge clk); exp_v.push_back(1'b0); exp_a.push_back(0); exp_d.push_back(0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
