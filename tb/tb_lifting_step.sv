// tb_lifting_step: runs four interleaved sequences of R = 6 pairs through a
// 4-slot lifting step (alpha, beta), events in random slot order with idle
// cycles, each sequence closed by a flush event. Every output pair is
// compared with one predict/update step of the reference model, including
// the mirrored first and last pairs, the first/last flags and the returned
// tag; each output must appear exactly ROW_STEP_LAT (6) cycles after its event.
module tb_lifting_step;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int S = 4, R = 6, LAT = ROW_STEP_LAT;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_flush = 0, in_first = 0;
  logic [1:0] in_slot = '0;
  logic [7:0] in_tag = '0;
  sample_t in_e = '0, in_o = '0;
  logic out_valid, out_first, out_last;
  logic [1:0] out_slot;
  logic [7:0] out_tag;
  sample_t out_s, out_d;

  lifting_step #(.A(ALPHA), .B(BETA), .DEPTH(S), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  longint e [S][], o [S][], es [S][], od [S][];
  int nxt [S];        // next event index per slot: 0..R-1 pairs, R flush
  int nout [S];
  bit expect_out [$];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checking
  always @(posedge clk) if (rst_n) begin
    bit exp_v;
    exp_v = (expect_out.size() > LAT) ? expect_out[expect_out.size() - 1 - LAT] : 1'b0;
    checks++;
    if (out_valid !== exp_v) begin
      failures++;
      $display("out_valid %0d, expected %0d", out_valid, exp_v);
    end
    if (out_valid) begin
      int s, m;
      s = int'(out_slot); m = nout[s];
      checks++;
      if (longint'(out_s) != es[s][m] || longint'(out_d) != od[s][m] || out_first !== (m == 0) ||
          out_last !== (m == R-1) || out_tag !== 8'(16 * s + m)) begin
        failures++;
        $display("slot %0d pair %0d: got s=%0d d=%0d first=%0d last=%0d tag=%0d, expected s=%0d d=%0d",
                 s, m, out_s, out_d, out_first, out_last, out_tag, es[s][m], od[s][m]);
      end
      nout[s]++;
    end
  end

  initial begin
    for (int s = 0; s < S; s++) begin
      e[s] = new[R]; o[s] = new[R];
      for (int m = 0; m < R; m++) begin
        e[s][m] = longint'($urandom_range(4000)) - 2000;
        o[s][m] = longint'($urandom_range(4000)) - 2000;
      end
      es[s] = e[s]; od[s] = o[s];
      step(es[s], od[s], CA, CB);
      nxt[s] = 0; nout[s] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      int s, busy;
      busy = 0;
      for (int k = 0; k < S; k++) if (nxt[k] <= R) busy = 1;
      if (busy == 0) break;
      @(negedge clk);
      s = $urandom_range(S-1);
      in_valid = 0; in_flush = 0;
      if (nxt[s] <= R && $urandom_range(3) != 0) begin
        in_slot = 2'(s);
        if (nxt[s] < R) begin
          in_valid = 1; in_first = (nxt[s] == 0);
          in_e = sample_t'(e[s][nxt[s]]); in_o = sample_t'(o[s][nxt[s]]);
          in_tag = 8'(16 * s + nxt[s]);
        end else begin
          in_flush = 1;
          in_e = sample_t'($urandom); in_o = sample_t'($urandom);
        end
        expect_out.push_back(in_flush || !in_first);
        nxt[s]++;
      end else expect_out.push_back(1'b0);
    end
    @(negedge clk); in_valid = 0; in_flush = 0; expect_out.push_back(1'b0);
    repeat (LAT + 2) begin @(negedge clk); expect_out.push_back(1'b0); end
    for (int s = 0; s < S; s++) begin
      checks++;
      if (nout[s] != R) begin failures++; $display("slot %0d: %0d outputs", s, nout[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
