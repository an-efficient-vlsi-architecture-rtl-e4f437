// splitter: serial-to-pair converter at the head of a row filter.
//
// Pixels of one image row arrive one per accepted cycle (pix_valid). The
// splitter holds each even-indexed pixel x(2m) in a register and, when the
// following odd pixel x(2m+1) arrives, presents the pair (even, odd) with
// pair_valid high in that same cycle. pix_sor marks the first pixel of a row:
// it restarts the even/odd phase and the pair index. pair_first flags pair 0
// of a row, pair_idx counts pairs within the row. The document names the
// splitter and says it separates even and odd samples; the register-based
// form and the row-start marker are this design's choices.
module splitter
  import dwt_pkg::*;
#(
  parameter int unsigned N = 256   // row length in pixels (even)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pix_valid,
  input  logic    pix_sor,
  input  sample_t pix,
  output logic    pair_valid,
  output logic    pair_first,
  output logic [$clog2(N/2)-1:0] pair_idx,
  output sample_t even,
  output sample_t odd
);
  localparam int unsigned KW = $clog2(N/2);

  logic    phase;        // 1: an even pixel is held, next pixel is odd
  sample_t even_q;
  logic [KW-1:0] idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= 1'b0;
      even_q <= '0;
      idx_q  <= '0;
    end else if (pix_valid) begin
      if (pix_sor || !phase) begin
        phase  <= 1'b1;
        even_q <= pix;
        if (pix_sor) idx_q <= '0;
      end else begin
        phase <= 1'b0;
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  always_comb begin
    pair_valid = pix_valid && phase && !pix_sor;
    pair_first = (idx_q == '0);
    pair_idx   = idx_q;
    even       = even_q;
    odd        = pix;
  end

endmodule
