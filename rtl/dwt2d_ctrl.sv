// dwt2d_ctrl: sequencing for the 2-D transform of one N x N frame.
//
// The frame enters as N/2 row pairs, each row pair as N columns, one column
// (two pixels, rows 2r and 2r+1) per accepted cycle (in_valid && in_ready).
// The controller counts column j and row pair r, marks the first column of a
// row (pix_sor) and closes every row in the row filters: after the last
// column it holds in_ready low for two cycles, and raises row_flush1 two
// cycles and row_flush2 six cycles after the last column was accepted
// (these are the spacings the row filters' two lifting steps need).
// After the last row pair it waits until the row filters and the transposing
// buffer are empty, then runs two column flush passes over all N column
// slots (col_flush1, then col_flush2, one slot per cycle, with flush_slot),
// waits for the column filter to drain and pulses frame_done. in_ready stays
// low from the last column of the frame until frame_done.
// The document does not describe the control; all of it is this design's.
module dwt2d_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 256,
  localparam int unsigned R     = N / 2,
  localparam int unsigned RW    = $clog2(R),
  localparam int unsigned SW    = $clog2(N),
  localparam int unsigned CW    = $clog2(N + 2 * ROW_STEP_LAT + 6)   // counter: N slots or a drain wait
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          accept,
  output logic          pix_sor,
  output logic [RW-1:0] row_pair,
  output logic          row_flush1,
  output logic          row_flush2,
  output logic          col_flush1,
  output logic          col_flush2,
  output logic [SW-1:0] flush_slot,
  output logic          frame_done
);
  typedef enum logic [2:0] {RUN, ROW_GAP, ROWS_DRAIN, CFLUSH1, CGAP, CFLUSH2, COL_DRAIN} state_t;

  // Cycles from the last accepted column of the frame until the transposing
  // buffer has delivered the last high-pass pair (row filter: flush2 at
  // +L+4, result at +2L+4, parked pair at +2L+5 for a row step latency L),
  // from the end of column flush pass 1 until its last result has entered
  // the second column step, and from the last flush2 until the column
  // filter output register holds it.
  localparam int unsigned FLUSH2_DLY     = ROW_STEP_LAT + 4;
  localparam int unsigned ROWS_DRAIN_CYC = 2 * ROW_STEP_LAT + 5;
  localparam int unsigned CGAP_CYC       = COL_STEP_LAT;
  localparam int unsigned COL_DRAIN_CYC  = COL_STEP_LAT;

  state_t        state;
  logic [SW-1:0] col;
  logic [RW-1:0] rp;
  logic [CW-1:0] cnt;
  logic [FLUSH2_DLY-1:0] eor_sr;   // end-of-row history, bit i: last column i+1 cycles ago
  logic          last_col;

  always_comb begin
    in_ready   = (state == RUN);
    accept     = in_valid && in_ready;
    pix_sor    = (col == '0);
    row_pair   = rp;
    last_col   = accept && (col == SW'(N-1));
    row_flush1 = eor_sr[1];
    row_flush2 = eor_sr[FLUSH2_DLY-1];
    col_flush1 = (state == CFLUSH1);
    col_flush2 = (state == CFLUSH2);
    flush_slot = cnt[SW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RUN;
      col        <= '0;
      rp         <= '0;
      cnt        <= '0;
      eor_sr     <= '0;
      frame_done <= 1'b0;
    end else begin
      eor_sr     <= {eor_sr[FLUSH2_DLY-2:0], last_col};
      frame_done <= 1'b0;
      unique case (state)
        RUN: if (accept) begin
          col <= col + 1'b1;
          if (last_col) begin
            col <= '0;
            cnt <= '0;
            if (rp == RW'(R-1)) begin
              rp    <= '0;
              state <= ROWS_DRAIN;
            end else begin
              rp    <= rp + 1'b1;
              state <= ROW_GAP;
            end
          end
        end
        ROW_GAP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(1)) state <= RUN;
        end
        ROWS_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(ROWS_DRAIN_CYC - 1)) begin
            cnt   <= '0;
            state <= CFLUSH1;
          end
        end
        CFLUSH1: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N-1)) begin
            cnt   <= '0;
            state <= CGAP;
          end
        end
        CGAP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CGAP_CYC - 1)) begin
            cnt   <= '0;
            state <= CFLUSH2;
          end
        end
        CFLUSH2: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N-1)) begin
            cnt   <= '0;
            state <= COL_DRAIN;
          end
        end
        COL_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(COL_DRAIN_CYC - 1)) begin
            cnt        <= '0;
            frame_done <= 1'b1;
            state      <= RUN;
          end
        end
        default: state <= RUN;
      endcase
    end
  end

endmodule
