// Control part of the carry-save Montgomery multiplier.
//
// A five-state machine:
//   IDLE - waits for start; on start issues load (operands sampled, SS = B,
//          SC = N, skip/q^/A^ cleared) and enters PRE.
//   PRE  - precomputes D = B + N: issues pre_step (one 2H_CSA pass) each cycle
//          while SC != 0; when Zero_D reports SC = 0 it issues pre_done
//          (D <= SS, SS = SC = 0, iteration 0 set up) and enters LOOP.
//   LOOP - one iteration per cycle with the adder in full-adder mode. The
//          iteration index i advances by 1, or by 2 when Skip_D skips iteration
//          i+1. Skipping is enabled only while i+1 <= K+1. The loop ends after
//          iteration K+1, or after iteration K when K+1 is skipped (loop_last).
//   CONV - format conversion: conv_step (one 2H_CSA pass) each cycle until SC
//          is zero and no skip shift is pending, then finish (SS copied to the
//          result register) and DONE.
//   DONE - done = 1 for one cycle, back to IDLE; like IDLE it accepts start,
//          so back-to-back multiplications lose no cycle.
// busy is high from the cycle after start to the cycle before done.
// The number of cycles is data dependent: 1 (load) + PRE cycles + (K+2 minus
// skipped iterations) + CONV cycles + 1, counted from the start cycle to done.
// The state machine itself is this design's choice; the sequence of phases and
// the loop bound K+2 are those of the multiplier's algorithm.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic sc_zero,   // Zero_D on the SC register
  input  logic skip_nx,   // Skip_D: iteration i+1 will be skipped
  input  logic skip_r,    // a skip shift is pending in the SS/SC registers
  output ctl_t ctl,
  output logic busy,
  output logic done
);
  localparam int unsigned IW = $clog2(K + 4);
  localparam logic [IW-1:0] LAST = IW'(K + 1);
  localparam logic [IW-1:0] PREV = IW'(K);

  state_t        state, state_nx;
  logic [IW-1:0] idx, idx_nx;
  logic          last;

  always_comb begin
    ctl      = '0;
    state_nx = state;
    idx_nx   = idx;
    last     = 1'b0;
    ctl.skip_en = (state == ST_LOOP) && (idx <= PREV);
    unique case (state)
      ST_IDLE, ST_DONE: begin
        state_nx = ST_IDLE;
        if (start) begin
          ctl.load = 1'b1;
          state_nx = ST_PRE;
        end
      end
      ST_PRE: begin
        if (sc_zero) begin
          ctl.pre_done = 1'b1;
          idx_nx       = '0;
          state_nx     = ST_LOOP;
        end else begin
          ctl.pre_step = 1'b1;
        end
      end
      ST_LOOP: begin
        ctl.alpha     = 1'b1;
        ctl.loop_step = 1'b1;
        last          = (idx == LAST) || (idx == PREV && skip_nx);
        ctl.loop_last = last;
        idx_nx        = idx + (skip_nx ? IW'(2) : IW'(1));
        if (last) state_nx = ST_CONV;
      end
      ST_CONV: begin
        if (sc_zero && !skip_r) begin
          ctl.finish = 1'b1;
          state_nx   = ST_DONE;
        end else begin
          ctl.conv_step = 1'b1;
        end
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      idx   <= '0;
    end else begin
      state <= state_nx;
      idx   <= idx_nx;
    end
  end

  assign busy = (state != ST_IDLE) && (state != ST_DONE);
  assign done = (state == ST_DONE);

  // The loop index never passes K+2, and a skip is never taken from the last
  // iteration.
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_LOOP |-> idx <= LAST);
  a_no_skip_past_end: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_LOOP && idx == LAST |-> !skip_nx);
endmodule
