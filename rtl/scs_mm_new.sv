// Radix-2 Montgomery modular multiplier built around one reusable carry-save
// adder (SCS-MM-New).
//
// Computes S = A * B * 2^-(K+2) mod N for an odd K-bit modulus N and operands
// 0 <= A, B < 2N, giving 0 <= S < 2N, so results can be fed back as operands
// without a final subtraction (K+2 iterations, R = 2^(K+2)). Inputs and output
// are plain binary. All additions go through one (K+2)-bit configurable
// carry-save adder (ccsa), so no carry ever ripples across the word:
//   1. Precompute D = B + N: SS = B, SC = N, then repeat the two-half-adder
//      pass (2H_CSA) until Zero_D sees SC = 0. Each pass moves every carry two
//      places, so this takes about half the longest carry chain in cycles.
//   2. K+2 iterations (SS, SC) = (SS + SC + x) / 2 in full-adder mode, with
//      x = 0, N, B or D chosen by SM3 from (A_i, q_i). The selection bits for
//      the next iteration are computed one iteration ahead by Skip_D and held
//      in flip-flops (q^, A^), so the cycle is only SM3 plus one full adder.
//      Skip_D also detects an iteration that would add nothing to an even pair
//      with zero low bits; that iteration is skipped by shifting the registers
//      one extra place (M1/M2) in the next cycle.
//   3. Format conversion: repeat 2H_CSA until SC = 0; SS is then S.
// Registers: SS, SC (K+2 bits), B, N, D, the A shift register, and the skip,
// q^, A^ flip-flops.
//
// Interface: pulse start for one cycle while busy = 0; a, b, n are sampled then.
// done pulses one cycle when s holds the product; s stays until the next done.
// Latency from the start cycle to done is data dependent: 2 + (B+N passes) +
// (K+2 - skipped iterations) + (conversion passes) cycles.
//
// Follows the published architecture: the one-level configurable adder, SM3,
// Skip_D, Zero_D, the M1/M2 skip multiplexers and the M4/M5 3-bit multiplexers
// feeding Skip_D. This design's own choices: the handshake and reset; the
// divide-by-two of an iteration is done before the registers (M1/M2 only add
// the skip shift); iteration 0 is never skipped.
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,
  input  logic [K:0]   b,
  input  logic [K-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [K:0]   s
);
  localparam int unsigned W = K + 2;

  ctl_t ctl;

  logic [W-1:0] ss_r, sc_r, b_r, n_r, d_r;
  logic [K:0]   a_sr;       // a_sr[0] = A(i+1), a_sr[1] = A(i+2) in iteration i
  logic         skip_r, qh_r, ah_r;

  logic [W-1:0] ss_in, sc_in, x, sum, cry;
  logic [2:0]   ss_lo, sc_lo;
  logic         skip_nx, qh_nx, ah_nx, sc_zero;

  // M1, M2: apply a pending skip shift on the way into the adder.
  shift_mux #(.W(W)) u_m1 (.v({1'b0, ss_r}), .sel(skip_r), .y(ss_in));
  shift_mux #(.W(W)) u_m2 (.v({1'b0, sc_r}), .sel(skip_r), .y(sc_in));
  // M4, M5: the same selection on the low bits only, for Skip_D.
  shift_mux #(.W(3)) u_m4 (.v(ss_r[3:0]), .sel(skip_r), .y(ss_lo));
  shift_mux #(.W(3)) u_m5 (.v(sc_r[3:0]), .sel(skip_r), .y(sc_lo));

  sm3 #(.W(W)) u_sm3 (
    .a_hat(ah_r), .q_hat(qh_r), .b(b_r), .n(n_r), .d(d_r), .x(x)
  );

  ccsa #(.W(W)) u_ccsa (
    .ss(ss_in), .sc(sc_in), .x(x), .alpha(ctl.alpha), .s(sum), .co(cry)
  );

  skip_d u_skip_d (
    .ss_lo(ss_lo), .sc_lo(sc_lo), .x_lo(x[2:0]),
    .a1(a_sr[0]), .a2(a_sr[1]), .b0(b_r[0]), .en(ctl.skip_en),
    .skip(skip_nx), .q_hat(qh_nx), .a_hat(ah_nx)
  );

  zero_d #(.W(W)) u_zero_d (.v(sc_r), .zero(sc_zero));

  mm_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .start, .sc_zero, .skip_nx, .skip_r,
    .ctl, .busy, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss_r   <= '0;
      sc_r   <= '0;
      b_r    <= '0;
      n_r    <= '0;
      d_r    <= '0;
      a_sr   <= '0;
      skip_r <= 1'b0;
      qh_r   <= 1'b0;
      ah_r   <= 1'b0;
      s      <= '0;
    end else begin
      if (ctl.load) begin
        b_r    <= {1'b0, b};
        n_r    <= {2'b0, n};
        a_sr   <= a;
        ss_r   <= {1'b0, b};
        sc_r   <= {2'b0, n};
        skip_r <= 1'b0;
        qh_r   <= 1'b0;
        ah_r   <= 1'b0;
      end
      if (ctl.pre_step || ctl.conv_step) begin
        // 2H_CSA: value kept, carries advance two places.
        ss_r   <= sum;
        sc_r   <= {cry[W-2:0], 1'b0};
        skip_r <= 1'b0;
      end
      if (ctl.pre_done) begin
        d_r  <= ss_r;
        ss_r <= '0;
        sc_r <= '0;
        qh_r <= a_sr[0] & b_r[0];
        ah_r <= a_sr[0];
        a_sr <= a_sr >> 1;
      end
      if (ctl.loop_step) begin
        // 1F_CSA followed by division by two (sum bit 0 is always 0 here).
        ss_r   <= {1'b0, sum[W-1:1]};
        sc_r   <= cry;
        skip_r <= skip_nx;
        qh_r   <= ctl.loop_last ? 1'b0 : qh_nx;
        ah_r   <= ctl.loop_last ? 1'b0 : ah_nx;
        a_sr   <= skip_nx ? (a_sr >> 2) : (a_sr >> 1);
      end
      if (ctl.finish) s <= ss_r[K:0];
    end
  end

  // Every iteration adds an operand that makes the sum even.
  a_even: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.loop_step |-> !sum[0]);
endmodule
