// mdf2_filter: single-input single-output IIR filter in modified direct form
// II: the direct form II graph with its input scaled by b_0 (when b_0 != 0)
// and its delays retimed out of the middle branch into two delay
// chains, one on the feedback side (L_1..L_N) and one on the feed-forward
// side (R_1..R_N). Latency T_L = m + 1 = 2 cycles, sample period
// T_S = m + 2 = 3 cycles, 2N states, 4N + 1 coefficients.
//
// With w[n] = b_0 X[n] + L_1[n-1] the node between the two chains,
//   L_k[n] = a_k w[n] + L_{k+1}[n-1]
//          = a_k b_0 X[n] + a_k L_1[n-1] + L_{k+1}[n-1]
//   R_k[n] = (b_k / b_0) w[n] + R_{k+1}[n-1]
//          = b_k X[n] + (b_k / b_0) L_1[n-1] + R_{k+1}[n-1]
//   Y[n]   = L_1[n-1] + R_1[n-1] + b_0 X[n]         (L_{N+1} = R_{N+1} = 0)
// which realises H(z) = (b_0 + sum b_k z^-k) / (1 - sum a_k z^-k). Unit
// coefficients are not multiplied, and the sum of the two unit terms of Y is
// formed while the multiplier works, so Y needs one addition after b_0 X.
// The ratios b_k / b_0 are formed at elaboration and rounded toward zero to
// the coefficient format (they are generally not exact binary fractions).
//
// When b_0 = 0 (a strictly causal filter) there is nothing to scale by and the
// delays are retimed directly: w[n] = X[n] + L_1[n-1],
//   L_k[n] = a_k X[n] + a_k L_1[n-1] + L_{k+1}[n-1]
//   R_k[n] = b_k X[n] + b_k L_1[n-1] + R_{k+1}[n-1]
//   Y[n]   = R_1[n-1]
// The same datapath serves both cases with the coefficients chosen at
// elaboration; the timing below is kept for b_0 = 0 as well.
//
// Timing, x presented in cycle t: products and L_1 + R_1 registered at the
// end of t; y at the end of t+1 (y_valid in cycle t+2); states at the end of
// t+2, ready for a sample in cycle t+3. Samples may come every 3 or more
// cycles. Asynchronous active-low reset clears the state.
//
// The graph transformation and T_L / T_S follow the source analysis; the
// state equations are derived here from that graph; word lengths, rounding
// of b_k / b_0, handshake and reset are this design's choices.
module mdf2_filter
  import lti_pkg::*;
#(
  parameter int    N = 5,
  parameter coef_t A_DF [N]   = wdf5_coef_pkg::WDF5_DF_A,   // a_1 .. a_N
  parameter coef_t B_DF [N+1] = wdf5_coef_pkg::WDF5_DF_B    // b_0 .. b_N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  x_valid,
  input  data_t x,
  output logic  y_valid,
  output data_t y
);
  localparam int SAMPLE_PERIOD = MULT_CYCLES + 2;
  typedef coef_t cvec_t [N];

  // b_0 != 0: input scaled by b_0 (graph (c)); b_0 = 0: no scaling and no
  // direct path, the output is the feed-forward chain alone (graph (d))
  localparam bit SCALED = (B_DF[0] != '0);

  function automatic cvec_t calc_ratio();        // b_k / b_0, or b_k
    cvec_t v;
    for (int k = 0; k < N; k++) begin
      logic signed [2*CW-1:0] num;
      num = (2*CW)'(B_DF[k+1]) <<< CF;
      v[k] = SCALED ? coef_t'(num / (2*CW)'(B_DF[0])) : B_DF[k+1];
    end
    return v;
  endfunction
  localparam cvec_t RB = calc_ratio();

  function automatic cvec_t calc_ab0();          // a_k b_0, or a_k
    cvec_t v;
    for (int k = 0; k < N; k++) v[k] = SCALED ? cprod(A_DF[k], B_DF[0]) : A_DF[k];
    return v;
  endfunction
  localparam cvec_t AB0 = calc_ab0();

  data_t sl  [N], sr [N];        // feedback and feed-forward delay chains
  data_t pla [N], plx [N];       // a_k L_1, a_k b_0 x
  data_t pra [N], prx [N];       // (b_k/b_0) L_1, b_k x
  data_t ll  [N], lr  [N];       // partial sums with the unit terms
  data_t hl  [N], hr  [N];       // input products, delayed
  data_t pb0, u;
  logic  v1, v2;
  logic [1:0] busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        sl[k] <= '0; sr[k] <= '0; pla[k] <= '0; plx[k] <= '0; pra[k] <= '0;
        prx[k] <= '0; ll[k] <= '0; lr[k] <= '0; hl[k] <= '0; hr[k] <= '0;
      end
      pb0 <= '0; u <= '0; v1 <= 1'b0; v2 <= 1'b0; busy <= '0;
      y <= '0; y_valid <= 1'b0;
    end else begin
      v1 <= x_valid;
      v2 <= v1;
      if (x_valid) busy <= 2'(SAMPLE_PERIOD - 1);
      else if (busy != 0) busy <= busy - 1'b1;
      if (x_valid) begin
        for (int k = 0; k < N; k++) begin
          pla[k] <= cmul(A_DF[k], sl[0]);
          plx[k] <= cmul(AB0[k], x);
          pra[k] <= cmul(RB[k], sl[0]);
          prx[k] <= cmul(B_DF[k+1], x);
        end
        pb0 <= cmul(B_DF[0], x);
        u   <= SCALED ? sl[0] + sr[0] : sr[0];
      end
      y_valid <= v1;
      if (v1) begin
        y <= u + pb0;
        for (int k = 0; k < N; k++) begin
          ll[k] <= pla[k] + ((k + 1 < N) ? sl[(k + 1) % N] : '0);
          lr[k] <= pra[k] + ((k + 1 < N) ? sr[(k + 1) % N] : '0);
          hl[k] <= plx[k];
          hr[k] <= prx[k];
        end
      end
      if (v2)
        for (int k = 0; k < N; k++) begin
          sl[k] <= ll[k] + hl[k];
          sr[k] <= lr[k] + hr[k];
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && x_valid)
      a_sample_period : assert (busy == 0)
        else $error("mdf2_filter: samples closer than %0d cycles", SAMPLE_PERIOD);
  end

endmodule
