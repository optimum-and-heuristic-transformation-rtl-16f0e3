// mdf2_unfolded_filter: the modified direct form II of mdf2_filter unfolded
// once and computed with on-arrival processing and state arrival skew
// T_j = 0: latency T_L = m + 1 = 2 cycles, sample period T_S = m + 1 = 2
// cycles, 2N states and about 8N + 4 coefficients.
//
// State vector S = [L_1..L_N; R_1..R_N] (see mdf2_filter). Its one-step
// matrices: row L_k of A is a_k on L_1 plus 1 on L_{k+1}; row R_k is
// r_k = b_k / b_0 on L_1 plus 1 on R_{k+1}; B = [a_k b_0; b_k];
// C = 1 on L_1 and on R_1; D = b_0. Samples are taken in pairs X[n], X[n+1]:
//   S[n+1] = A^2 S[n-1] + A B X[n] + B X[n+1]
//   Y[n]   = L_1 + R_1 + b_0 X[n]
//   Y[n+1] = (a_1 + r_1) L_1 + L_2 + R_2 + (a_1 b_0 + b_1) X[n] + b_0 X[n+1]
// Row L_k of A^2: (a_k a_1 + a_{k+1}) on L_1, a_k on L_2, 1 on L_{k+2};
// row R_k:       (r_k a_1 + r_{k+1}) on L_1, r_k on L_2, 1 on R_{k+2};
// (A B) is a_k a_1 b_0 + a_{k+1} b_0 for L_k and r_k a_1 b_0 + b_{k+1} for R_k.
// These coefficients are formed at elaboration.
// When b_0 = 0 the unscaled graph of mdf2_filter is used instead: b_0 is
// replaced by 1 in B and A B, r_k = b_k, and Y takes R_1 but not L_1, so
//   Y[n]   = R_1
//   Y[n+1] = r_1 L_1 + R_2 + b_1 X[n]
//
// Schedule (same as tdf2_unfolded_filter), X[n] in cycle t, X[n+1] in
// cycle t1 >= t+2: products and unit-term sums at t; Y[n] and first partial
// sums at t+1; per-row partial sums at t+2; products of X[n+1] at t1; new
// state and Y[n+1] at t1+1. Outputs come 2 cycles after their sample, y_pos
// gives the block position. Samples at least 2 cycles apart. Asynchronous
// active-low reset clears the state and returns to block position 0.
//
// T_L, T_S and the idea (technique: modified DF II + one unfolding +
// on-arrival processing) follow the source analysis; the equations above,
// the schedule, word lengths, handshake and reset are this design's own.
module mdf2_unfolded_filter
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
  output logic  y_pos,
  output data_t y
);
  localparam int SAMPLE_PERIOD = MULT_CYCLES + 1;
  localparam int NS = 2 * N;
  typedef coef_t cvec_t [N];
  typedef coef_t rvec_t [NS];

  // b_0 != 0: input scaled by g = b_0 and Y takes L_1 (graph (c) of
  // mdf2_filter); b_0 = 0: g = 1, r_k = b_k and Y takes R_1 only (graph (d))
  localparam bit    SCALED = (B_DF[0] != '0);
  localparam coef_t G      = SCALED ? B_DF[0] : q(1, 0);
  localparam coef_t CL     = SCALED ? q(1, 0) : '0;   // weight of L_1 in Y

  function automatic cvec_t calc_ratio();        // r_k = b_k / b_0, or b_k
    cvec_t v;
    for (int k = 0; k < N; k++) begin
      logic signed [2*CW-1:0] num;
      num = (2*CW)'(B_DF[k+1]) <<< CF;
      v[k] = SCALED ? coef_t'(num / (2*CW)'(B_DF[0])) : B_DF[k+1];
    end
    return v;
  endfunction
  localparam cvec_t RB = calc_ratio();

  function automatic coef_t nxt(cvec_t v, int k); // v_{k+1}, zero past N
    return (k + 1 < N) ? v[(k + 1) % N] : '0;
  endfunction

  // per-row coefficients: on L_1, on L_2, of X[n], of X[n+1]
  function automatic rvec_t calc_c1();
    rvec_t v;
    for (int k = 0; k < N; k++) begin
      v[k]     = cprod(A_DF[k], A_DF[0]) + nxt(A_DF, k);
      v[N + k] = cprod(RB[k], A_DF[0]) + nxt(RB, k);
    end
    return v;
  endfunction
  function automatic rvec_t calc_c2();
    rvec_t v;
    for (int k = 0; k < N; k++) begin
      v[k]     = A_DF[k];
      v[N + k] = RB[k];
    end
    return v;
  endfunction
  function automatic rvec_t calc_bx();
    rvec_t v;
    for (int k = 0; k < N; k++) begin
      v[k]     = cprod(A_DF[k], G);
      v[N + k] = B_DF[k+1];
    end
    return v;
  endfunction
  function automatic rvec_t calc_abx();
    rvec_t v;
    coef_t bl1;
    bl1 = cprod(A_DF[0], G);
    for (int k = 0; k < N; k++) begin
      v[k]     = cprod(A_DF[k], bl1) + cprod(nxt(A_DF, k), G);
      v[N + k] = cprod(RB[k], bl1) + ((k + 1 < N) ? B_DF[(k + 2) % (N + 1)] : '0);
    end
    return v;
  endfunction
  localparam rvec_t C1  = calc_c1();
  localparam rvec_t C2  = calc_c2();
  localparam rvec_t BX  = calc_bx();
  localparam rvec_t ABX = calc_abx();
  localparam coef_t CA1 = cprod(CL, A_DF[0]) + RB[0];
  localparam coef_t CBX = cprod(CL, cprod(A_DF[0], G)) + B_DF[1];

  logic  ph, v0_d1, v0_d2, v1_d1;
  data_t s   [NS];
  data_t p1  [NS], p2 [NS], pab [NS], pb1 [NS];
  data_t la  [NS], lb [NS], l2 [NS];
  data_t py0, py1, pcb, pa1, u0, u2, qa, qy;

  wire take0 = x_valid && !ph;
  wire take1 = x_valid &&  ph;

  function automatic data_t st(int i);           // s_i, zero outside
    return (i < NS) ? s[i % NS] : '0;
  endfunction
  function automatic data_t unit_term(int row);  // L_{k+2} or R_{k+2}
    int k;
    k = row % N;
    return (k + 2 < N) ? st(row + 2) : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0; v0_d1 <= 1'b0; v0_d2 <= 1'b0; v1_d1 <= 1'b0;
      for (int r = 0; r < NS; r++) begin
        s[r] <= '0; p1[r] <= '0; p2[r] <= '0; pab[r] <= '0; pb1[r] <= '0;
        la[r] <= '0; lb[r] <= '0; l2[r] <= '0;
      end
      py0 <= '0; py1 <= '0; pcb <= '0; pa1 <= '0; u0 <= '0; u2 <= '0;
      qa <= '0; qy <= '0; y <= '0; y_valid <= 1'b0; y_pos <= 1'b0;
    end else begin
      if (x_valid) ph <= ~ph;
      v0_d1 <= take0;
      v0_d2 <= v0_d1;
      v1_d1 <= take1;
      if (take0) begin
        for (int r = 0; r < NS; r++) begin
          p1[r]  <= cmul(C1[r], s[0]);
          p2[r]  <= cmul(C2[r], st(1));
          pab[r] <= cmul(ABX[r], x);
        end
        py0 <= cmul(B_DF[0], x);
        pcb <= cmul(CBX, x);
        pa1 <= cmul(CA1, s[0]);
        u0  <= (SCALED ? s[0] : '0) + s[N];
        u2  <= (SCALED ? st(1) : '0) + st(N + 1);
      end
      if (v0_d1) begin
        for (int r = 0; r < NS; r++) begin
          la[r] <= p1[r] + p2[r];
          lb[r] <= pab[r] + unit_term(r);
        end
        qa <= pa1 + u2;
      end
      if (v0_d2) begin
        for (int r = 0; r < NS; r++) l2[r] <= la[r] + lb[r];
        qy <= qa + pcb;
      end
      if (take1) begin
        for (int r = 0; r < NS; r++) pb1[r] <= cmul(BX[r], x);
        py1 <= cmul(B_DF[0], x);
      end
      if (v1_d1)
        for (int r = 0; r < NS; r++) s[r] <= l2[r] + pb1[r];
      y_valid <= v0_d1 || v1_d1;
      y_pos   <= v1_d1;
      if (v0_d1)      y <= u0 + py0;
      else if (v1_d1) y <= qy + py1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && x_valid)
      a_sample_period : assert (!(v0_d1 || v1_d1))
        else $error("mdf2_unfolded_filter: samples closer than %0d cycles", SAMPLE_PERIOD);
  end

endmodule
