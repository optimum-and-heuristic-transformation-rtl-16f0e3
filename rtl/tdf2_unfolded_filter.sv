// tdf2_unfolded_filter: transposed direct form II (companion form) unfolded
// once and computed with on-arrival processing and state arrival skew
// T_j = 0. Latency T_L = m + 1 = 2 cycles and sample period T_S = m + 1 = 2
// cycles, with only N states and 4N + 2 distinct coefficients.
//
// Samples are taken in pairs X[n], X[n+1] (block positions 0 and 1). With the
// companion matrices of tdf2_filter (A: a_k in the first column, ones on the
// superdiagonal; B_k = b_k + a_k b_0; C = [1 0 .. 0]; D = b_0):
//   S[n+1] = A^2 S[n-1] + A B X[n] + B X[n+1]
//   Y[n]   = s_1[n-1] + b_0 X[n]
//   Y[n+1] = a_1 s_1[n-1] + s_2[n-1] + B_1 X[n] + b_0 X[n+1]
// Row k of A^2 is (a_k a_1 + a_{k+1}) on s_1, a_k on s_2 and 1 on s_{k+2}, and
// (A B)_k = a_k B_1 + B_{k+1}; these are formed at elaboration.
//
// Schedule, X[n] presented in cycle t, X[n+1] in cycle t1 >= t+2:
//   t    : products of X[n], of s_1 and of s_2
//   t+1  : Y[n] = s_1 + b_0 X[n]; per row two partial sums (one takes the
//          unit term s_{k+2}); a_1 s_1 + s_2
//   t+2  : per row one partial sum; qy = a_1 s_1 + s_2 + B_1 X[n]
//   t1   : products of X[n+1]
//   t1+1 : new state = partial + B_k X[n+1]; Y[n+1] = qy + b_0 X[n+1]
// The state is ready in cycle t1+2, when the next pair's first sample may be
// presented (T_j = 0). Outputs appear exactly 2 cycles after their sample,
// with y_pos giving the block position. Samples must be at least 2 cycles
// apart; longer gaps are allowed. Asynchronous active-low reset clears the
// state and returns to block position 0.
//
// The structure, T_L / T_S and the coefficient count follow the source
// analysis; the detailed schedule, the sign convention of a_k, word lengths,
// handshake and reset are this design's choices.
module tdf2_unfolded_filter
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
  typedef coef_t cvec_t [N];

  function automatic cvec_t calc_bv();          // B_k = b_k + a_k b_0
    cvec_t v;
    for (int k = 0; k < N; k++) v[k] = B_DF[k+1] + cprod(A_DF[k], B_DF[0]);
    return v;
  endfunction
  localparam cvec_t BV = calc_bv();

  function automatic cvec_t calc_c1();          // a_k a_1 + a_{k+1}
    cvec_t v;
    for (int k = 0; k < N; k++)
      v[k] = cprod(A_DF[k], A_DF[0]) + ((k + 1 < N) ? A_DF[(k + 1) % N] : '0);
    return v;
  endfunction
  localparam cvec_t C1 = calc_c1();

  function automatic cvec_t calc_ab();          // a_k B_1 + B_{k+1}
    cvec_t v;
    for (int k = 0; k < N; k++)
      v[k] = cprod(A_DF[k], BV[0]) + ((k + 1 < N) ? BV[(k + 1) % N] : '0);
    return v;
  endfunction
  localparam cvec_t AB = calc_ab();

  logic  ph, v0_d1, v0_d2, v1_d1;
  data_t s   [N];
  data_t p1  [N], p2 [N], pab [N], pb1 [N];
  data_t la  [N], lb [N], l2 [N];
  data_t py0, py1, pcb, pa1, qa, qy;

  wire take0 = x_valid && !ph;
  wire take1 = x_valid &&  ph;

  function automatic data_t st(int k);          // s_k with s beyond N = 0
    return (k < N) ? s[k % N] : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0; v0_d1 <= 1'b0; v0_d2 <= 1'b0; v1_d1 <= 1'b0;
      for (int k = 0; k < N; k++) begin
        s[k] <= '0; p1[k] <= '0; p2[k] <= '0; pab[k] <= '0; pb1[k] <= '0;
        la[k] <= '0; lb[k] <= '0; l2[k] <= '0;
      end
      py0 <= '0; py1 <= '0; pcb <= '0; pa1 <= '0; qa <= '0; qy <= '0;
      y <= '0; y_valid <= 1'b0; y_pos <= 1'b0;
    end else begin
      if (x_valid) ph <= ~ph;
      v0_d1 <= take0;
      v0_d2 <= v0_d1;
      v1_d1 <= take1;
      if (take0) begin
        for (int k = 0; k < N; k++) begin
          p1[k]  <= cmul(C1[k], s[0]);
          p2[k]  <= cmul(A_DF[k], st(1));
          pab[k] <= cmul(AB[k], x);
        end
        py0 <= cmul(B_DF[0], x);
        pcb <= cmul(BV[0], x);
        pa1 <= cmul(A_DF[0], s[0]);
      end
      if (v0_d1) begin
        for (int k = 0; k < N; k++) begin
          la[k] <= p1[k] + p2[k];
          lb[k] <= pab[k] + st(k + 2);
        end
        qa <= pa1 + st(1);
      end
      if (v0_d2) begin
        for (int k = 0; k < N; k++) l2[k] <= la[k] + lb[k];
        qy <= qa + pcb;
      end
      if (take1) begin
        for (int k = 0; k < N; k++) pb1[k] <= cmul(BV[k], x);
        py1 <= cmul(B_DF[0], x);
      end
      if (v1_d1)
        for (int k = 0; k < N; k++) s[k] <= l2[k] + pb1[k];
      y_valid <= v0_d1 || v1_d1;
      y_pos   <= v1_d1;
      if (v0_d1)      y <= s[0] + py0;
      else if (v1_d1) y <= qy + py1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && x_valid)
      a_sample_period : assert (!(v0_d1 || v1_d1))
        else $error("tdf2_unfolded_filter: samples closer than %0d cycles", SAMPLE_PERIOD);
  end

endmodule
