// tdf2_filter: single-input single-output IIR filter in transposed direct
// form II (companion form), the low-cost realisation with sample period
// T_S = m + 2 = 3 cycles and latency T_L = m + 1 = 2 cycles.
//
// With H(z) = (b_0 + b_1 z^-1 + ... + b_N z^-N) / (1 - a_1 z^-1 - ... - a_N z^-N)
// the N states follow the companion state-space form
//   s_k[n] = a_k s_1[n-1] + s_{k+1}[n-1] + B_k X[n],  B_k = b_k + a_k b_0
//   Y[n]   = s_1[n-1] + b_0 X[n]                      (s_{N+1} = 0)
// i.e. A has a_k in its first column and ones on its superdiagonal,
// C = [1 0 ... 0] and D = b_0. Unit coefficients are not multiplied: the
// output is one addition after the product b_0 X, and each state is the sum
// of two products and one unit term (two adder levels), so the state update
// takes m + 2 cycles. B_k is formed at elaboration from a_k and b_k.
//
// Timing, x presented (x_valid high) in cycle t: products registered at the
// end of t; y registered at the end of t+1 (y_valid in cycle t+2, T_L = 2);
// new state registered at the end of t+2 and used by a sample presented in
// cycle t+3 (T_S = 3). Samples may come every 3 or more cycles. Asynchronous
// active-low reset clears the state (zero initial state).
//
// Structure, state-space matrices and T_L / T_S follow the source analysis;
// the sign convention of a_k (A holds +a_k), word lengths, handshake and
// reset are this design's choices. Defaults: the elliptic example filter.
module tdf2_filter
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

  // B_k = b_k + a_k b_0
  function automatic cvec_t calc_bv();
    cvec_t v;
    for (int k = 0; k < N; k++) v[k] = B_DF[k+1] + cprod(A_DF[k], B_DF[0]);
    return v;
  endfunction
  localparam cvec_t BV = calc_bv();

  data_t s   [N];
  data_t pa  [N];          // a_k * s_1
  data_t pb  [N];          // B_k * x
  data_t l1  [N];          // a_k * s_1 + s_{k+1}
  data_t h1  [N];          // B_k * x, delayed
  data_t pb0;              // b_0 * x
  logic  v1, v2;
  logic [1:0] busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        s[k] <= '0; pa[k] <= '0; pb[k] <= '0; l1[k] <= '0; h1[k] <= '0;
      end
      pb0 <= '0; v1 <= 1'b0; v2 <= 1'b0;
      y <= '0; y_valid <= 1'b0; busy <= '0;
    end else begin
      v1 <= x_valid;
      v2 <= v1;
      if (x_valid) busy <= 2'(SAMPLE_PERIOD - 1);
      else if (busy != 0) busy <= busy - 1'b1;
      if (x_valid) begin
        for (int k = 0; k < N; k++) begin
          pa[k] <= cmul(A_DF[k], s[0]);
          pb[k] <= cmul(BV[k], x);
        end
        pb0 <= cmul(B_DF[0], x);
      end
      y_valid <= v1;
      if (v1) begin
        y <= s[0] + pb0;
        for (int k = 0; k < N; k++) begin
          l1[k] <= pa[k] + ((k + 1 < N) ? s[(k + 1) % N] : '0);
          h1[k] <= pb[k];
        end
      end
      if (v2)
        for (int k = 0; k < N; k++) s[k] <= l1[k] + h1[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && x_valid)
      a_sample_period : assert (busy == 0)
        else $error("tdf2_filter: samples closer than %0d cycles", SAMPLE_PERIOD);
  end

endmodule
