// onarrival_unfolded_filter: single-input single-output LTI filter realised by
// unfolding once (two samples per state update) plus the minimum latency
// transformation, computed with on-arrival processing. Default coefficients
// are those of the fifth-order elliptic wave digital filter, giving latency
// T_L = 2 cycles and sample period T_S = 2 cycles (m = 1), against 7 and 9
// cycles for that filter's original dataflow graph.
//
// Samples are taken in pairs X[n], X[n+1] ("block positions" 0 and 1). The
// state vector S~ = [S; C S; C A S] has R + 2 entries and is updated once per
// pair:
//   S~[n+1] = UA * S[n-1] + UB0 * X[n] + UB1 * X[n+1]   (UA uses only S, the
//                                                        first R entries)
//   Y[n]    = S~_R[n-1]                 + D  * X[n]
//   Y[n+1]  = S~_{R+1}[n-1] + CB * X[n] + D  * X[n+1]
// Each output needs one state with coefficient 1, so it costs one
// multiplication and one addition after its sample arrives. Nothing is
// buffered: every product is formed in the cycle its operand arrives and
// added as soon as it is ready (the maximally fast schedule). With X[n]
// accepted in cycle t:
//   t    : X[n] products                  t+1 : state products, Y[n] (+ q1)
//   t+2  : first adder level, 6 -> 3       t1  : X[n+1] products (t1 >= t+2)
//   t1+1 : 3 + X[n+1] term -> 2, Y[n+1]    t1+2: 2 -> 1, new state
// so the state used by the next pair is ready one cycle after that pair's
// first sample (state arrival skew T_j = 1), as the schedule requires.
//
// Interface: x is sampled when x_valid is high; two samples must be at least
// SAMPLE_PERIOD = 2 cycles apart (longer gaps are allowed: the pipeline waits
// for the second sample of a pair). y is valid in the cycle y_valid is high,
// exactly 2 cycles after the corresponding sample was presented. y_pos gives
// the block position of the output. Asynchronous active-low reset clears the
// state (zero initial state) and restarts at block position 0.
//
// The equations, the schedule bounds and the coefficient values follow the
// source analysis; the word lengths, the handshake, the reset and the
// restriction R <= 5 (which keeps the adder tree within the 2-cycle sample
// period) are this design's choices.
module onarrival_unfolded_filter
  import lti_pkg::*;
#(
  parameter int    R = wdf5_coef_pkg::WDF5_R,
  parameter coef_t UA  [R+2][R] = wdf5_coef_pkg::WDF5_U_A,
  parameter coef_t UB0 [R+2]    = wdf5_coef_pkg::WDF5_U_B0,
  parameter coef_t UB1 [R+2]    = wdf5_coef_pkg::WDF5_U_B1,
  parameter coef_t CB           = wdf5_coef_pkg::WDF5_CB,
  parameter coef_t D            = wdf5_coef_pkg::WDF5_D
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  x_valid,
  input  data_t x,
  output logic  y_valid,
  output logic  y_pos,
  output data_t y
);
  localparam int NS = R + 2;          // states after the transformation
  localparam int SAMPLE_PERIOD = 2;

  if (R < 1 || R > 5) begin : g_bad_r
    $error("onarrival_unfolded_filter: R must be 1..5 for a 2-cycle sample period");
  end

  logic  ph;                          // block position of the next sample
  logic  v0_d1, v0_d2, v1_d1, v1_d2;  // sample of position 0/1 taken 1/2 cycles ago
  data_t s    [NS];                   // state S~
  data_t px0  [NS];                   // UB0 * X[n]
  data_t px0_d, px0_cb;               // D * X[n], CB * X[n]
  data_t ps   [NS][R];                // UA * S products
  data_t l1   [NS][3];                // first adder level
  data_t q1;                          // S~_{R+1} + CB * X[n]
  data_t px1  [NS];                   // UB1 * X[n+1]
  data_t px1_d;                       // D * X[n+1]
  data_t l2   [NS][2];                // second adder level

  wire take0 = x_valid && !ph;
  wire take1 = x_valid &&  ph;

  // control: block position and stage tokens
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph    <= 1'b0;
      v0_d1 <= 1'b0;
      v0_d2 <= 1'b0;
      v1_d1 <= 1'b0;
      v1_d2 <= 1'b0;
    end else begin
      if (x_valid) ph <= ~ph;
      v0_d1 <= take0;
      v0_d2 <= v0_d1;
      v1_d1 <= take1;
      v1_d2 <= v1_d1;
    end
  end

  // datapath stages
  always_ff @(posedge clk) begin
    if (take0) begin
      for (int r = 0; r < NS; r++) px0[r] <= cmul(UB0[r], x);
      px0_d  <= cmul(D, x);
      px0_cb <= cmul(CB, x);
    end
    if (v0_d1) begin
      for (int r = 0; r < NS; r++)
        for (int c = 0; c < R; c++) ps[r][c] <= cmul(UA[r][c], s[c]);
      q1 <= s[R+1] + px0_cb;
    end
    if (v0_d2) begin
      for (int r = 0; r < NS; r++) begin
        data_t t6 [6];
        for (int k = 0; k < 6; k++) t6[k] = '0;
        for (int c = 0; c < R; c++) t6[c] = ps[r][c];
        t6[R] = px0[r];
        for (int j = 0; j < 3; j++) l1[r][j] <= t6[2*j] + t6[2*j+1];
      end
    end
    if (take1) begin
      for (int r = 0; r < NS; r++) px1[r] <= cmul(UB1[r], x);
      px1_d <= cmul(D, x);
    end
    if (v1_d1) begin
      for (int r = 0; r < NS; r++) begin
        l2[r][0] <= l1[r][0] + l1[r][1];
        l2[r][1] <= l1[r][2] + px1[r];
      end
    end
  end

  // state register (zero initial state)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NS; r++) s[r] <= '0;
    end else if (v1_d2) begin
      for (int r = 0; r < NS; r++) s[r] <= l2[r][0] + l2[r][1];
    end
  end

  // outputs: Y[n] one cycle after X[n]'s products, Y[n+1] likewise
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_pos   <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= v0_d1 || v1_d1;
      y_pos   <= v1_d1;
      if (v0_d1)      y <= s[R] + px0_d;
      else if (v1_d1) y <= q1 + px1_d;
    end
  end

  // samples must be at least SAMPLE_PERIOD cycles apart
  a_sample_period : assert property (@(posedge clk) disable iff (!rst_n)
    x_valid |=> !x_valid)
    else $error("onarrival_unfolded_filter: samples closer than %0d cycles", SAMPLE_PERIOD);

endmodule
