// min_latency_filter: single-input single-output LTI filter in minimum latency
// form. Besides the R original states S it keeps one redundant state
// S~ = C S, updated with the extra coefficient row C A and input coefficient
// C B:
//   S[n]  = A S[n-1]  + B  X[n]
//   S~[n] = CA S[n-1] + CB X[n]
//   Y[n]  = S~[n-1]   + D  X[n]
// The output thus depends on one state with coefficient 1, so it is ready one
// multiplication plus one addition (T_L = m + 1 = 2 cycles) after its sample.
// The state update is computed as a pipelined, maximally balanced adder tree
// over R + 1 products, giving a sample period T_S = m + ceil(log2(R + 1))
// cycles: 4 cycles for the default elliptic filter (R = 5).
//
// Timing, with x presented (x_valid high) in cycle t: all products are
// registered at the end of t; y is registered at the end of t+1 (y_valid high
// in cycle t+2); tree level k is registered at the end of t+1+k, the last one
// directly into the state, which is ready in cycle t + T_S. A sample may be
// presented every T_S cycles or more rarely. Asynchronous active-low reset
// clears all state (zero initial state).
//
// The state-space structure, the coefficients and T_L / T_S follow the source
// analysis; word lengths, handshake and reset are this design's choices. Zero
// coefficients are multiplied like any other, as in the analysis of arbitrary
// coefficient matrices.
module min_latency_filter
  import lti_pkg::*;
#(
  parameter int    R = wdf5_coef_pkg::WDF5_R,
  parameter coef_t A  [R][R] = wdf5_coef_pkg::WDF5_A,
  parameter coef_t B  [R]    = wdf5_coef_pkg::WDF5_B,
  parameter coef_t CA [R]    = wdf5_coef_pkg::WDF5_CA,
  parameter coef_t CB        = wdf5_coef_pkg::WDF5_CB,
  parameter coef_t D         = wdf5_coef_pkg::WDF5_D
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  x_valid,
  input  data_t x,
  output logic  y_valid,
  output data_t y
);
  localparam int NS = R + 1;                 // states incl. the redundant one
  localparam int L  = $clog2(R + 1);         // adder tree levels
  localparam int W  = 2 ** L;                // padded tree width
  localparam int SAMPLE_PERIOD = MULT_CYCLES + L;

  data_t s   [NS];
  data_t ps  [NS][R];                        // state products
  data_t px  [NS];                           // input products
  data_t pd;                                 // D * x
  data_t lv  [L][NS][W/2];                   // tree levels (last unused)
  logic [L:0] vd;                            // stage tokens
  int unsigned busy;                         // cycles until next sample allowed

  function automatic coef_t arow(int r, int c);
    return (r < R) ? A[r][c] : CA[c];
  endfunction

  function automatic coef_t bcol(int r);
    return (r < R) ? B[r] : CB;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NS; r++) begin
        s[r]  <= '0;
        px[r] <= '0;
        for (int c = 0; c < R; c++) ps[r][c] <= '0;
        for (int k = 0; k < L; k++)
          for (int j = 0; j < W/2; j++) lv[k][r][j] <= '0;
      end
      pd      <= '0;
      vd      <= '0;
      y       <= '0;
      y_valid <= 1'b0;
      busy    <= 0;
    end else begin
      vd <= {vd[L-1:0], x_valid};
      if (x_valid) busy <= SAMPLE_PERIOD - 1;
      else if (busy != 0) busy <= busy - 1;
      // multiplications
      if (x_valid) begin
        for (int r = 0; r < NS; r++) begin
          px[r] <= cmul(bcol(r), x);
          for (int c = 0; c < R; c++) ps[r][c] <= cmul(arow(r, c), s[c]);
        end
        pd <= cmul(D, x);
      end
      // output: redundant state plus D * x
      y_valid <= vd[0];
      if (vd[0]) y <= s[R] + pd;
      // adder tree, one level per cycle, last level into the state
      for (int k = 0; k < L; k++) begin
        if (vd[k]) begin
          for (int r = 0; r < NS; r++) begin
            for (int j = 0; j < (W >> (k + 1)); j++) begin
              data_t sum;
              if (k == 0) begin
                data_t t0, t1;
                t0 = (2*j     < R) ? ps[r][2*j]     : (2*j     == R) ? px[r] : '0;
                t1 = (2*j + 1 < R) ? ps[r][2*j + 1] : (2*j + 1 == R) ? px[r] : '0;
                sum = t0 + t1;
              end else begin
                sum = lv[k-1][r][2*j] + lv[k-1][r][2*j + 1];
              end
              if (k == L - 1) s[r] <= sum;
              else lv[k][r][j] <= sum;
            end
          end
        end
      end
    end
  end

  // samples must be at least SAMPLE_PERIOD cycles apart
  always_ff @(posedge clk) begin
    if (rst_n && x_valid)
      a_sample_period : assert (busy == 0)
        else $error("min_latency_filter: samples closer than %0d cycles", SAMPLE_PERIOD);
  end

endmodule
