// onarrival_lti_filter: general form of the optimum latency/sample-period
// transformation for an LTI system with P inputs and Q outputs
//   S[n] = A S[n-1] + B X[n],  Y[n] = C S[n-1] + D X[n]   (R states)
// for any unfolding factor I, sample period TS and state arrival skew TJ.
// Defaults: the fifth-order elliptic example filter at the maximum-throughput
// point, TS = 1 cycle, TJ = 2, I = 4 (five samples per state update), which
// gives latency T_L = 3 cycles (m = 1).
//
// Transformation. The system is unfolded I times and put in minimum latency
// form: the state S~ = [S; C S; C A S; ...; C A^I S] (R + (I + 1) Q entries) is
// updated once per block of I + 1 samples X[n..n+I]:
//   S~[n+I]   rows: A^(I+1) S + sum_k A^(I-k) B X[n+k]              (S part)
//                   C A^(q+I+1) S + sum_k C A^(q+I-k) B X[n+k]      (row C A^q S)
//   Y[n+k]  = S~_(R+k)[n-1] + sum_(j<k) C A^(k-1-j) B X[n+j] + D X[n+k]
// so each output needs exactly one state, with coefficient 1 (with several
// outputs, C A^q S holds one entry per output). All
// coefficients are computed at elaboration from A, B, C, D (matrix powers in
// the coefficient format; products are rounded to 40 fraction bits).
//
// On-arrival, maximally fast schedule. Nothing is buffered. Relative to the
// cycle t in which a block's first sample is presented: sample k is presented
// in cycle t + k*TS and its products are registered at its end; the state of
// the previous block is read in cycle t + TJ and its products registered at
// its end. Every row (each state entry and each output) keeps a pool of
// partial sums, one register set per cycle offset: in each cycle the pool
// and the terms that have just become ready are added in pairs (an odd one is
// carried). When no more terms will come and at most two remain, their sum
// is written to the state register or to the output. The pool sizes, the
// completion cycles and hence the latency are computed at elaboration; an
// elaboration error is raised when the state would miss its deadline
// t + (I+1)*TS + TJ (the feasibility condition) or two outputs would collide.
//
// Interface: the P inputs x are taken together when x_valid is high. Within
// a block the samples must come exactly TS cycles apart; blocks may be
// separated by idle cycles. The stream must end on a block boundary for the
// last block's outputs to appear. y (all Q outputs) and y_valid come
// LATENCY(k) = (completion offset + 1 - k*TS) cycles after their sample;
// y_pos is its position k in the block.
// Asynchronous active-low reset clears the state (zero initial state) and
// restarts at block position 0.
//
// Parameters: TS and TL are the sample period and latency wanted; TJ and I
// default to the values the design algorithm picks for them (see
// lt_design_pkg): the largest skew that meets TL, then the smallest feasible
// unfolding. For TS = 1, TL = 3 that is TJ = 2, I = 4; for TS = 2, TL = 2 it
// is TJ = 1, I = 1. Elaboration stops with an error if the choice is
// infeasible or the schedule's latency exceeds TL.
//
// The transformation, the feasibility/latency bounds, the design algorithm
// and the default TS = 1, TL = 3 (the maximum-throughput point of the example
// filter) are the source analysis'; the pool-based schedule, the handshake,
// word lengths and reset are this design's choices. B, C and D are passed
// flat (see below); the defaults are the single-input, single-output example.
module onarrival_lti_filter
  import lti_pkg::*;
#(
  parameter int    R  = wdf5_coef_pkg::WDF5_R,
  parameter int    P  = 1,                     // inputs
  parameter int    Q  = 1,                     // outputs
  parameter int    TS = 1,                     // sample period wanted
  parameter int    TL = 3,                     // latency wanted
  // state arrival skew and unfolding factor, chosen by the design algorithm
  parameter int    TJ = lt_design_pkg::tj_upper(TL, MULT_CYCLES, P),
  parameter int    I  = lt_design_pkg::min_unfold(R, TS, TJ, MULT_CYCLES, P),
  parameter coef_t A [R][R] = wdf5_coef_pkg::WDF5_A,
  // B, C, D are flat, row-major: B[i*P + p], C[q*R + j], D[q*P + p]
  parameter coef_t B [R*P]  = wdf5_coef_pkg::WDF5_B,
  parameter coef_t C [Q*R]  = wdf5_coef_pkg::WDF5_C,
  parameter coef_t D [Q*P]  = '{wdf5_coef_pkg::WDF5_D}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,
  input  data_t                  x [P],
  output logic                   y_valid,
  output logic [$clog2((I < 0 ? 0 : I) + 2)-1:0] y_pos,
  output data_t                  y [Q]
);
  localparam int NB   = (I < 0) ? 1 : I + 1;   // samples per block (sizes stay legal
                                               // until the error below)
  localparam int NSS  = R + NB * Q;            // states after transformation
  localparam int NR   = NSS + NB * Q;          // rows: states, then outputs
  localparam int NX   = NB * P;                // input products per row
  localparam int BP   = NB * TS;               // block period
  localparam int CMAX = BP + TJ + R + NB + 4;  // schedule horizon (offsets)
  localparam int LMAX = NX + R + 2;            // max terms in one cycle
  localparam int PW   = $clog2(NB + 1);

  // ---------------------------------------------------------------- coefficients
  // (matrices are kept flat, element [i][j] at index i*cols + j)
  typedef coef_t mat_t  [R*R];
  typedef coef_t vec_t  [R];
  typedef coef_t rows_t [NR*R];                // state-product coefficients
  typedef coef_t xcf_t  [NR*NX];               // coefficient of X_p[n+k] per row,
                                               // at (r*NB + k)*P + p

  function automatic mat_t matmul(mat_t a, mat_t b);
    mat_t p;
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++) begin
        p[i*R + j] = '0;
        for (int k = 0; k < R; k++) p[i*R + j] += cprod(a[i*R + k], b[k*R + j]);
      end
    return p;
  endfunction

  // powers A^0 .. A^(2I+1), computed once: A^e is at index e*R*R + i*R + j
  typedef coef_t pow_t [2*NB*R*R];
  function automatic pow_t calc_pow();
    pow_t  t;
    mat_t  m, af;
    for (int i = 0; i < R; i++)
      for (int j = 0; j < R; j++) begin
        m[i*R + j]  = (i == j) ? q(1, 0) : '0;
        af[i*R + j] = A[i][j];
      end
    for (int e = 0; e < 2 * NB; e++) begin
      for (int i = 0; i < R*R; i++) t[e*R*R + i] = m[i];
      m = matmul(m, af);
    end
    return t;
  endfunction
  localparam pow_t APOW = calc_pow();

  function automatic mat_t matpow(int p);
    mat_t m;
    for (int i = 0; i < R*R; i++) m[i] = APOW[p*R*R + i];
    return m;
  endfunction

  function automatic vec_t c_times(int qo, mat_t m);   // row qo of C, times m
    vec_t v;
    for (int j = 0; j < R; j++) begin
      v[j] = '0;
      for (int k = 0; k < R; k++) v[j] += cprod(C[qo*R + k], m[k*R + j]);
    end
    return v;
  endfunction

  function automatic vec_t times_b(mat_t m, int pi);   // m times column pi of B
    vec_t v;
    for (int i = 0; i < R; i++) begin
      v[i] = '0;
      for (int k = 0; k < R; k++) v[i] += cprod(m[i*R + k], B[k*P + pi]);
    end
    return v;
  endfunction

  function automatic coef_t c_dot(int qo, vec_t v);    // row qo of C, times v
    coef_t s;
    s = '0;
    for (int k = 0; k < R; k++) s += cprod(C[qo*R + k], v[k]);
    return s;
  endfunction

  function automatic rows_t calc_sc();
    rows_t rc;
    mat_t  m;
    vec_t  v;
    m = matpow(I + 1);
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) rc[r*R + c] = m[r*R + c];
    for (int qq = 0; qq < NB; qq++)
      for (int qo = 0; qo < Q; qo++) begin
        v = c_times(qo, matpow(qq + I + 1));
        for (int c = 0; c < R; c++) rc[(R + qq*Q + qo)*R + c] = v[c];
      end
    for (int r = NSS; r < NR; r++) for (int c = 0; c < R; c++) rc[r*R + c] = '0;
    return rc;
  endfunction

  function automatic xcf_t calc_xc();
    xcf_t xc;
    vec_t v;
    for (int i = 0; i < NR*NX; i++) xc[i] = '0;
    for (int k = 0; k < NB; k++)
      for (int pi = 0; pi < P; pi++) begin
        v = times_b(matpow(I - k), pi);
        for (int r = 0; r < R; r++) xc[(r*NB + k)*P + pi] = v[r];
        for (int qq = 0; qq < NB; qq++)
          for (int qo = 0; qo < Q; qo++)
            xc[((R + qq*Q + qo)*NB + k)*P + pi] = c_dot(qo, times_b(matpow(qq + I - k), pi));
      end
    for (int k = 0; k < NB; k++)
      for (int qo = 0; qo < Q; qo++)
        for (int pi = 0; pi < P; pi++) begin
          for (int j = 0; j < k; j++)
            xc[((NSS + k*Q + qo)*NB + j)*P + pi] = c_dot(qo, times_b(matpow(k - 1 - j), pi));
          xc[((NSS + k*Q + qo)*NB + k)*P + pi] = D[qo*P + pi];
        end
    return xc;
  endfunction

  localparam rows_t SC = calc_sc();
  localparam xcf_t  XC = calc_xc();

  // ---------------------------------------------------------------- schedule
  // terms of row r that become ready in cycle offset c
  function automatic bit x_arr(int r, int k, int c);   // P products of X[n+k]
    return (c == k * TS + 1) && (r < NSS || k <= (r - NSS) / Q);
  endfunction
  function automatic bit s_arr(int r, int c);          // R state products
    return (r < NSS) && (c == TJ + 1);
  endfunction
  function automatic bit u_arr(int r, int c);          // unit state term
    return (r >= NSS) && (c == TJ);
  endfunction
  function automatic int n_arr(int r, int c);
    int n;
    n = u_arr(r, c) ? 1 : 0;
    for (int k = 0; k < NB; k++) if (x_arr(r, k, c)) n += P;
    if (s_arr(r, c)) n += R;
    return n;
  endfunction
  function automatic int last_arr(int r);
    int l;
    l = 0;
    for (int c = 0; c < CMAX; c++) if (n_arr(r, c) > 0) l = c;
    return l;
  endfunction

  typedef int pool_t [NR*(CMAX+1)];
  typedef int fin_t  [NR];

  // number of pool entries entering each offset
  function automatic pool_t calc_pool();
    pool_t p;
    for (int r = 0; r < NR; r++) begin
      p[r*(CMAX+1)] = 0;
      for (int c = 0; c < CMAX; c++) begin
        int n;
        n = p[r*(CMAX+1) + c] + n_arr(r, c);
        if (c >= last_arr(r) && n <= 2) p[r*(CMAX+1) + c + 1] = 0;
        else p[r*(CMAX+1) + c + 1] = (n + 1) / 2;
      end
    end
    return p;
  endfunction
  localparam pool_t PS = calc_pool();
  function automatic int pool_in(int r, int c);
    return PS[r*(CMAX+1) + c];
  endfunction

  // offset at which each row's result is written
  function automatic fin_t calc_fin();
    fin_t f;
    for (int r = 0; r < NR; r++) begin
      f[r] = -1;
      for (int c = CMAX - 1; c >= 0; c--)
        if (c >= last_arr(r) && pool_in(r, c) + n_arr(r, c) <= 2 && pool_in(r, c) + n_arr(r, c) > 0) f[r] = c;
    end
    return f;
  endfunction
  localparam fin_t FIN = calc_fin();

  function automatic bit feasible();
    bit ok;
    ok = 1'b1;
    for (int r = 0; r < NSS; r++) if (FIN[r] < 0 || FIN[r] + 1 > BP + TJ) ok = 1'b0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < CMAX; c++) if (pool_in(r, c) + n_arr(r, c) > LMAX) ok = 1'b0;
    for (int k = 0; k < NB; k++) begin
      for (int qo = 0; qo < Q; qo++)
        if (FIN[NSS + k*Q + qo] < 0 || FIN[NSS + k*Q + qo] != FIN[NSS + k*Q]) ok = 1'b0;
      for (int j = 0; j < NB; j++)
        if (j != k && (FIN[NSS + k*Q] == FIN[NSS + j*Q] || FIN[NSS + k*Q] - FIN[NSS + j*Q] >= BP)) ok = 1'b0;
    end
    return ok;
  endfunction

  // latency actually reached: output k leaves FIN + 1 cycles after the
  // block's first sample, its own sample came k*TS cycles after that one
  function automatic int max_latency();
    int l;
    l = 0;
    for (int k = 0; k < NB; k++)
      if (FIN[NSS + k*Q] + 1 - k * TS > l) l = FIN[NSS + k*Q] + 1 - k * TS;
    return l;
  endfunction
  localparam int LATENCY = max_latency();

  if (P < 1 || Q < 1 || TS < 1 || TJ < 0 || I < 0) begin : g_bad_par
    $error("onarrival_lti_filter: need P, Q, TS >= 1, TJ >= 0, I >= 0 (no feasible choice for TL = %0d)", TL);
  end
  if (TJ < lt_design_pkg::tj_lower(TS, MULT_CYCLES, P)) begin : g_tj_low
    $error("onarrival_lti_filter: TJ = %0d too small for TS = %0d at any unfolding", TJ, TS);
  end
  if (!feasible()) begin : g_infeasible
    $error("onarrival_lti_filter: schedule infeasible for these TS, TJ, I");
  end
  if (LATENCY > TL) begin : g_latency
    $error("onarrival_lti_filter: latency %0d exceeds TL = %0d", LATENCY, TL);
  end

  // ---------------------------------------------------------------- datapath
  logic [PW-1:0] kpos;                       // position of the next sample
  logic [CMAX:0] tok;                        // block at offset c (tok[0]: first sample now)
  data_t s    [NSS];                         // transformed state
  data_t px   [NX][NR];                      // X_p[n+k] products per row (k*P + p)
  data_t ps   [NSS][R];                      // state products
  logic  act  [CMAX+1];                      // offset c is being processed
  logic  [NB-1:0] y_done;                    // output row k finishes this cycle
  data_t y_sum [NB][Q];

  wire first = x_valid && (kpos == '0);

  // offset c is handled while tok[c-1] is set (c >= 1); offset 0 only ever
  // holds the unit term when TJ = 0
  always_comb begin
    act[0] = first;
    for (int c = 1; c <= CMAX; c++) act[c] = tok[c-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kpos <= '0;
      tok  <= '0;
    end else begin
      if (x_valid) kpos <= (kpos == PW'(NB - 1)) ? '0 : kpos + 1'b1;
      tok <= {tok[CMAX-1:0], first};
    end
  end

  // products of the arriving sample (its position selects the register)
  always_ff @(posedge clk) begin
    if (x_valid)
      for (int k = 0; k < NB; k++)
        if (kpos == PW'(k))
          for (int pi = 0; pi < P; pi++)
            for (int r = 0; r < NR; r++) px[k*P + pi][r] <= cmul(XC[(r*NB + k)*P + pi], x[pi]);
  end

  // state products, read at offset TJ
  always_ff @(posedge clk) begin
    if (act[TJ])
      for (int r = 0; r < NSS; r++)
        for (int c = 0; c < R; c++) ps[r][c] <= cmul(SC[r*R + c], s[c]);
  end

  for (genvar r = 0; r < NR; r++) begin : g_row
    data_t fin_sum;                          // row result, at offset FIN[r]
    for (genvar c = 0; c < CMAX; c++) begin : g_off
      localparam int NIN = pool_in(r, c);    // pool entries entering offset c
      localparam int NT  = NIN + n_arr(r, c);
      data_t lst [LMAX];                     // the terms present at offset c
      data_t pl  [LMAX/2];                   // pool entering offset c + 1
      always_comb begin
        int n;
        n = 0;
        for (int j = 0; j < LMAX; j++) lst[j] = '0;
        for (int j = 0; j < NIN; j++) begin lst[n] = (c > 0) ? g_row[r].g_off[(c > 0) ? c - 1 : 0].pl[j] : '0; n++; end
        if (u_arr(r, c)) begin lst[n] = s[R + r - NSS]; n++; end
        for (int k = 0; k < NB; k++)
          if (x_arr(r, k, c)) for (int pi = 0; pi < P; pi++) begin lst[n] = px[k*P + pi][r]; n++; end
        if (s_arr(r, c)) for (int cc = 0; cc < R; cc++) begin lst[n] = ps[(r < NSS) ? r : 0][cc]; n++; end
      end
      if (c == FIN[r]) begin : g_fin
        assign fin_sum = lst[0] + lst[1];
      end
      // pairwise additions; the pool of offset c + 1 is registered here
      always_ff @(posedge clk) begin
        if (act[c] && c != FIN[r] && NT > 0)
          for (int j = 0; j < LMAX / 2; j++)
            if (2 * j < NT) pl[j] <= lst[2*j] + ((2 * j + 1 < NT) ? lst[2*j + 1] : '0);
      end
    end
    if (r < NSS) begin : g_state
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) s[r] <= '0;
        else if (act[FIN[r]]) s[r] <= fin_sum;
      end
    end else begin : g_out
      if ((r - NSS) % Q == 0) begin : g_done
        assign y_done[(r - NSS) / Q] = act[FIN[r]];
      end
      assign y_sum[(r - NSS) / Q][(r - NSS) % Q] = fin_sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_pos   <= '0;
      y       <= '{default: '0};
    end else begin
      y_valid <= |y_done;
      for (int k = 0; k < NB; k++)
        if (y_done[k]) begin
          y     <= y_sum[k];
          y_pos <= PW'(k);
        end
    end
  end

  // within a block, samples must be exactly TS cycles apart
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int k = 1; k < NB; k++)
        if (tok[k * TS - 1])
          a_block_timing : assert (x_valid && kpos == PW'(k))
            else $error("onarrival_lti_filter: sample %0d of a block not at its slot", k);
    end
  end

endmodule
