// onarrival_lti_harness: drives and checks one onarrival_lti_filter
// configuration (unfolding I, sample period TS, state skew TJ, P inputs,
// Q outputs; by default the fifth-order elliptic filter). Samples come in blocks of I+1,
// exactly TS cycles apart inside a block; between blocks there is either no
// pause (full rate) or a random idle gap. Each output is checked against the
// floating-point state-space model (tolerance TOL; every output), for its block position,
// and for its latency, which must be the same for every block at a position
// and at most TL_MAX cycles; the largest latency seen must equal TL_MAX.
// The filter gets only TS and TL_MAX; the unfolding I and skew TJ its design
// algorithm picks must be the expected ones.
// Raises done when the stream has been checked.
`timescale 1ns/1ps
module onarrival_lti_harness #(
  parameter int I      = 4,    // expected choice of the design algorithm
  parameter int TS     = 1,
  parameter int TJ     = 2,    // expected choice of the design algorithm
  parameter int TL_MAX = 3,
  parameter int NBLK   = 600,
  parameter int TOL    = 64,
  parameter int P      = 1,
  parameter int Q      = 1,
  parameter lti_pkg::coef_t B [wdf5_coef_pkg::WDF5_R*P] = wdf5_coef_pkg::WDF5_B,
  parameter lti_pkg::coef_t C [Q*wdf5_coef_pkg::WDF5_R] = wdf5_coef_pkg::WDF5_C,
  parameter lti_pkg::coef_t D [Q*P] = '{wdf5_coef_pkg::WDF5_D}
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gaps,
  output int   full_rate
);
  import lti_pkg::*;

  localparam int R = wdf5_coef_pkg::WDF5_R;

  localparam int NB = I + 1;
  localparam int PW = $clog2(I + 2);

  logic rst_n = 0;
  logic x_valid = 0;
  data_t x [P] = '{default: '0};
  logic y_valid;
  logic [PW-1:0] y_pos;
  data_t y [Q];

  onarrival_lti_filter #(.P(P), .Q(Q), .TS(TS), .TL(TL_MAX), .B(B), .C(C), .D(D)) dut (.*);

  // floating-point model of S[n] = A S[n-1] + B X[n], Y[n] = C S[n-1] + D X[n]
  real st [R];
  real ey [Q];
  function automatic real cr(lti_pkg::coef_t c);
    return real'(c) / (2.0 ** lti_pkg::CF);
  endfunction
  task automatic model_step(input data_t xv [P]);
    real ns [R];
    for (int qo = 0; qo < Q; qo++) begin
      ey[qo] = 0.0;
      for (int j = 0; j < R; j++) ey[qo] += cr(C[qo*R + j]) * st[j];
      for (int pi = 0; pi < P; pi++) ey[qo] += cr(D[qo*P + pi]) * real'(xv[pi]);
    end
    for (int i = 0; i < R; i++) begin
      ns[i] = 0.0;
      for (int j = 0; j < R; j++) ns[i] += cr(wdf5_coef_pkg::WDF5_A[i][j]) * st[j];
      for (int pi = 0; pi < P; pi++) ns[i] += cr(B[i*P + pi]) * real'(xv[pi]);
    end
    st = ns;
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint in_cycle [$];
  real    exp_real [$];                      // Q entries per sample
  int     exp_pos  [$];
  int     lat_seen [NB];
  int     lat_max = 0;
  real    max_err = 0.0;


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (P=%0d I=%0d TS=%0d) %s at cycle %0d", P, I, TS, what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && x_valid) in_cycle.push_back(cycle);
    if (rst_n && y_valid) begin
      if (in_cycle.size() == 0 || exp_real.size() == 0) check(0, "unexpected output");
      else begin
        longint ic;
        int     lat, ep;
        real    er, err;
        ic  = in_cycle.pop_front();
        ep  = exp_pos.pop_front();
        lat = int'(cycle - ic);
        for (int qo = 0; qo < Q; qo++) begin
          er  = exp_real.pop_front();
          err = real'(y[qo]) - er;
          if (err > max_err) max_err = err;
          if (-err > max_err) max_err = -err;
          check(err < TOL && err > -TOL, "value vs floating-point model");
        end
        if (lat > lat_max) lat_max = lat;
        check(int'(y_pos) == ep, "block position");
        check(lat <= TL_MAX, "latency bound");
        if (lat_seen[ep] < 0) lat_seen[ep] = lat;
        check(lat == lat_seen[ep], "latency constant per position");
      end
    end
  end

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    gaps = 0;
    full_rate = 0;
    // the parameters the design algorithm picked
    check(dut.I == I && dut.TJ == TJ, "design algorithm choice of I and TJ");
    check(dut.LATENCY == TL_MAX, "latency worked out at elaboration");
    foreach (lat_seen[k]) lat_seen[k] = -1;
    foreach (st[i]) st[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < NB; k++) begin
        data_t xv [P];
        for (int pi = 0; pi < P; pi++)
          if (b >= NBLK / 3 && b < NBLK / 2) xv[pi] = (pi == 0) ? 1 <<< 20 : -(1 <<< 19);  // steps
          else xv[pi] = data_t'($signed($urandom_range(0, 2**21)) - 2**20);             // noise
        x_valid <= 1;
        for (int pi = 0; pi < P; pi++) x[pi] <= xv[pi];
        model_step(xv);
        for (int qo = 0; qo < Q; qo++) exp_real.push_back(ey[qo]);
        exp_pos.push_back(k);
        @(posedge clk);
        // x_valid is lowered only for cycles that really are idle
        if (k < NB - 1 && TS > 1) begin
          x_valid <= 0;
          repeat (TS - 1) @(posedge clk);
        end
      end
      // next block: at full rate (TS after the last sample) or after a gap
      if ($urandom_range(0, 3) == 0) begin
        gaps++;
        x_valid <= 0;
        repeat (TS - 1 + $urandom_range(1, 6)) @(posedge clk);
      end else begin
        full_rate++;
        if (TS > 1) begin
          x_valid <= 0;
          repeat (TS - 1) @(posedge clk);
        end
      end
    end
    x_valid <= 0;
    repeat (TL_MAX + 4) @(posedge clk);
    check(exp_real.size() == 0 && exp_pos.size() == 0, "all outputs produced");
    check(lat_max == TL_MAX, "largest latency equals the design latency");
    $display("P=%0d Q=%0d I=%0d TS=%0d TJ=%0d: latency per position:", P, Q, I, TS, TJ);
    foreach (lat_seen[k]) $display("  position %0d: %0d cycles", k, lat_seen[k]);
    $display("P=%0d Q=%0d I=%0d TS=%0d: largest deviation from floating-point model: %f", P, Q, I, TS, max_err);
    done = 1;
  end
endmodule
