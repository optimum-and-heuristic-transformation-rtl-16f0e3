// tb_onarrival_mimo: self-checking test of onarrival_lti_filter with two
// inputs and two outputs. The system keeps the elliptic filter's A matrix
// (so it stays stable) and adds a second input column to B, a second output
// row to C and a full 2x2 D. With P = 2 the design algorithm must pick
//   * TS = 1, TL = 4: TJ = 3, I = 4 (one sample pair per cycle);
//   * TS = 2, TL = 3: TJ = 2, I = 1.
// Each configuration runs in its own harness (see onarrival_lti_harness),
// which checks both outputs' values, block positions and latencies.
`timescale 1ns/1ps
module tb_onarrival_mimo;
  import lti_pkg::*;

  localparam int P = 2;
  localparam int Q = 2;
  // B[i*P + p]: column 0 is the example filter's B
  localparam coef_t B2 [10] = '{
    wdf5_coef_pkg::WDF5_B[0], q(1, 3),
    wdf5_coef_pkg::WDF5_B[1], q(0, 0),
    wdf5_coef_pkg::WDF5_B[2], q(-3, 5),
    wdf5_coef_pkg::WDF5_B[3], q(1, 4),
    wdf5_coef_pkg::WDF5_B[4], q(0, 0)};
  // C[q*R + j]: row 0 is the example filter's C
  localparam coef_t C2 [10] = '{
    wdf5_coef_pkg::WDF5_C[0], wdf5_coef_pkg::WDF5_C[1], wdf5_coef_pkg::WDF5_C[2],
    wdf5_coef_pkg::WDF5_C[3], wdf5_coef_pkg::WDF5_C[4],
    q(0, 0), q(1, 2), q(0, 0), q(-1, 3), q(5, 4)};
  localparam coef_t D2 [4] = '{wdf5_coef_pkg::WDF5_D, q(1, 3), q(-1, 4), q(0, 0)};

  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int   checks_a, failures_a, gaps_a, full_a;
  int   checks_b, failures_b, gaps_b, full_b;

  onarrival_lti_harness #(.I(4), .TS(1), .TJ(3), .TL_MAX(4), .NBLK(400),
                          .P(P), .Q(Q), .B(B2), .C(C2), .D(D2)) h_fast (
    .clk, .done(done_a), .checks(checks_a), .failures(failures_a),
    .gaps(gaps_a), .full_rate(full_a));
  onarrival_lti_harness #(.I(1), .TS(2), .TJ(2), .TL_MAX(3), .NBLK(400),
                          .P(P), .Q(Q), .B(B2), .C(C2), .D(D2)) h_lat (
    .clk, .done(done_b), .checks(checks_b), .failures(failures_b),
    .gaps(gaps_b), .full_rate(full_b));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (2) @(posedge clk);
    wait (done_a && done_b);
    checks   = checks_a + checks_b + 4;
    failures = failures_a + failures_b;
    if (gaps_a == 0) failures++;
    if (full_a == 0) failures++;
    if (gaps_b == 0) failures++;
    if (full_b == 0) failures++;
    $display("blocks at full rate: %0d and %0d, after idle gaps: %0d and %0d",
             full_a, full_b, gaps_a, gaps_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
