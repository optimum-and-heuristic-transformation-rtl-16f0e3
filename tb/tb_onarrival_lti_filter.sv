// tb_onarrival_lti_filter: self-checking test of the general on-arrival
// minimum-latency filter in two configurations of the elliptic example:
//   * the default, maximum-throughput point: one sample per cycle (TS = 1),
//     state skew TJ = 2, unfolded I = 4 times, latency 3 cycles;
//   * I = 1, TS = 2, TJ = 1: the minimum-latency point, latency 2 cycles.
// Each configuration runs in its own harness (see onarrival_lti_harness),
// which checks values, block positions and latencies.
`timescale 1ns/1ps
module tb_onarrival_lti_filter;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int   checks_a, failures_a, gaps_a, full_a;
  int   checks_b, failures_b, gaps_b, full_b;

  onarrival_lti_harness #(.I(4), .TS(1), .TJ(2), .TL_MAX(3)) h_fast (
    .clk, .done(done_a), .checks(checks_a), .failures(failures_a),
    .gaps(gaps_a), .full_rate(full_a));
  onarrival_lti_harness #(.I(1), .TS(2), .TJ(1), .TL_MAX(2)) h_lat (
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
    // both block spacings must have been exercised in both configurations
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
