// tb_min_latency_filter: self-checking test of min_latency_filter (minimum latency form, T_S = 4, T_L = 2) with the
// elliptic example filter's coefficients. A random stream (mostly at the
// minimum sample period of 4 cycles, sometimes with longer gaps, plus a
// step segment) is applied. Each output is checked against the
// floating-point original state-space model (tolerance TOL), for its latency
// (exactly 2 cycles after its sample).
`timescale 1ns/1ps
module tb_min_latency_filter;
  import lti_pkg::*;
  import wdf5_ref_pkg::*;

  localparam int NSAMP   = 3000;
  localparam real TOL    = 64.0;
  localparam int LATENCY = 2;
  localparam int TS      = 4;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  data_t x = '0;
  logic y_valid;
  data_t y;

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0;
  int n_out = 0;

  min_latency_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint exp_cycle [$];
  real    exp_real  [$];
  wdf5_model ref_m = new();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && x_valid) exp_cycle.push_back(cycle + LATENCY);
    if (rst_n && y_valid) begin
      longint ec;
      real er, err;
      if (exp_cycle.size() == 0 || exp_real.size() == 0) check(0, "unexpected output");
      else begin
        ec  = exp_cycle.pop_front();
        er  = exp_real.pop_front();
        err = real'(y) - er;
        if (err > max_err) max_err = err;
        if (-err > max_err) max_err = -err;
        check(cycle == ec, "latency");
        check(err < TOL && err > -TOL, "value vs floating-point model");
        n_out++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gaps_long = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      int gap;
      data_t xv;
      if (n >= 1000 && n < 1400) xv = 1 <<< 20;
      else xv = data_t'($signed($urandom_range(0, 2**21)) - 2**20);
      x_valid <= 1;
      x <= xv;
      exp_real.push_back(ref_m.step(real'(xv)));
      @(posedge clk);
      x_valid <= 0;
      gap = ($urandom_range(0, 7) == 0) ? $urandom_range(TS, TS + 3) : TS;
      if (gap > TS) gaps_long++;
      repeat (gap - 1) @(posedge clk);
    end
    repeat (LATENCY + 4) @(posedge clk);
    check(n_out == NSAMP, "all outputs produced");
    check(gaps_long > 0, "long gaps exercised");
    $display("largest deviation from floating-point model: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
