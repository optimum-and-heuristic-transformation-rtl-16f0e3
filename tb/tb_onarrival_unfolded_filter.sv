// tb_onarrival_unfolded_filter: self-checking test of the once-unfolded,
// minimum-latency, on-arrival filter with the elliptic-filter coefficients.
// A random sample stream (mostly at the 2-cycle sample period, sometimes with
// longer gaps) is applied. Each output is checked
//   * against the floating-point original state-space model (tolerance TOL,
//     which also validates every coefficient of the transformed system),
//   * bit-exactly against a sequential model of the unfolded equations,
//   * for its latency: exactly 2 cycles after its sample, and for its block
//     position.
`timescale 1ns/1ps
module tb_onarrival_unfolded_filter;
  import lti_pkg::*;
  import wdf5_coef_pkg::*;
  import wdf5_ref_pkg::*;

  localparam int NSAMP   = 3000;
  localparam int TOL     = 64;
  localparam int LATENCY = 2;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  data_t x = '0;
  logic y_valid, y_pos;
  data_t y;

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0;

  onarrival_unfolded_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected outputs, in order
  longint exp_cycle [$];
  real    exp_real  [$];
  data_t  exp_bit   [$];
  logic   exp_pos   [$];

  // bit-exact sequential model of the unfolded equations
  data_t ms [7];
  data_t mx0;
  logic  mph = 0;

  wdf5_model ref_m = new();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic accept(input data_t xv);
    data_t yb, ns [7];
    exp_real.push_back(ref_m.step(real'(xv)));
    exp_pos.push_back(mph);
    if (!mph) begin
      yb  = ms[5] + cmul(WDF5_D, xv);
      mx0 = xv;
    end else begin
      yb = ms[6] + cmul(WDF5_CB, mx0) + cmul(WDF5_D, xv);
      for (int r = 0; r < 7; r++) begin
        ns[r] = cmul(WDF5_U_B0[r], mx0) + cmul(WDF5_U_B1[r], xv);
        for (int c = 0; c < 5; c++) ns[r] += cmul(WDF5_U_A[r][c], ms[c]);
      end
      ms = ns;
    end
    exp_bit.push_back(yb);
    mph = ~mph;
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && x_valid) exp_cycle.push_back(cycle + LATENCY);
    if (rst_n && y_valid) begin
      if (exp_cycle.size() == 0) check(0, "unexpected output");
      else begin
        longint ec;
        real    er, err;
        data_t  eb;
        logic   ep;
        ec  = exp_cycle.pop_front();
        er  = exp_real.pop_front();
        eb  = exp_bit.pop_front();
        ep  = exp_pos.pop_front();
        err = real'(y) - er;
        if (err > max_err) max_err = err;
        if (-err > max_err) max_err = -err;
        check(cycle == ec, "latency");
        check(y == eb, "bit-exact value");
        check(err < TOL && err > -TOL, "value vs floating-point model");
        check(y_pos == ep, "block position");
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
    foreach (ms[i]) ms[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      int gap;
      data_t xv;
      if (n >= 1000 && n < 1400) xv = 1 <<< 20;                  // step
      else xv = data_t'($signed($urandom_range(0, 2**21)) - 2**20); // noise
      x_valid <= 1;
      x <= xv;
      accept(xv);
      @(posedge clk);
      x_valid <= 0;
      gap = ($urandom_range(0, 7) == 0) ? $urandom_range(2, 5) : 2;
      if (gap > 2) gaps_long++;
      repeat (gap - 1) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    check(exp_cycle.size() == 0, "all outputs produced");
    check(gaps_long > 0, "long gaps exercised");
    $display("largest deviation from floating-point model: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
