// tb_mdf2_causal: self-checking test of the b_0 = 0 variant of the modified
// direct form II, plain (mdf2_filter, T_S = 3) and unfolded once
// (mdf2_unfolded_filter, T_S = 2). Both get the elliptic example filter
// delayed by one sample, H'(z) = z^-1 H(z): a'_k = a_k with a'_6 = 0,
// b'_0 = 0 and b'_k = b_(k-1), so N = 6. A zero b_0 selects the unscaled
// structure in both modules. A shared random stream (noise and a step, at the
// slower filter's minimum period of 3 cycles, sometimes with longer gaps) is
// applied; each output must equal the floating-point model's output for the
// previous sample (within TOL), come exactly 2 cycles after its sample, and
// for the unfolded filter carry the right block position.
`timescale 1ns/1ps
module tb_mdf2_causal;
  import lti_pkg::*;
  import wdf5_coef_pkg::*;
  import wdf5_ref_pkg::*;

  localparam int NSAMP   = 3000;
  localparam real TOL    = 64.0;
  localparam int LATENCY = 2;
  localparam int TS      = 3;

  localparam coef_t A_D [6] = '{WDF5_DF_A[0], WDF5_DF_A[1], WDF5_DF_A[2],
                                WDF5_DF_A[3], WDF5_DF_A[4], '0};
  localparam coef_t B_D [7] = '{'0, WDF5_DF_B[0], WDF5_DF_B[1], WDF5_DF_B[2],
                                WDF5_DF_B[3], WDF5_DF_B[4], WDF5_DF_B[5]};

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  data_t x = '0;
  logic  ya_valid, yb_valid, yb_pos;
  data_t ya, yb;

  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err [2] = '{0.0, 0.0};
  int n_out [2] = '{0, 0};

  mdf2_filter #(.N(6), .A_DF(A_D), .B_DF(B_D)) dut_a (
    .clk, .rst_n, .x_valid, .x, .y_valid(ya_valid), .y(ya));
  mdf2_unfolded_filter #(.N(6), .A_DF(A_D), .B_DF(B_D)) dut_b (
    .clk, .rst_n, .x_valid, .x, .y_valid(yb_valid), .y_pos(yb_pos), .y(yb));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint exp_cycle [2][$];
  real    exp_real  [2][$];
  wdf5_model ref_m = new();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic take(input int i, input data_t yv);
    longint ec;
    real er, err;
    if (exp_cycle[i].size() == 0 || exp_real[i].size() == 0) check(0, "unexpected output");
    else begin
      ec  = exp_cycle[i].pop_front();
      er  = exp_real[i].pop_front();
      err = real'(yv) - er;
      if (err > max_err[i]) max_err[i] = err;
      if (-err > max_err[i]) max_err[i] = -err;
      check(cycle == ec, "latency");
      check(err < TOL && err > -TOL, "value vs delayed floating-point model");
      n_out[i]++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && x_valid)
      for (int i = 0; i < 2; i++) exp_cycle[i].push_back(cycle + LATENCY);
    if (rst_n && ya_valid) take(0, ya);
    if (rst_n && yb_valid) begin
      check(yb_pos == n_out[1][0], "block position");
      take(1, yb);
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
    real prev;
    prev = 0.0;
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
      // the delayed filter answers with the model's previous output
      for (int i = 0; i < 2; i++) exp_real[i].push_back(prev);
      prev = ref_m.step(real'(xv));
      @(posedge clk);
      x_valid <= 0;
      gap = ($urandom_range(0, 7) == 0) ? $urandom_range(TS, TS + 3) : TS;
      if (gap > TS) gaps_long++;
      repeat (gap - 1) @(posedge clk);
    end
    repeat (LATENCY + 4) @(posedge clk);
    check(n_out[0] == NSAMP && n_out[1] == NSAMP, "all outputs produced");
    check(gaps_long > 0, "long gaps exercised");
    $display("largest deviation from the delayed model: %f (plain), %f (unfolded)",
             max_err[0], max_err[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
