// tb_lt_filter_top: end-to-end test of lt_filter_top at its default
// parameters. The same input sequence (random noise, a step, a negative step)
// is fed to all seven realisations, each at its own pace: mostly at its
// minimum sample period, sometimes with longer gaps (for the realisation that
// takes five samples on consecutive cycles, only between blocks). Halfway through, the design is
// reset and the sequence restarts, so the zero-initial-state restart and the
// return to block position 0 are exercised. Every output is checked against
// a floating-point model of the original filter, for its latency and, for
// the unfolded realisations, for its block position. Each mechanism (sample
// at the minimum period, longer gap, outputs at every block position of an
// unfolded realisation, restart after reset) is counted per realisation and
// a failure is counted for any that never happened. NSAMP is a multiple of
// every block size, so each stream ends on a block boundary.
`timescale 1ns/1ps
module tb_lt_filter_top;
  import lti_pkg::*;
  import lt_filter_pkg::*;
  import wdf5_ref_pkg::*;

  localparam int NSAMP = 1500;            // samples per half
  localparam real TOL [NF] = '{64.0, 64.0, 256.0, 256.0, 64.0, 64.0, 64.0};

  logic clk = 0, rst_n = 0;
  logic [NF-1:0] x_valid = '0;
  data_t x [NF];
  logic [NF-1:0] y_valid;
  logic [POS_W-1:0] y_pos [NF];
  data_t y [NF];

  int checks = 0, failures = 0;
  longint cycle = 0;

  lt_filter_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  data_t xin  [NSAMP];
  real   yref [NSAMP];

  longint exp_cycle [NF][$];
  int     n_out     [NF];
  int     n_min_gap [NF], n_long_gap [NF], n_pos [NF][5], n_restart [NF];
  real    max_err   [NF];

  task automatic check(input bit ok, input string what, input int f);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (realisation %0d) at cycle %0d", what, f, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int f = 0; f < NF; f++) begin
        if (x_valid[f]) exp_cycle[f].push_back(cycle + LATENCY[f]);
        if (y_valid[f]) begin
          longint ec;
          real err;
          if (exp_cycle[f].size() == 0 || n_out[f] >= NSAMP) check(0, "unexpected output", f);
          else begin
            ec  = exp_cycle[f].pop_front();
            err = real'(y[f]) - yref[n_out[f]];
            if (err > max_err[f]) max_err[f] = err;
            if (-err > max_err[f]) max_err[f] = -err;
            check(cycle == ec, "latency", f);
            check(err < TOL[f] && err > -TOL[f], "value", f);
            check(int'(y_pos[f]) == n_out[f] % BLOCK[f], "block position", f);
            if (int'(y_pos[f]) < 5) n_pos[f][y_pos[f]]++;
            n_out[f]++;
          end
        end
      end
    end
  end

  // per-realisation sample scheduler: one sample every T_S cycles or more
  logic   driving = 1'b0;
  int     n_in [NF];
  int     wait_cnt [NF];

  always @(posedge clk) begin
    for (int f = 0; f < NF; f++) begin
      if (driving && n_in[f] < NSAMP && wait_cnt[f] == 0) begin
        int gap;
        x_valid[f] <= 1'b1;
        x[f]       <= xin[n_in[f]];
        n_in[f]    <= n_in[f] + 1;
        gap = ($urandom_range(0, 5) == 0) ? $urandom_range(SAMPLE_PERIOD[f] + 1, SAMPLE_PERIOD[f] + 4)
                                          : SAMPLE_PERIOD[f];
        if (STRICT_BLOCK[f] && (n_in[f] + 1) % BLOCK[f] != 0) gap = SAMPLE_PERIOD[f];
        if (n_in[f] + 1 < NSAMP) begin
          if (gap == SAMPLE_PERIOD[f]) n_min_gap[f]++; else n_long_gap[f]++;
        end
        wait_cnt[f] <= gap - 1;
      end else begin
        x_valid[f] <= 1'b0;
        if (wait_cnt[f] != 0) wait_cnt[f] <= wait_cnt[f] - 1;
      end
    end
  end

  task automatic run_half(input int half);
    foreach (n_out[f]) n_out[f] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (n_in[f]) begin
      n_in[f] = 0;
      wait_cnt[f] = 0;
    end
    driving = 1'b1;
    wait (n_in.sum() == NF * NSAMP);
    driving = 1'b0;
    repeat (8) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      check(n_out[f] == NSAMP, "all outputs produced", f);
      if (half == 1 && n_out[f] == NSAMP) n_restart[f]++;
    end
    rst_n <= 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdf5_model m;
    m = new();
    for (int n = 0; n < NSAMP; n++) begin
      if (n >= 500 && n < 800)       xin[n] = 1 <<< 20;
      else if (n >= 800 && n < 1000) xin[n] = -(1 <<< 20);
      else xin[n] = data_t'($signed($urandom_range(0, 2**21)) - 2**20);
      yref[n] = m.step(real'(xin[n]));
    end
    foreach (x[f]) x[f] = '0;
    foreach (max_err[f]) max_err[f] = 0.0;
    run_half(0);
    run_half(1);
    for (int f = 0; f < NF; f++) begin
      realisation_e r;
      r = realisation_e'(f);
      $display("%-12s max dev %8.3f  min-period samples %0d  long gaps %0d  outputs per position %0d %0d %0d %0d %0d  restarts %0d",
               r.name(), max_err[f], n_min_gap[f], n_long_gap[f],
               n_pos[f][0], n_pos[f][1], n_pos[f][2], n_pos[f][3], n_pos[f][4], n_restart[f]);
      check(n_min_gap[f] > 0, "mechanism: minimum sample period", f);
      check(n_long_gap[f] > 0, "mechanism: longer gap", f);
      check(n_restart[f] > 0, "mechanism: restart after reset", f);
      for (int k = 0; k < BLOCK[f]; k++)
        check(n_pos[f][k] > 0, "mechanism: output at every block position (on-arrival)", f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
