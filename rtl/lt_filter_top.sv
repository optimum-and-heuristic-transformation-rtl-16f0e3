// lt_filter_top: the fifth-order low-pass elliptic wave digital filter
// realised seven ways, each trading latency, sample period and hardware
// differently. All seven compute the same transfer function; they stand side
// by side, each with its own sample stream, sharing clock and reset.
//
//   index        realisation                                  T_S  T_L
//   F_ONARRIVAL  unfolded once + minimum latency + on-arrival  2    2
//   F_MINLAT     minimum latency transformation                4    2
//   F_MDF2       modified direct form II                       3    2
//   F_MDF2U      modified direct form II, unfolded + on-arr.   2    2
//   F_TDF2       transposed direct form II                     3    2
//   F_TDF2U      transposed direct form II, unfolded + on-arr. 2    2
//   F_FAST       unfolded 4 times + minimum latency + on-arr.  1    3
// (cycles, one cycle = one adder delay, multiplier delay m = 1 cycle; the
// original dataflow graph of the filter needs T_L = 7, T_S = 9.)
//
// Interface, per index i: x[i] is taken when x_valid[i] is high; samples
// must be at least T_S cycles apart; for F_FAST the five samples of a block
// must come on consecutive cycles (idle cycles only between blocks). y[i] is
// valid when y_valid[i] is high, exactly T_L cycles after its sample;
// y_pos[i] is the position of the output in its block (0..4 for F_FAST, 0 or
// 1 for the other unfolded realisations, always 0 for the rest).
// Asynchronous active-low reset clears every state (zero initial state).
module lt_filter_top
  import lti_pkg::*, lt_filter_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NF-1:0]   x_valid,
  input  data_t           x       [NF],
  output logic [NF-1:0]   y_valid,
  output logic [POS_W-1:0] y_pos  [NF],
  output data_t           y       [NF]
);

  // block positions of the twice-per-update realisations, widened below
  logic pos_onarrival, pos_mdf2u, pos_tdf2u;

  onarrival_unfolded_filter u_onarrival (
    .clk, .rst_n,
    .x_valid(x_valid[F_ONARRIVAL]), .x(x[F_ONARRIVAL]),
    .y_valid(y_valid[F_ONARRIVAL]), .y_pos(pos_onarrival), .y(y[F_ONARRIVAL]));

  min_latency_filter u_minlat (
    .clk, .rst_n,
    .x_valid(x_valid[F_MINLAT]), .x(x[F_MINLAT]),
    .y_valid(y_valid[F_MINLAT]), .y(y[F_MINLAT]));
  assign y_pos[F_MINLAT] = '0;

  mdf2_filter u_mdf2 (
    .clk, .rst_n,
    .x_valid(x_valid[F_MDF2]), .x(x[F_MDF2]),
    .y_valid(y_valid[F_MDF2]), .y(y[F_MDF2]));
  assign y_pos[F_MDF2] = '0;

  mdf2_unfolded_filter u_mdf2u (
    .clk, .rst_n,
    .x_valid(x_valid[F_MDF2U]), .x(x[F_MDF2U]),
    .y_valid(y_valid[F_MDF2U]), .y_pos(pos_mdf2u), .y(y[F_MDF2U]));

  tdf2_filter u_tdf2 (
    .clk, .rst_n,
    .x_valid(x_valid[F_TDF2]), .x(x[F_TDF2]),
    .y_valid(y_valid[F_TDF2]), .y(y[F_TDF2]));
  assign y_pos[F_TDF2] = '0;

  tdf2_unfolded_filter u_tdf2u (
    .clk, .rst_n,
    .x_valid(x_valid[F_TDF2U]), .x(x[F_TDF2U]),
    .y_valid(y_valid[F_TDF2U]), .y_pos(pos_tdf2u), .y(y[F_TDF2U]));

  data_t fast_x [1], fast_y [1];              // its ports are arrays (P = Q = 1)
  assign fast_x[0]   = x[F_FAST];
  assign y[F_FAST]   = fast_y[0];
  onarrival_lti_filter u_fast (
    .clk, .rst_n,
    .x_valid(x_valid[F_FAST]), .x(fast_x),
    .y_valid(y_valid[F_FAST]), .y_pos(y_pos[F_FAST]), .y(fast_y));

  assign y_pos[F_ONARRIVAL] = POS_W'(pos_onarrival);
  assign y_pos[F_MDF2U]     = POS_W'(pos_mdf2u);
  assign y_pos[F_TDF2U]     = POS_W'(pos_tdf2u);

endmodule
