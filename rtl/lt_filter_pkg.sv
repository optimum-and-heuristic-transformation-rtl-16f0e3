// lt_filter_pkg: the realisations gathered in lt_filter_top, their indices
// and their timing (sample period T_S and latency T_L in cycles, m = 1).
package lt_filter_pkg;

  typedef enum int {
    F_ONARRIVAL = 0,   // optimum: unfolded once + minimum latency + on-arrival
    F_MINLAT    = 1,   // minimum latency transformation only
    F_MDF2      = 2,   // heuristic #1: modified direct form II
    F_MDF2U     = 3,   // heuristic #2: #1 unfolded once + on-arrival
    F_TDF2      = 4,   // heuristic #3: transposed direct form II
    F_TDF2U     = 5,   // heuristic #4: #3 unfolded once + on-arrival
    F_FAST      = 6    // optimum at maximum throughput: unfolded 4 times
  } realisation_e;

  localparam int NF    = 7;
  localparam int POS_W = 3;   // width of a block position

  localparam int SAMPLE_PERIOD [NF] = '{2, 4, 3, 2, 3, 2, 1};
  localparam int LATENCY       [NF] = '{2, 2, 2, 2, 2, 2, 3};
  // samples per block (outputs carry their position in it)
  localparam int BLOCK         [NF] = '{2, 1, 1, 2, 1, 2, 5};
  // samples of a block must come exactly T_S apart (idle cycles only
  // between blocks); otherwise any spacing of at least T_S is allowed
  localparam bit STRICT_BLOCK  [NF] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};

endpackage
