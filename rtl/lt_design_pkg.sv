// lt_design_pkg: the design algorithm that picks the parameters of an
// unfolded, minimum-latency, on-arrival realisation from the latency and
// sample period wanted (in cycles, one cycle = one adder delay, multiplier
// delay m cycles, P inputs, R states).
//
//   tj_upper   largest state arrival skew T_j that still gives latency T_L.
//              The latency of such a system is m + ceil(log2(2^(T_j-m) + P)),
//              so T_j must satisfy 2^T_j <= 2^T_L - 2^m P.
//   tj_lower   smallest T_j for which some finite unfolding is feasible at
//              sample period T_S: m + 1 + ceil(log2(P / 2^(T_S-1))).
//   min_unfold smallest unfolding factor i that is feasible for T_S and T_j:
//              ceil(log2((2^m R 2^T_j (2^T_S-1) - 2^m P) /
//                        (2^T_j (2^T_S-1) - 2^m P)) / T_S) - 1.
// Taking the largest allowed T_j keeps i, and so the hardware, smallest.
// All are integer-only constant functions for use in parameter defaults; a
// result of -1 means no feasible choice exists. The formulas are those of
// the source method; their integer evaluation is this package's own.
package lt_design_pkg;

  // smallest integer k (possibly negative) with den * 2^k >= num; num, den > 0
  function automatic int ceil_log2_ratio(input longint num, input longint den);
    int k;
    k = 0;
    if (den >= num) begin
      while (k > -60 && (num << (1 - k)) <= den) k--;
    end else begin
      while (k < 60 && (den << k) < num) k++;
    end
    return k;
  endfunction

  function automatic int tj_upper(input int tl, input int m, input int p);
    longint room;
    int tj;
    room = (longint'(1) << tl) - (longint'(p) << m);
    if (room < 1) return -1;
    tj = 0;
    while ((longint'(1) << (tj + 1)) <= room) tj++;
    return tj;
  endfunction

  function automatic int tj_lower(input int ts, input int m, input int p);
    return m + 1 + ceil_log2_ratio(longint'(p), longint'(1) << (ts - 1));
  endfunction

  function automatic int min_unfold(input int r, input int ts, input int tj,
                                    input int m, input int p);
    longint g, num, den;
    int k;
    g   = (longint'(1) << tj) * ((longint'(1) << ts) - 1);
    num = (longint'(r) << m) * g - (longint'(p) << m);
    den = g - (longint'(p) << m);
    if (den <= 0 || tj < 0) return -1;
    k = 0;
    while (k < 60 && (den << (k * ts)) < num) k++;
    return (k > 0) ? k - 1 : 0;
  endfunction

endpackage
