// wdf5_coef_pkg: coefficient sets of the fifth-order low-pass elliptic wave
// digital filter (P = 1 input, Q = 1 output, R = 5 states) used as the running
// example of every realisation in this design.
//
//  * WDF5_A/B/C/D      the filter's state-space form S[n] = A S[n-1] + B X[n],
//                      Y[n] = C S[n-1] + D X[n].
//  * WDF5_CA, WDF5_CB  the extra row of the minimum latency form: the added
//                      state is C*S, updated with C*A and C*B.
//  * WDF5_U_*          the system unfolded once (two samples per state update)
//                      with the minimum latency transformation: states
//                      [S; C S; C A S], update matrix [A^2; C A^2; C A^3]
//                      (only the first five columns are non-zero), input
//                      columns [A B; C A B; C A^2 B] for X[n] and
//                      [B; C B; C A B] for X[n+1].
//  * WDF5_DF_A/B       transfer function H(z) = C (zI - A)^-1 B + D written as
//                      (sum b_k z^-k) / (1 - sum a_k z^-k), k = 0..5: the
//                      coefficients of the direct-form realisations. Derived
//                      from the state-space form above (a_k are minus the
//                      characteristic polynomial coefficients of A, b_k those
//                      of C adj(zI - A) B + D det(zI - A)).
// All values are exact dyadic fractions num / 2^k, written as q(num, k).
package wdf5_coef_pkg;
  import lti_pkg::*;

  localparam int WDF5_R = 5;

  localparam coef_t WDF5_A [5][5] = '{
    '{q(   13,  7), q(  9, 3), q( 0, 0), q( 0, 0), q( 0, 0)},
    '{q(  -91,  7), q(  1, 3), q( 0, 0), q( 0, 0), q( 0, 0)},
    '{q( -725,  9), q(  0, 0), q( 7, 5), q( 0, 0), q( 0, 0)},
    '{q(    0,  0), q(  0, 0), q( 0, 0), q( 3, 5), q( 5, 2)},
    '{q(    0,  0), q(  0, 0), q( 0, 0), q(-9, 5), q( 1, 2)}};
  localparam coef_t WDF5_B [5] = '{q(3, 7), q(-21, 7), q(325, 9), q(5, 5), q(-15, 5)};
  localparam coef_t WDF5_C [5] = '{q(203, 10), q(0, 0), q(39, 6), q(-11, 4), q(0, 0)};
  localparam coef_t WDF5_D     = q(101, 10);

  localparam coef_t WDF5_CA [5] = '{q(-110461, 17), q(1827, 13), q(273, 11), q(-33, 9), q(-55, 6)};
  localparam coef_t WDF5_CB     = q(37229, 17);

  localparam coef_t WDF5_U_A [7][5] = '{
    '{q(     -12935, 14), q(    261, 10), q(    0,  0), q(    0,  0), q(    0,  0)},
    '{q(      -2639, 14), q(   -803, 10), q(    0,  0), q(    0,  0), q(    0,  0)},
    '{q(     -29725, 16), q(  -6525, 12), q(   49, 10), q(    0,  0), q(    0,  0)},
    '{q(          0,  0), q(      0,  0), q(    0,  0), q( -351, 10), q(   55,  7)},
    '{q(          0,  0), q(      0,  0), q(    0,  0), q(  -99, 10), q(  -37,  7)},
    '{q(   -7262905, 24), q(-964917, 20), q( 1911, 16), q( 3861, 14), q( -605, 11)},
    '{q( 1221830987, 31), q(-80804817, 27), q(13377, 21), q(55143, 19), q(14465, 16)}};
  localparam coef_t WDF5_U_B0 [7] = '{q(-2985, 14), q(-609, 14), q(6925, 16), q(-585, 10),
                                      q(-165, 10), q(7063785, 24), q(718615077, 31)};
  localparam coef_t WDF5_U_B1 [7] = '{q(3, 7), q(-21, 7), q(325, 9), q(5, 5), q(-15, 5),
                                      q(37229, 17), q(7063785, 24)};

  localparam coef_t WDF5_DF_A [5] = '{q(101, 7), q(-2847, 11), q(84025, 17), q(-12595, 15), q(273, 12)};
  localparam coef_t WDF5_DF_B [6] = '{q(101, 10), q(6757, 15), q(87563, 18), q(87563, 18),
                                      q(6757, 15), q(101, 10)};
endpackage
