// wdf5_ref_pkg: floating-point golden model of the fifth-order elliptic wave
// digital filter in its original state-space form
//   S[n] = A S[n-1] + B X[n],  Y[n] = C S[n-1] + D X[n],  S[-1] = 0.
// Every fixed-point realisation of the filter, however it is restructured,
// must follow this model up to its rounding error. The coefficients are
// written here independently of the RTL coefficient package.
package wdf5_ref_pkg;

  class wdf5_model;
    real a [5][5];
    real b [5];
    real c [5];
    real d;
    real s [5];

    function new();
      foreach (a[i, j]) a[i][j] = 0.0;
      a[0][0] =   13.0/128;  a[0][1] = 9.0/8;
      a[1][0] =  -91.0/128;  a[1][1] = 1.0/8;
      a[2][0] = -725.0/512;  a[2][2] = 7.0/32;
      a[3][3] =    3.0/32;   a[3][4] = 5.0/4;
      a[4][3] =   -9.0/32;   a[4][4] = 1.0/4;
      b = '{3.0/128, -21.0/128, 325.0/512, 5.0/32, -15.0/32};
      c = '{203.0/1024, 0.0, 39.0/64, -11.0/16, 0.0};
      d = 101.0/1024;
      reset();
    endfunction

    function void reset();
      foreach (s[i]) s[i] = 0.0;
    endfunction

    // One sample: returns Y[n] and advances the state.
    function real step(real x);
      real y;
      real ns [5];
      y = d * x;
      foreach (s[i]) y += c[i] * s[i];
      foreach (ns[i]) begin
        ns[i] = b[i] * x;
        foreach (s[j]) ns[i] += a[i][j] * s[j];
      end
      s = ns;
      return y;
    endfunction
  endclass

endpackage
