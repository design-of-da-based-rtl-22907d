// tb_test_signal - the three-tone test signal used to exercise the filters.
//
//   x(n) = floor( 50 * (2.24 + sin(2*pi*500*n*T) + sin(2*pi*1000*n*T) + sin(2*pi*2000*n*T)) ),
//   T = 0.1 ms, saturated to the unsigned range of the input width.
// It starts 112, 204, 218, 170, 141, 162, 177, 134, 64, 50, ... and repeats every 20 samples.
// Where the expression lands exactly on an integer (every fifth sample) the floor may differ by
// one between math libraries; the filters are checked against a model fed the same values, so
// this does not matter here.
package tb_test_signal;

  localparam real PI = 3.14159265358979323846;

  function automatic int unsigned value(input int unsigned n, input int unsigned width);
    real t = real'(n) * 1.0e-4;
    real v = 50.0 * (2.24 + $sin(1000.0 * PI * t) + $sin(2000.0 * PI * t)
                          + $sin(4000.0 * PI * t));
    int  q = $rtoi($floor(v));
    int  top = (1 << width) - 1;
    if (q < 0) q = 0;
    if (q > top) q = top;
    return q;
  endfunction

endpackage
