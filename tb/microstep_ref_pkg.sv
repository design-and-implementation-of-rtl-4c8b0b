// microstep_ref_pkg: reference arithmetic for the testbenches.
//
// Recomputes, independently of the design, what the controller should
// produce: the 12-bit sine table value for an angle index, the rounded
// 10-bit product of amplitude and fraction, and the winding steering
// pattern of each direction and quadrant, written out as a plain table.
package microstep_ref_pkg;

  // round(4095 * sin(i * pi / 256)), i = 0..128
  function automatic int ref_sin(input int i);
    real v;
    v = 4095.0 * $sin(real'(i) * 3.14159265358979323846 / 256.0);
    return int'($floor(v + 0.5));
  endfunction

  function automatic int ref_cos(input int i);
    return ref_sin(128 - i);
  endfunction

  // round(a * f / 4096)
  function automatic int ref_mul(input int a, input int f);
    return (a * f + 2048) / 4096;
  endfunction

  // Winding pattern {A+, B-, C+, D-}; dir 0 = CCW, 1 = CW.
  function automatic logic [3:0] ref_pattern(input logic dir, input int q);
    logic [3:0] ccw [4];
    logic [3:0] cw  [4];
    ccw[0] = 4'b1001; ccw[1] = 4'b1010; ccw[2] = 4'b0110; ccw[3] = 4'b0101;
    cw[0]  = 4'b1010; cw[1]  = 4'b1001; cw[2]  = 4'b0101; cw[3]  = 4'b0110;
    return dir ? cw[q] : ccw[q];
  endfunction

endpackage
