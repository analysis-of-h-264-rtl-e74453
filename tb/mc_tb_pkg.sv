// Test helpers shared by the motion compensation testbenches.
//
// ref_pix gives the sample of a reference picture at (x, y) as a fixed
// scrambling function of the plane, list, reference index and position, so
// that a testbench and the memory model agree on the picture contents
// without any stored data. Positions must be inside the picture; the
// testbenches clamp them first, as the decoder's edge extension does.
//
// The picture function is this test suite's own.
package mc_tb_pkg;
  function automatic logic [7:0] ref_pix(input int plane, input int list, input int ref_idx,
                                         input int x, input int y);
    int v;
    v = x * 37 + y * 101 + (x * y) * 3 + plane * 71 + list * 151 + ref_idx * 29;
    v = v ^ (v >> 5) ^ ((x + 3 * y) << 2);
    return v[7:0];
  endfunction

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction
endpackage
