// tb_sobel_ref_pkg: reference model used by the testbenches. It computes the
// Sobel gradient magnitude |Gx| + |Gy| of a 3x3 grid given row by row, with
// 64-bit integer arithmetic, independently of the RTL.
package tb_sobel_ref_pkg;
  function automatic longint unsigned sobel_ref(input longint unsigned p [9]);
    longint gx, gy;
    gx = (longint'(p[2]) + 2*longint'(p[5]) + longint'(p[8])) - (longint'(p[0]) + 2*longint'(p[3]) + longint'(p[6]));
    gy = (longint'(p[6]) + 2*longint'(p[7]) + longint'(p[8])) - (longint'(p[0]) + 2*longint'(p[1]) + longint'(p[2]));
    if (gx < 0) gx = -gx;
    if (gy < 0) gy = -gy;
    return longint'(gx + gy);
  endfunction
endpackage
