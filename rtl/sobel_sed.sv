// sobel_sed: Sobel edge detector for one 3x3 grid of pixels.
//
// The grid is numbered row by row:   p0 p1 p2
//                                    p3 p4 p5
//                                    p6 p7 p8
// The centre pixel p4 carries no weight in either Sobel kernel, so it is not an
// input; the eight neighbours are. The block forms
//   Gx = (p2 + 2*p5 + p8) - (p0 + 2*p3 + p6)   (kernel [-1 0 1; -2 0 2; -1 0 1])
//   Gy = (p6 + 2*p7 + p8) - (p0 + 2*p1 + p2)   (kernel [-1 -2 -1; 0 0 0; 1 2 1])
// and outputs the gradient magnitude estimate |Gx| + |Gy|. The kernels are the
// source design's; combining them as |Gx|+|Gy| (rather than a square root) is
// this design's choice. For 8-bit pixels the result is at most 6*255 = 1530 and fits in
// the 12 bits the result memory keeps. Pixels are unsigned 32-bit words;
// the arithmetic is carried at 36 bits so no input value can overflow it, and
// the result saturates at the largest 32-bit value.
//
// Purely combinational: the result is valid in the same cycle as the inputs.
module sobel_sed (
  input  logic [31:0] p0, p1, p2,
  input  logic [31:0] p3,     p5,
  input  logic [31:0] p6, p7, p8,
  output logic [31:0] sobel_out
);
  localparam int unsigned W = 36;

  logic signed [W-1:0] gx, gy;
  logic        [W-1:0] ax, ay, sum;

  function automatic logic signed [W-1:0] ext(input logic [31:0] v);
    return $signed({{(W-32){1'b0}}, v});
  endfunction

  always_comb begin
    gx  = (ext(p2) + (ext(p5) <<< 1) + ext(p8)) - (ext(p0) + (ext(p3) <<< 1) + ext(p6));
    gy  = (ext(p6) + (ext(p7) <<< 1) + ext(p8)) - (ext(p0) + (ext(p1) <<< 1) + ext(p2));
    ax  = (gx < 0) ? W'(-gx) : W'(gx);
    ay  = (gy < 0) ? W'(-gy) : W'(gy);
    sum = ax + ay;
    sobel_out = (sum[W-1:32] != '0) ? 32'hFFFF_FFFF : sum[31:0];
  end
endmodule
