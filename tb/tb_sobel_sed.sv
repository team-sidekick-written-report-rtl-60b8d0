// tb_sobel_sed: checks the Sobel detector against the reference model for
// corner cases (flat, vertical and horizontal steps, maximum 8-bit and 32-bit
// values) and random 8-bit and 32-bit grids.
module tb_sobel_sed;
  import tb_sobel_ref_pkg::*;
  logic [31:0] p [9];
  logic [31:0] sobel_out;
  int checks = 0, failures = 0;

  sobel_sed dut (.p0(p[0]), .p1(p[1]), .p2(p[2]), .p3(p[3]), .p5(p[5]),
                 .p6(p[6]), .p7(p[7]), .p8(p[8]), .sobel_out(sobel_out));

  task automatic check(input string what);
    longint unsigned q [9];
    longint unsigned exp;
    foreach (q[i]) q[i] = p[i];
    exp = sobel_ref(q);
    if (exp > 64'hFFFF_FFFF) exp = 64'hFFFF_FFFF;
    #1;
    checks++;
    if (64'(sobel_out) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, sobel_out, exp);
    end
  endtask

  initial begin
    foreach (p[i]) p[i] = 32'd77;
    check("flat");
    foreach (p[i]) p[i] = (i % 3 == 2) ? 32'd255 : 32'd0;
    check("vertical edge");              // Gx = 4*255
    foreach (p[i]) p[i] = (i / 3 == 2) ? 32'd255 : 32'd0;
    check("horizontal edge");            // Gy = 4*255
    foreach (p[i]) p[i] = 32'd0;
    p[2] = 255; p[5] = 255; p[8] = 255; p[6] = 255; p[7] = 255;
    check("corner");
    foreach (p[i]) p[i] = 32'd0;
    p[0] = 255; p[1] = 255; p[3] = 255;
    check("negative gradients");
    foreach (p[i]) p[i] = (i % 3 == 2 || i / 3 == 2) ? 32'hFFFF_FFFF : 32'd0;
    check("32-bit extremes");
    // the largest possible 8-bit result: 6*255 = 1530
    foreach (p[i]) p[i] = 0;
    p[2] = 255; p[5] = 255; p[8] = 255; p[6] = 255; p[7] = 255;
    #1 checks++;
    if (sobel_out != 32'd1530) begin failures++; $display("FAIL max: %0d", sobel_out); end
    repeat (2000) begin
      foreach (p[i]) p[i] = $urandom_range(0, 255);
      check("random 8-bit");
    end
    repeat (500) begin
      foreach (p[i]) p[i] = $urandom;
      check("random 32-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
