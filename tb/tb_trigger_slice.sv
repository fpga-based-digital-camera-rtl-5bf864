// tb_trigger_slice: geometry sanity checks and random images of varying
// density against the brute-force reference of tb_ref_pkg, for every
// Majority threshold; plus hand-made patterns.
module tb_trigger_slice;
  import trig_pkg::*;
  import tb_ref_pkg::*;
  logic [NPIX-1:0] img = '0;
  logic [2:0] maj7_n = 3;
  logic [4:0] maj21_n = 5;
  logic [NALG-1:0] alg;
  int checks = 0, failures = 0;
  int ninterior;

  trigger_slice dut (.*);

  task automatic check(input string what, input logic [NALG-1:0] exp_a);
    #1;
    checks++;
    if (alg !== exp_a) begin
      failures++;
      if (failures < 8) $display("%s: img=%h n7=%0d n21=%0d alg=%b exp=%b", what, img, maj7_n, maj21_n, alg, exp_a);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fabric_cfg_t c;
    init();
    // geometry: 37 distinct pixels within distance 3, 19 interior ones
    checks++;
    ninterior = 0;
    for (int i = 0; i < NPIX; i++) begin
      if (hex_dist(pix_q(i), pix_r(i)) > 3) failures++;
      for (int j = i + 1; j < NPIX; j++)
        if (pix_q(i) == pix_q(j) && pix_r(i) == pix_r(j)) failures++;
      if (interior[i]) ninterior++;
    end
    if (ninterior != 19) failures++;
    // hand-made: centre + two adjacent local pixels form a triangle
    img = '0; img[0] = 1; img[1] = 1; img[2] = 1;
    maj7_n = 3; maj21_n = 5;
    check("triangle", 3'b011);
    // three pixels in a row are not a compact triangle
    img = '0; img[0] = 1; img[1] = 1; img[4] = 1;
    check("line", 3'b010);
    // one pixel of every neighbour cluster: no 3NN, no 7-patch with 3 ...
    img = '0; for (int k = 0; k < 6; k++) img[7 + 5*k + 4] = 1;
    maj7_n = 7; maj21_n = 2;
    check("sparse", {ref_maj21(img, 2), 1'b0, ref_nn3(img)});
    for (int n = 0; n < 4000; n++) begin
      img = rand_img(2 + n % 25);
      maj7_n  = 3'($urandom_range(1, 7));
      maj21_n = 5'($urandom_range(1, 17));
      c = '0; c.maj7_n = maj7_n; c.maj21_n = maj21_n;
      check("random", ref_alg(img, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
