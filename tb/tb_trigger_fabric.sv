// tb_trigger_fabric: random 8-slice words for the 37 pixels and random
// configurations; each of the 8 slices is checked against the reference
// algorithms, for both L1 bits and the monitor word, one word after the
// strobe.
module tb_trigger_fabric;
  import trig_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  fabric_cfg_t cfg;
  logic [NPIX-1:0][NSLICE-1:0] img = '0;
  logic [NL1-1:0][NSLICE-1:0]  l1_word;
  logic [NALG-1:0][NSLICE-1:0] alg_word;
  int checks = 0, failures = 0;

  trigger_fabric dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPIX-1:0] im;
    logic [2:0] a;
    logic [1:0] l;
    cfg = FABRIC_CFG_DEFAULT;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 500; w++) begin
      if (w % 20 == 0) begin
        cfg.maj7_n  = 3'($urandom_range(2, 5));
        cfg.maj21_n = 5'($urandom_range(3, 8));
        cfg.l1_sel0 = 3'($urandom_range(7));
        cfg.l1_sel1 = 3'($urandom_range(7));
      end
      for (int t = 0; t < NSLICE; t++) begin
        im = rand_img(3 + (w + t) % 20);
        for (int i = 0; i < NPIX; i++) img[i][t] = im[i];
      end
      en = 1;
      @(negedge clk);
      en = 0;
      for (int t = 0; t < NSLICE; t++) begin
        for (int i = 0; i < NPIX; i++) im[i] = img[i][t];
        a = ref_alg(im, cfg);
        l = ref_l1(im, cfg);
        checks++;
        if (l1_word[0][t] !== l[0] || l1_word[1][t] !== l[1] ||
            alg_word[0][t] !== a[0] || alg_word[1][t] !== a[1] || alg_word[2][t] !== a[2]) begin
          failures++;
          if (failures < 5) $display("w=%0d t=%0d l1=%b%b exp=%b alg=%b%b%b exp=%b", w, t,
            l1_word[1][t], l1_word[0][t], l, alg_word[2][t], alg_word[1][t], alg_word[0][t], a);
        end
      end
      // the output holds while 'en' is low
      img = '1;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
