// tb_dtb_pattern_test: the two-board test. A table of random sparse L0
// images with short bursts is loaded, each with its expected outcome from
// the reference Majority 3/7 algorithm; one entry carries a deliberately
// wrong expected bit. After playback the setup must report every entry
// checked and exactly one mismatch.
module tb_dtb_pattern_test;
  import trig_pkg::*;
  import tb_ref_pkg::*;
  localparam int DEPTH = 8192, AW = 13, LEN = 400, BAD = 123;
  logic clk = 0, rst = 1;
  fabric_cfg_t cfg;
  logic chk_bit = 0, we = 0, start = 0, loop = 0;
  logic [AW-1:0] waddr = '0;
  logic [NPIX:0] wdata = '0;
  logic [AW:0] len = AW'(LEN);
  logic busy;
  logic [NL1-1:0] l1_out;
  logic [31:0] n_checked, n_mismatch;
  int checks = 0, failures = 0, n_pos = 0;

  dtb_pattern_test #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPIX-1:0] im;
    logic e;
    int c0;
    init();
    cfg = FABRIC_CFG_DEFAULT;
    cfg.stretch = 1;
    cfg.maj7_n  = 3;
    cfg.l1_sel0 = 3'b010;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < LEN; a++) begin
      im = rand_img(3);
      if (a % 7 == 0) begin
        c0 = $urandom_range(NPIX - 1);
        im[c0] = 1;
        for (int j = 0; j < NPIX; j++) if (adj[c0][j] && $urandom_range(99) < 45) im[j] = 1;
      end
      e = ref_l1(im, cfg)[0];
      if (e) n_pos++;
      if (a == BAD) e = ~e;
      we = 1; waddr = AW'(a); wdata = {e, im};
      @(negedge clk);
    end
    we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (LEN + DTB_LATENCY + 20) @(negedge clk);
    checks++;
    if (n_checked != LEN) begin
      failures++;
      $display("checked %0d entries, expected %0d", n_checked, LEN);
    end
    checks++;
    if (n_mismatch != 1) begin
      failures++;
      $display("%0d mismatches, expected 1", n_mismatch);
    end
    checks++;
    if (n_pos == 0) failures++;
    $display("entries with a trigger: %0d of %0d", n_pos, LEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
