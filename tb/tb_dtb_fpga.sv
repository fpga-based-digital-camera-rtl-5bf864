// tb_dtb_fpga: end-to-end test of one cluster FPGA.
//
// Inputs are random sparse L0 hits plus short "shower" bursts of adjacent
// pixels, under random programmable delays, L0 lengths, algorithm
// thresholds, L1 selections and neighbour-presence patterns. Because the
// whole chain is shift-invariant in time, the expected L1 output in clock n
// is the reference algorithm applied to the image whose pixel i is the OR of
// x_i(n - 33 - delay_i - j), j < stretch, where x is the effective input
// history. The first clocks after a configuration change are not checked.
// A separate single-pulse test measures the latency (33 clocks) exactly.
module tb_dtb_fpga;
  import trig_pkg::*;
  import tb_ref_pkg::*;
  localparam int LAT = DTB_LATENCY;
  localparam int NCYC = 6000;

  logic clk = 0, rst = 1;
  fabric_cfg_t cfg;
  logic [NPIX-1:0][DELAY_W-1:0] delay = '0;
  logic [NNB-1:0] nb_present = '1;
  logic [NLOCAL-1:0] l0_local = '0;
  logic [NNB-1:0][NEXCH-1:0] nb_in = '0, nb_out;
  logic [NL1-1:0] l1_out;
  logic [NALG-1:0][NSLICE-1:0] alg_word;
  int checks = 0, failures = 0;
  int n_l1 [2] = '{0, 0};

  dtb_fpga dut (.*);
  always #5 clk = ~clk;

  logic [NPIX-1:0] x [0:NCYC+200];

  initial begin
    repeat (NCYC * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic [NPIX-1:0] v, input int n);
    logic [NPIX-1:0] eff;
    l0_local = v[NLOCAL-1:0];
    for (int k = 0; k < NNB; k++) nb_in[k] = v[NLOCAL + NEXCH*k +: NEXCH];
    eff = v;
    for (int k = 0; k < NNB; k++) if (!nb_present[k]) eff[NLOCAL + NEXCH*k +: NEXCH] = '0;
    x[n] = eff;
  endtask

  function automatic logic [NPIX-1:0] img_at(int n);
    logic [NPIX-1:0] im;
    int s, p;
    s = (cfg.stretch == 0) ? 1 : int'(cfg.stretch);
    for (int i = 0; i < NPIX; i++) begin
      im[i] = 0;
      for (int j = 0; j < s; j++) begin
        p = n - LAT - int'(delay[i]) - j;
        if (p >= 0) im[i] |= x[p][i];
      end
    end
    return im;
  endfunction

  initial begin
    logic [NPIX-1:0] v;
    logic [1:0] e;
    int burst_left, c0, lat_seen, since_cfg;
    logic [NPIX-1:0] burst;
    init();
    for (int n = 0; n <= NCYC + 200; n++) x[n] = '0;
    cfg = FABRIC_CFG_DEFAULT;
    cfg.stretch = 1;
    // ---- latency: one triangle (pixels 0, 1, 2) for one clock, 3NN on L1 bit 1
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    l0_local = 7'b0000111;
    @(negedge clk);
    l0_local = '0;
    lat_seen = -1;
    for (int c = 1; c < 60; c++) begin
      if (l1_out[1] && lat_seen < 0) lat_seen = c;
      @(negedge clk);
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("latency %0d clocks, expected %0d", lat_seen, LAT);
    end
    // ---- random traffic
    rst = 1;
    @(negedge clk);
    rst = 0;
    burst_left = 0;
    since_cfg = 0;
    for (int n = 0; n < NCYC; n++) begin
      if (n % 1000 == 0) begin
        cfg.stretch = 5'($urandom_range(1, 9));
        cfg.maj7_n  = 3'($urandom_range(3, 4));
        cfg.maj21_n = 5'($urandom_range(5, 7));
        cfg.l1_sel0 = 3'($urandom_range(1, 7));
        cfg.l1_sel1 = 3'($urandom_range(1, 7));
        for (int i = 0; i < NPIX; i++) delay[i] = (n == 0) ? '0 : DELAY_W'($urandom_range(15));
        nb_present = (n % 2000 == 0) ? 6'h3f : 6'($urandom);
        since_cfg = 0;
      end
      // compare output of this clock
      if (since_cfg > LAT + 40) begin
        e = ref_l1(img_at(n), cfg);
        checks++;
        if (l1_out !== e) begin
          failures++;
          if (failures < 6) $display("n=%0d l1=%b exp=%b", n, l1_out, e);
        end
        if (l1_out[0]) n_l1[0]++;
        if (l1_out[1]) n_l1[1]++;
        for (int k = 0; k < NNB; k++) if (!nb_present[k] && nb_out[k] != '0) failures++;
      end
      // new input
      v = rand_img(1);
      if (burst_left == 0 && $urandom_range(99) < 3) begin
        c0 = $urandom_range(NPIX - 1);
        burst = '0;
        burst[c0] = 1;
        for (int j = 0; j < NPIX; j++) if (adj[c0][j] && $urandom_range(99) < 50) burst[j] = 1;
        burst_left = $urandom_range(1, 3);
      end
      if (burst_left > 0) begin
        v |= burst;
        burst_left--;
      end
      drive(v, n);
      since_cfg++;
      @(negedge clk);
    end
    checks++;
    if (n_l1[0] == 0 || n_l1[1] == 0) begin
      failures++;
      $display("an L1 bit never fired: %0d %0d", n_l1[0], n_l1[1]);
    end
    $display("L1 bit0 active %0d clocks, bit1 %0d clocks", n_l1[0], n_l1[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
