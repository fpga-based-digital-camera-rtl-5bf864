// camera_tb_core: end-to-end test of camera_trigger at a size set by its
// parameters (FULL = 1 instantiates the design with its own defaults).
//
// Random night-sky hits and "shower" bursts (a random pixel of the camera
// and some of its neighbours, over a few clocks) are applied to the L0
// inputs of all clusters. The reference rebuilds every cluster's 37-pixel
// region from global pixel coordinates (cluster (a, b) has its centre at
// pixel (2a - b, a + 3b)), runs the brute-force algorithms of tb_ref_pkg on
// it and ORs the enabled clusters' L1 bits; cam_trig in clock n must equal
// that result for the inputs of clock n - DTB_LATENCY - 2. The test also
// checks trig_type, event_nr, the return of the camera trigger to the
// clusters and the pattern-generator setup, and counts how often each
// mechanism occurs: each algorithm, a trigger needing pixels of neighbour
// clusters, a trigger seen by several overlapping regions, a trigger in a
// cluster at the camera edge, a trigger removed by a CSB input mask and one
// masked by the trigger-type mask. A mechanism that never occurs counts as
// a failure.
module camera_tb_core
  import trig_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter bit FULL   = 0,
  parameter int RING   = 2,
  parameter int N_CSB  = 3,
  parameter int CSB_IN = 8,
  parameter int PT_DEPTH = 64,
  parameter int NCYC   = 2000,
  parameter int SHOWER_PCT = 4
);
  localparam int NCLU = 1 + 3 * RING * (RING + 1);
  localparam int LAT  = DTB_LATENCY + 2;
  localparam int PT_AW = $clog2(PT_DEPTH);
  localparam int HIST = 64;

  logic clk = 0, rst = 1;
  fabric_cfg_t cfg, pt_cfg;
  logic [NCLU-1:0][NPIX-1:0][DELAY_W-1:0] delay = '0;
  logic [NCLU-1:0][NLOCAL-1:0] l0 = '0;
  logic [N_CSB-1:0][CSB_IN-1:0] csb_in_en = '1;
  logic [N_CSB-1:0] csb_en = '1;
  logic [NL1-1:0] type_en = '1;
  logic cam_trig;
  logic [NL1-1:0] trig_type;
  logic [31:0] event_nr;
  logic [NCLU-1:0][NL1-1:0] l1;
  logic [NCLU-1:0] l2_to_cluster;
  logic [NALG-1:0] alg_any;
  logic pt_chk_bit = 0, pt_we = 0, pt_start = 0, pt_loop = 0;
  logic [PT_AW-1:0] pt_waddr = '0;
  logic [NPIX:0] pt_wdata = '0;
  logic [PT_AW:0] pt_len = '0;
  logic pt_busy;
  logic [NL1-1:0] pt_l1;
  logic [31:0] pt_checked, pt_mismatch;

  if (FULL) begin : g_full
    camera_trigger dut (.*);
  end else begin : g_red
    camera_trigger #(.RING(RING), .N_CSB(N_CSB), .CSB_IN(CSB_IN), .PT_DEPTH(PT_DEPTH)) dut (.*);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_alg [NALG] = '{0, 0, 0};
  int n_needs_nb = 0, n_overlap = 0, n_edge = 0, n_csb_mask = 0, n_type_mask = 0, n_events = 0;

  // geometry of the camera
  int owner_clu [int];   // global pixel key -> cluster
  int owner_cell [int];  // global pixel key -> cell 0..6
  int reg_clu [NCLU][NPIX];   // -1 if the region pixel is outside the camera
  int reg_cell [NCLU][NPIX];
  bit edge_clu [NCLU];

  function automatic int key(int q, int r);
    return (q + 1000) * 4096 + (r + 1000);
  endfunction

  // input history, ring buffer
  logic [NLOCAL-1:0] h [HIST][NCLU];

  initial begin
    repeat (NCYC * 4 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, cq, cr, kk, s, nfired, need, tot_exp;
    int burst_left;
    int bq, br;
    logic [NPIX-1:0] im, imloc;
    logic [NL1-1:0] e, lr, e_all;
    logic cam_prev, l2_prev;
    logic [NLOCAL-1:0] bl [NCLU];
    init();
    // ---- geometry
    for (int i = 0; i < NCLU; i++) begin
      a = cam_a(RING, i); b = cam_b(RING, i);
      cq = 2 * a - b; cr = a + 3 * b;
      for (int m = 0; m < NLOCAL; m++) begin
        owner_clu[key(cq + pix_q(m), cr + pix_r(m))] = i;
        owner_cell[key(cq + pix_q(m), cr + pix_r(m))] = m;
      end
    end
    for (int i = 0; i < NCLU; i++) begin
      a = cam_a(RING, i); b = cam_b(RING, i);
      cq = 2 * a - b; cr = a + 3 * b;
      edge_clu[i] = (hex_dist(a, b) == RING);
      for (int p = 0; p < NPIX; p++) begin
        kk = key(cq + pix_q(p), cr + pix_r(p));
        if (owner_clu.exists(kk)) begin
          reg_clu[i][p] = owner_clu[kk];
          reg_cell[i][p] = owner_cell[kk];
        end else begin
          reg_clu[i][p] = -1;
          reg_cell[i][p] = 0;
        end
      end
    end
    checks++;
    if (owner_clu.num() != NCLU * NLOCAL) begin
      failures++;
      $display("clusters overlap: %0d distinct pixels", owner_clu.num());
    end
    for (int t = 0; t < HIST; t++) for (int i = 0; i < NCLU; i++) h[t][i] = '0;

    cfg = FABRIC_CFG_DEFAULT;       // L1 bit 0: Majority 3/7, bit 1: 3NN
    cfg.l1_sel1 = 3'b101;           // bit 1: 3NN or Majority N/21
    cfg.maj21_n = 6;
    pt_cfg = FABRIC_CFG_DEFAULT;
    pt_cfg.stretch = 1;

    repeat (3) @(negedge clk);
    rst = 0;
    // ---- pattern generator side: a short table, checked by the setup itself
    for (int x = 0; x < PT_DEPTH; x++) begin
      im = rand_img(4);
      pt_we = 1; pt_waddr = PT_AW'(x);
      pt_wdata = {ref_l1(im, pt_cfg)[0], im};
      @(negedge clk);
    end
    pt_we = 0; pt_len = (PT_AW+1)'(PT_DEPTH); pt_start = 1;
    @(negedge clk);
    pt_start = 0;

    // ---- camera traffic
    burst_left = 0;
    cam_prev = 0; l2_prev = 0;
    for (int i = 0; i < NCLU; i++) bl[i] = '0;
    for (int n = 0; n < NCYC; n++) begin
      // masks change now and then; the reference uses the masks in force,
      // so the clocks right after a change are not compared
      if (n % 500 == 250) begin
        for (int c = 0; c < N_CSB; c++) csb_in_en[c] = CSB_IN'($urandom) | CSB_IN'($urandom);
        type_en = 2'($urandom_range(1, 3));
      end else if (n % 500 == 0) begin
        csb_in_en = '1;
        type_en = '1;
      end
      // ---- compare
      if (n >= LAT + 16 && (n % 250) > 6) begin
        e_all = '0; nfired = 0; tot_exp = 0;
        for (int i = 0; i < NCLU; i++) begin
          s = (cfg.stretch == 0) ? 1 : int'(cfg.stretch);
          im = '0; imloc = '0;
          for (int p = 0; p < NPIX; p++)
            if (reg_clu[i][p] >= 0)
              for (int j = 0; j < s; j++)
                im[p] |= h[(n - LAT - j) % HIST][reg_clu[i][p]][reg_cell[i][p]];
          imloc[NLOCAL-1:0] = im[NLOCAL-1:0];
          lr = ref_l1(im, cfg);
          if (lr != 0) begin
            logic [2:0] al;
            al = ref_alg(im, cfg);
            for (int x = 0; x < NALG; x++) if (al[x]) n_alg[x]++;
            nfired++;
            if (ref_l1(imloc, cfg) == 0) n_needs_nb++;
            if (edge_clu[i]) n_edge++;
            if (!csb_in_en[i / CSB_IN][i % CSB_IN]) n_csb_mask++;
            else begin
              e_all |= lr;
              if ((lr & ~type_en) != 0) n_type_mask++;
            end
          end
        end
        if (nfired > 1) n_overlap++;
        e = e_all & type_en;
        checks++;
        if (cam_trig !== (|e) || trig_type !== e) begin
          failures++;
          if (failures < 6) $display("n=%0d cam_trig=%b type=%b exp=%b", n, cam_trig, trig_type, e);
        end
        checks++;
        if (l2_to_cluster !== {NCLU{l2_prev}}) begin
          failures++;
          if (failures < 6) $display("n=%0d camera trigger not returned to clusters", n);
        end
      end
      if (cam_trig && !cam_prev) n_events++;
      cam_prev = cam_trig;
      l2_prev = cam_trig;
      // ---- new inputs: night-sky hits and showers
      for (int i = 0; i < NCLU; i++)
        for (int m = 0; m < NLOCAL; m++) l0[i][m] = ($urandom_range(999) < 8);
      if (burst_left == 0 && $urandom_range(99) < SHOWER_PCT) begin
        int ci, cm, q0, r0, k2;
        ci = $urandom_range(NCLU - 1);
        cm = $urandom_range(NLOCAL - 1);
        a = cam_a(RING, ci); b = cam_b(RING, ci);
        q0 = 2 * a - b + pix_q(cm); r0 = a + 3 * b + pix_r(cm);
        for (int i = 0; i < NCLU; i++) bl[i] = '0;
        bl[ci][cm] = 1;
        for (int d = 0; d < 6; d++) begin
          k2 = key(q0 + dir_q(d), r0 + dir_r(d));
          if (owner_clu.exists(k2) && $urandom_range(99) < 40) bl[owner_clu[k2]][owner_cell[k2]] = 1;
        end
        burst_left = $urandom_range(1, 3);
      end
      if (burst_left > 0) begin
        for (int i = 0; i < NCLU; i++) l0[i] |= bl[i];
        burst_left--;
      end
      for (int i = 0; i < NCLU; i++) h[n % HIST][i] = l0[i];
      @(negedge clk);
    end
    // ---- final checks
    checks++;
    if (event_nr != 32'(n_events)) begin
      failures++;
      $display("event_nr=%0d, counted %0d", event_nr, n_events);
    end
    checks++;
    if (pt_checked != PT_DEPTH || pt_mismatch != 0) begin
      failures++;
      $display("pattern test: %0d checked, %0d mismatches", pt_checked, pt_mismatch);
    end
    $display("mechanisms: 3NN=%0d maj7=%0d maj21=%0d needs_neighbours=%0d overlap=%0d edge=%0d csb_mask=%0d type_mask=%0d events=%0d",
             n_alg[0], n_alg[1], n_alg[2], n_needs_nb, n_overlap, n_edge, n_csb_mask, n_type_mask, n_events);
    if (n_alg[0] == 0) failures++;
    if (n_alg[1] == 0) failures++;
    if (n_alg[2] == 0) failures++;
    if (n_needs_nb == 0) failures++;
    if (n_overlap == 0) failures++;
    if (n_edge == 0) failures++;
    if (!FULL && n_csb_mask == 0) failures++;
    if (!FULL && n_type_mask == 0) failures++;
    if (n_events == 0) failures++;
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
