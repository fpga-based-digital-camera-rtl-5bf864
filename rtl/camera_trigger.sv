// camera_trigger: digital camera trigger of a Cherenkov telescope camera.
//
// The camera is built of 7-pixel clusters on a hexagonal lattice (RING = 9:
// 271 clusters, 1897 pixels). Every cluster has a cluster FPGA (dtb_fpga)
// that exchanges 5 L0 signals with each of its six neighbours and runs the
// trigger algorithms on the 37 pixels around its centre, producing a 2-bit
// L1 trigger. Because the 37-pixel regions overlap, a shower image is seen
// whole by at least one cluster FPGA. Cluster i sends its L1 to Cluster
// Service Board i / CSB_IN, input i % CSB_IN; the 18 CSBs OR their 16 L1
// signals and the L2 controller board (l2cb) forms the camera trigger from
// the 18 L1_CSB signals. The camera trigger returns through the CSBs to
// every cluster ('l2_to_cluster').
//
// Clusters on the camera edge have fewer neighbours; their missing inputs
// are reported absent to the neighbour detection of their FPGA and read as
// low. Cluster numbering, neighbour directions and the pixel numbering of a
// region are defined in trig_pkg.
//
// Beside the camera, and independent of it, sits the reference design's two-board
// test setup (dtb_pattern_test), with its own ports prefixed 'pt_'.
//
// All logic runs on one sample-rate clock 'clk' with a synchronous reset
// that also aligns the word boundaries of all cluster FPGAs. Latency from an
// L0 edge to cam_trig: DTB_LATENCY + 2 clocks (CSB and L2CB registers), with
// zero programmable delay and an L0 length of 1.
module camera_trigger
  import trig_pkg::*;
#(
  parameter int RING     = 9,
  parameter int N_CSB    = 18,
  parameter int CSB_IN   = 16,
  parameter int PT_DEPTH = 8192,
  localparam int NCLU    = 1 + 3 * RING * (RING + 1),
  localparam int PT_AW   = $clog2(PT_DEPTH)
) (
  input  logic                                    clk,
  input  logic                                    rst,
  // camera
  input  fabric_cfg_t                             cfg,
  input  logic [NCLU-1:0][NPIX-1:0][DELAY_W-1:0]  delay,
  input  logic [NCLU-1:0][NLOCAL-1:0]             l0,
  input  logic [N_CSB-1:0][CSB_IN-1:0]            csb_in_en,
  input  logic [N_CSB-1:0]                        csb_en,
  input  logic [NL1-1:0]                          type_en,
  output logic                                    cam_trig,
  output logic [NL1-1:0]                          trig_type,
  output logic [31:0]                             event_nr,
  output logic [NCLU-1:0][NL1-1:0]                l1,
  output logic [NCLU-1:0]                         l2_to_cluster,
  output logic [NALG-1:0]                         alg_any,
  // two-board pattern test
  input  fabric_cfg_t                             pt_cfg,
  input  logic                                    pt_chk_bit,
  input  logic                                    pt_we,
  input  logic [PT_AW-1:0]                        pt_waddr,
  input  logic [NPIX:0]                           pt_wdata,
  input  logic                                    pt_start,
  input  logic [PT_AW:0]                          pt_len,
  input  logic                                    pt_loop,
  output logic                                    pt_busy,
  output logic [NL1-1:0]                          pt_l1,
  output logic [31:0]                             pt_checked,
  output logic [31:0]                             pt_mismatch
);
  if (NCLU > N_CSB * CSB_IN) begin : g_size_err
    $error("camera_trigger: %0d clusters exceed %0d CSB inputs", NCLU, N_CSB * CSB_IN);
  end

  // ---- cluster FPGAs and L0 neighbour links
  logic [NCLU-1:0][NNB-1:0][NEXCH-1:0]   nb_out;
  logic [NCLU-1:0][NALG-1:0][NSLICE-1:0] alg_word;

  for (genvar i = 0; i < NCLU; i++) begin : g_clu
    logic [NNB-1:0]             present;
    logic [NNB-1:0][NEXCH-1:0]  nb_in;
    for (genvar k = 0; k < NNB; k++) begin : g_k
      localparam int N = cam_nb(RING, i, k);
      if (N >= 0) begin : g_link
        assign present[k] = 1'b1;
        assign nb_in[k]   = nb_out[N][(k + 3) % NNB];
      end else begin : g_edge
        assign present[k] = 1'b0;
        assign nb_in[k]   = '0;
      end
    end
    dtb_fpga u_dtb (
      .clk(clk), .rst(rst), .cfg(cfg), .delay(delay[i]), .nb_present(present),
      .l0_local(l0[i]), .nb_in(nb_in), .nb_out(nb_out[i]),
      .l1_out(l1[i]), .alg_word(alg_word[i]));
  end

  always_comb begin
    alg_any = '0;
    for (int i = 0; i < NCLU; i++)
      for (int a = 0; a < NALG; a++) alg_any[a] = alg_any[a] | (|alg_word[i][a]);
  end

  // ---- L2 crate: CSBs and L2 controller board
  logic [N_CSB-1:0][NL1-1:0]    l1_csb;
  logic [N_CSB-1:0][CSB_IN-1:0] l2_out;

  for (genvar c = 0; c < N_CSB; c++) begin : g_csb
    logic [CSB_IN-1:0][NL1-1:0] l1_in;
    for (genvar j = 0; j < CSB_IN; j++) begin : g_in
      if (c * CSB_IN + j < NCLU) begin : g_used
        assign l1_in[j] = l1[c * CSB_IN + j];
        assign l2_to_cluster[c * CSB_IN + j] = l2_out[c][j];
      end else begin : g_free
        assign l1_in[j] = '0;
      end
    end
    csb #(.N_IN(CSB_IN)) u_csb (
      .clk(clk), .rst(rst), .in_en(csb_in_en[c]), .l1_in(l1_in),
      .l2_in(cam_trig), .l1_csb(l1_csb[c]), .l2_out(l2_out[c]));
  end

  l2cb #(.N_CSB(N_CSB)) u_l2cb (
    .clk(clk), .rst(rst), .csb_en(csb_en), .type_en(type_en), .l1_csb(l1_csb),
    .cam_trig(cam_trig), .trig_type(trig_type), .event_nr(event_nr));

  // ---- two-board pattern test
  dtb_pattern_test #(.DEPTH(PT_DEPTH), .AW(PT_AW)) u_pt (
    .clk(clk), .rst(rst), .cfg(pt_cfg), .chk_bit(pt_chk_bit),
    .we(pt_we), .waddr(pt_waddr), .wdata(pt_wdata), .start(pt_start),
    .len(pt_len), .loop(pt_loop), .busy(pt_busy), .l1_out(pt_l1),
    .n_checked(pt_checked), .n_mismatch(pt_mismatch));
endmodule
