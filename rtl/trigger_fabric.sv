// trigger_fabric: the 37-pixel trigger fabric of a cluster FPGA.
//
// As in the reference design, the fabric is eight identical trigger fabrics working
// in parallel, one per time slice of the current word, each with 37 input
// bits. Every slice runs the three algorithms of trigger_slice. The L1 output
// has two bits that encode the trigger type; here each L1 bit is the OR of
// the algorithms selected for it in the configuration (l1_sel0, l1_sel1),
// which is how this design combines algorithms executed in parallel.
//
// Inputs are the stretched words from l0_history, packed pixel-major:
// img[i][t] is pixel i in slice t. Outputs, registered on 'en' (one word of
// latency): l1_word[b][t] is L1 bit b in slice t, and alg_word[a][t] the raw
// result of algorithm a, for monitoring.
module trigger_fabric
  import trig_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           en,
  input  fabric_cfg_t                    cfg,
  input  logic [NPIX-1:0][NSLICE-1:0]    img,
  output logic [NL1-1:0][NSLICE-1:0]     l1_word,
  output logic [NALG-1:0][NSLICE-1:0]    alg_word
);
  logic [NSLICE-1:0][NALG-1:0] alg_s;

  for (genvar t = 0; t < NSLICE; t++) begin : g_slice
    logic [NPIX-1:0] img_t;
    for (genvar i = 0; i < NPIX; i++) begin : g_px
      assign img_t[i] = img[i][t];
    end
    trigger_slice u_slice (
      .img     (img_t),
      .maj7_n  (cfg.maj7_n),
      .maj21_n (cfg.maj21_n),
      .alg     (alg_s[t])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l1_word  <= '0;
      alg_word <= '0;
    end else if (en) begin
      for (int t = 0; t < NSLICE; t++) begin
        l1_word[0][t] <= |(alg_s[t] & cfg.l1_sel0);
        l1_word[1][t] <= |(alg_s[t] & cfg.l1_sel1);
        for (int a = 0; a < NALG; a++) alg_word[a][t] <= alg_s[t][a];
      end
    end
  end
endmodule
