// dtb_fpga: the cluster FPGA of one Digital Trigger Backplane (DTB) board.
//
// It receives the 7 L0 signals of its own cluster and 5 L0 signals from each
// of up to six neighbour clusters (37 in all), passes its own signals on to
// the neighbours, and runs the trigger algorithms on its 37-pixel region to
// produce a 2-bit serial L1 trigger. The chain follows the reference design's block
// diagram of the FPGA:
//   programmable delays (prog_delay, one per input)
//   -> 1:8 deserializers (iserdes8) giving 8 time slices per word
//   -> history shift registers and L0 length setting (l0_history)
//   -> 37-pixel trigger fabric, eight slices in parallel (trigger_fabric)
//   -> two 8:1 serializers (oserdes8), one per L1 bit.
// The fanout of the local signals is l0_fanout; signals from a neighbour
// that neighbour detection reports absent are forced low.
//
// Clocking (this design's choice): one clock 'clk' at the sample rate; the
// word rate is an enable, 'word_stb', high in one clock out of eight, from
// a phase counter that synchronous reset sets to zero. All boards reset
// together therefore share word boundaries.
//
// Latency: with all delays 0 and an L0 length of 1, an edge at an L0 input
// in clock c reaches l1_out in clock c + 33 (trig_pkg::DTB_LATENCY):
// 1 (delay register) + 8 (deserializer alignment) + 8 (history) + 8 (fabric)
// + 8 (serializer). This is fixed, as the reference design requires of the L1 output.
module dtb_fpga
  import trig_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  fabric_cfg_t                   cfg,
  input  logic [NPIX-1:0][DELAY_W-1:0]  delay,       // per input, in slices
  input  logic [NNB-1:0]                nb_present,  // neighbour detection
  input  logic [NLOCAL-1:0]             l0_local,    // from the front-end board
  input  logic [NNB-1:0][NEXCH-1:0]     nb_in,       // from neighbour k
  output logic [NNB-1:0][NEXCH-1:0]     nb_out,      // to neighbour k
  output logic [NL1-1:0]                l1_out,      // serial L1, 2 bits = type
  output logic [NALG-1:0][NSLICE-1:0]   alg_word     // per-algorithm monitor
);
  // ---- word phase
  logic [$clog2(NSLICE)-1:0] phase;
  logic word_stb;
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 1'b1;
  end
  assign word_stb = (phase == $clog2(NSLICE)'(NSLICE - 1));

  // ---- fanout to neighbours
  l0_fanout u_fanout (.l0_local(l0_local), .nb_present(nb_present), .to_nb(nb_out));

  // ---- 37 inputs in region order
  logic [NPIX-1:0] l0_all;
  assign l0_all[NLOCAL-1:0] = l0_local;
  for (genvar k = 0; k < NNB; k++) begin : g_nb
    assign l0_all[NLOCAL + NEXCH*k +: NEXCH] = nb_in[k] & {NEXCH{nb_present[k]}};
  end

  // ---- delays and deserializers
  logic [NPIX-1:0]              l0_dly;
  logic [NPIX-1:0][NSLICE-1:0]  words, hist;
  for (genvar i = 0; i < NPIX; i++) begin : g_in
    prog_delay #(.DW(DELAY_W)) u_dly (
      .clk(clk), .rst(rst), .in(l0_all[i]), .delay(delay[i]), .out(l0_dly[i]));
    iserdes8 #(.N(NSLICE)) u_ser (
      .clk(clk), .rst(rst), .load(word_stb), .in(l0_dly[i]), .word(words[i]));
  end

  // ---- history / L0 length
  l0_history u_hist (
    .clk(clk), .rst(rst), .en(word_stb), .stretch(cfg.stretch),
    .word_in(words), .word_out(hist));

  // ---- trigger fabric
  logic [NL1-1:0][NSLICE-1:0] l1_word;
  trigger_fabric u_fabric (
    .clk(clk), .rst(rst), .en(word_stb), .cfg(cfg),
    .img(hist), .l1_word(l1_word), .alg_word(alg_word));

  // ---- serial L1 outputs
  for (genvar b = 0; b < NL1; b++) begin : g_out
    oserdes8 #(.N(NSLICE)) u_oser (
      .clk(clk), .rst(rst), .load(word_stb), .word(l1_word[b]), .out(l1_out[b]));
  end
endmodule
