// dtb_pattern_test: two-board test of a cluster FPGA with a pattern
// generator, as in the reference design's L1-stage test.
//
// A pattern_gen (the "pattern generator" board) drives all 37 L0 inputs of a
// dtb_fpga (the "trigger" board): table bits 0..6 go to the local inputs,
// bits 7+5k+j to neighbour input k, pixel j, and all neighbours are reported
// present. The 38th table bit, the expected outcome, is delayed by the trigger
// board's fixed latency (DTB_LATENCY clocks, valid with all delays at zero)
// and compared with the selected L1 bit in every clock that carries a table
// entry. 'n_checked' and 'n_mismatch' count the comparisons and the
// disagreements. The comparison is exact because both boards share one clock
// and reset here; the reference design notes about +-1 ns of jitter between real
// boards from the sampling of the L0 signals.
module dtb_pattern_test
  import trig_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  fabric_cfg_t            cfg,
  input  logic                   chk_bit,    // which L1 bit to compare
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [NPIX:0]          wdata,
  input  logic                   start,
  input  logic [AW:0]            len,
  input  logic                   loop,
  output logic                   busy,
  output logic [NL1-1:0]         l1_out,
  output logic [31:0]            n_checked,
  output logic [31:0]            n_mismatch
);
  logic [NPIX-1:0] pg_l0;
  logic            pg_exp, pg_valid;

  pattern_gen #(.DEPTH(DEPTH), .AW(AW)) u_pg (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
    .start(start), .len(len), .loop(loop),
    .l0(pg_l0), .expect_out(pg_exp), .valid(pg_valid), .busy(busy));

  logic [NNB-1:0][NEXCH-1:0]   nb_in, nb_out_unused;
  logic [NALG-1:0][NSLICE-1:0] alg_unused;
  for (genvar k = 0; k < NNB; k++) begin : g_nb
    assign nb_in[k] = pg_l0[NLOCAL + NEXCH*k +: NEXCH];
  end

  dtb_fpga u_dtb (
    .clk(clk), .rst(rst), .cfg(cfg), .delay('0), .nb_present('1),
    .l0_local(pg_l0[NLOCAL-1:0]), .nb_in(nb_in), .nb_out(nb_out_unused),
    .l1_out(l1_out), .alg_word(alg_unused));

  // expected outcome and its valid flag, delayed to line up with l1_out
  logic [DTB_LATENCY-1:0] exp_d, val_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      exp_d <= '0;
      val_d <= '0;
      n_checked  <= '0;
      n_mismatch <= '0;
    end else begin
      exp_d <= {exp_d[DTB_LATENCY-2:0], pg_exp};
      val_d <= {val_d[DTB_LATENCY-2:0], pg_valid};
      if (val_d[DTB_LATENCY-1]) begin
        n_checked <= n_checked + 1;
        if (l1_out[chk_bit] != exp_d[DTB_LATENCY-1]) n_mismatch <= n_mismatch + 1;
      end
    end
  end
endmodule
