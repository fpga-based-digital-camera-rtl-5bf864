// csb: logic of the FPGA on a Cluster Service Board (CSB).
//
// A CSB collects the L1 trigger signals of up to 16 cluster FPGAs over their
// cables and, in the simplest case the reference design describes, combines them
// into one L1_CSB signal by a logical OR, which goes to the L2 controller
// board. It also sends the camera trigger (L2) back to its clusters.
// Each L1 signal has two bits (trigger type); the OR is taken per bit. An
// enable bit per input lets a faulty or absent cluster be left out (this
// design's addition, standing for the trigger configuration the reference design
// mentions).
//
// Timing: both paths are registered, one clock of latency each.
module csb
  import trig_pkg::*;
#(
  parameter int N_IN = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N_IN-1:0]           in_en,    // 1 = use this cluster's L1
  input  logic [N_IN-1:0][NL1-1:0]  l1_in,
  input  logic                      l2_in,    // camera trigger from the L2CB
  output logic [NL1-1:0]            l1_csb,
  output logic [N_IN-1:0]           l2_out    // camera trigger to the clusters
);
  logic [NL1-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < N_IN; i++)
      if (in_en[i]) acc = acc | l1_in[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l1_csb <= '0;
      l2_out <= '0;
    end else begin
      l1_csb <= acc;
      l2_out <= {N_IN{l2_in}};
    end
  end
endmodule
