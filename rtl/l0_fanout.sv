// l0_fanout: distribution of the local L0 signals to the six neighbour
// cluster FPGAs.
//
// Each cluster FPGA passes its own L0 signals on to its six neighbours; as
// in the reference design's firmware only 5 of the 7 are sent to each. This block
// picks, for neighbour k, the five local pixels that fall inside that
// neighbour's 37-pixel region, in the order in which the neighbour numbers
// them (trig_pkg: the neighbour sees this cluster as its neighbour k+3 mod 6).
// Outputs towards a neighbour that the neighbour-detection pair reports as
// absent are held low. Combinational, like the fanout buffers it stands for.
module l0_fanout
  import trig_pkg::*;
(
  input  logic [NLOCAL-1:0]           l0_local,
  input  logic [NNB-1:0]              nb_present,
  output logic [NNB-1:0][NEXCH-1:0]   to_nb
);
  for (genvar k = 0; k < NNB; k++) begin : g_k
    for (genvar j = 0; j < NEXCH; j++) begin : g_j
      localparam int M = exch_of((k + 3) % NNB, j);
      assign to_nb[k][j] = l0_local[M] & nb_present[k];
    end
  end
endmodule
