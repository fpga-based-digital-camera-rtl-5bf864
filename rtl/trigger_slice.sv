// trigger_slice: trigger algorithms applied to one time slice of the
// 37-pixel region of a cluster FPGA.
//
// Input is a 1-bit camera image of the region (bit i = pixel i above
// threshold in this slice, numbering as in trig_pkg). Three algorithms from
// the reference design run side by side and each yields one bit:
//   alg[ALG_NN3]   three next neighbours (3NN): some three mutually adjacent
//                  pixels are all set. The reference design names the condition; this
//                  design reads "neighbouring" as a compact triangle of pixels.
//   alg[ALG_MAJ7]  Majority N/7: at least maj7_n pixels set in one of the 19
//                  patches made of a pixel and its six neighbours. The
//                  reference design's patches are centred on the pixels away from the
//                  super-cluster boundary; in the 37-pixel region these are
//                  the 19 pixels within distance 2 of the centre.
//   alg[ALG_MAJ21] Majority N/21: at least maj21_n pixels set in one of six
//                  patches formed by the local cluster and two adjacent
//                  neighbour clusters. In the 37-pixel region such a patch
//                  holds 7 + 5 + 5 = 17 of the 21 pixels.
// The coincidence window of all three comes from the L0 length set upstream
// (l0_history); this block only looks at one slice.
//
// Purely combinational. The patch and triangle wiring is worked out at
// elaboration from the geometry functions of trig_pkg.
module trigger_slice
  import trig_pkg::*;
(
  input  logic [NPIX-1:0] img,
  input  logic [2:0]      maj7_n,
  input  logic [4:0]      maj21_n,
  output logic [NALG-1:0] alg
);
  // ---- 3NN: every triangle of the grid is {p, p+dir0, p+dir5} (type 0) or
  //      {p, p+dir0, p+dir1} (type 1) for exactly one pixel p
  logic [2*NPIX-1:0] tri_hit;
  for (genvar p = 0; p < NPIX; p++) begin : g_tri
    for (genvar ty = 0; ty < 2; ty++) begin : g_ty
      localparam int A = nb_of(p, 0);
      localparam int B = nb_of(p, ty ? 1 : 5);
      if (A >= 0 && B >= 0) begin : g_on
        assign tri_hit[2*p+ty] = img[p] & img[A] & img[B];
      end else begin : g_off
        assign tri_hit[2*p+ty] = 1'b0;
      end
    end
  end

  // ---- Majority N/7 over 19 patches
  logic [NPATCH7-1:0][6:0] p7;
  logic [NPATCH7-1:0]      hit7;
  for (genvar p = 0; p < NPATCH7; p++) begin : g_p7
    for (genvar e = 0; e < 7; e++) begin : g_e
      localparam int IDX = patch7_of(p, e);
      assign p7[p][e] = img[IDX];
    end
    assign hit7[p] = ($countones(p7[p]) >= int'(maj7_n));
  end

  // ---- Majority N/21 over six three-cluster patches
  logic [NPATCH21-1:0] hit21;
  for (genvar t = 0; t < NPATCH21; t++) begin : g_p21
    logic [NPIX-1:0] m;
    for (genvar i = 0; i < NPIX; i++) begin : g_m
      localparam logic IN = in_patch21(t, i);
      assign m[i] = img[i] & IN;
    end
    assign hit21[t] = ($countones(m) >= int'(maj21_n));
  end

  assign alg[ALG_NN3]   = |tri_hit;
  assign alg[ALG_MAJ7]  = |hit7;
  assign alg[ALG_MAJ21] = |hit21;
endmodule
