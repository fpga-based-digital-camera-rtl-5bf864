// trig_pkg: constants, configuration types and geometry shared by the
// digital camera trigger.
//
// Time base: one "slice" is one period of the L0 sampling clock (950 MS/s,
// about 1.05 ns). Eight slices form one word, the unit the cluster FPGA
// processes in parallel (SerDes factor 8, word rate about 119 MHz).
//
// Geometry: pixels sit on a hexagonal grid addressed by axial coordinates
// (q, r); the hexagonal distance of (q, r) from the origin is
// max(|q|, |r|, |q + r|). A cluster is one pixel and its six neighbours.
// Neighbouring cluster k (k = 0..5) has its centre at pixel offset C_k,
// C_0 = (2, 1) and C_{k+1} = C_k rotated by 60 degrees; these clusters tile
// the plane. The 37 pixels a cluster FPGA processes are the pixels within
// distance 3 of its own centre: its 7 own pixels plus 5 of the 7 pixels of
// every neighbour cluster (the other two are at distance 4).
//
// Pixel numbering inside the 37-pixel region (this design's choice; the
// grouping 7 + 6 x 5 is the reference design's):
//   0        centre of the local cluster
//   1..6     local pixel in direction 0..5
//   7+5k+j   j-th pixel (j = 0..4) of neighbour cluster k that lies inside
//            the region, counting that cluster's cells in the order
//            centre, direction 0 .. direction 5.
// Directions 0..5 in axial coordinates: (1,0) (1,-1) (0,-1) (-1,0) (-1,1) (0,1).
package trig_pkg;

  localparam int NSLICE  = 8;    // time slices per word (SerDes factor)
  localparam int NLOCAL  = 7;    // pixels per cluster
  localparam int NNB     = 6;    // neighbour clusters
  localparam int NEXCH   = 5;    // L0 signals exchanged per neighbour
  localparam int NPIX    = NLOCAL + NNB * NEXCH;  // 37
  localparam int NL1     = 2;    // L1 trigger bits (trigger type)
  localparam int NALG    = 3;    // algorithms run in parallel per slice
  localparam int ALG_NN3   = 0;  // three next neighbours (compact triangle)
  localparam int ALG_MAJ7  = 1;  // Majority N out of a 7-pixel patch
  localparam int ALG_MAJ21 = 2;  // Majority N out of a three-cluster patch
  localparam int NPATCH7  = 19;  // 7-pixel patches fully inside the region
  localparam int NPATCH21 = 6;   // three-cluster patches
  localparam int MAX_STRETCH = 16;  // longest L0 length, in slices
  localparam int DELAY_W = 4;    // programmable delay, in slices (0..15)

  // Configuration of the trigger fabric of one cluster FPGA.
  typedef struct packed {
    logic [4:0]      stretch;   // L0 signal length in slices, 1..16 (0 acts as 1)
    logic [2:0]      maj7_n;    // N_maj for the 7-pixel patches
    logic [4:0]      maj21_n;   // N_maj for the three-cluster patches
    logic [NALG-1:0] l1_sel0;   // algorithms ORed into L1 bit 0
    logic [NALG-1:0] l1_sel1;   // algorithms ORed into L1 bit 1
  } fabric_cfg_t;

  localparam fabric_cfg_t FABRIC_CFG_DEFAULT = '{
    stretch: 5'd3, maj7_n: 3'd3, maj21_n: 5'd5,
    l1_sel0: 3'b010, l1_sel1: 3'b001};

  // ---------------------------------------------------------------- geometry
  function automatic int dir_q(input int d);
    case (((d % 6) + 6) % 6)
      0: return 1;  1: return 1;  2: return 0;
      3: return -1; 4: return -1; default: return 0;
    endcase
  endfunction

  function automatic int dir_r(input int d);
    case (((d % 6) + 6) % 6)
      0: return 0;  1: return -1; 2: return -1;
      3: return 0;  4: return 1;  default: return 1;
    endcase
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int hex_dist(input int q, input int r);
    int m;
    m = iabs(q);
    if (iabs(r) > m) m = iabs(r);
    if (iabs(q + r) > m) m = iabs(q + r);
    return m;
  endfunction

  // Pixel offset of the centre of neighbour cluster k.
  function automatic int clu_q(input int k);
    case (((k % 6) + 6) % 6)
      0: return 2;  1: return 3;  2: return 1;
      3: return -2; 4: return -3; default: return -1;
    endcase
  endfunction

  function automatic int clu_r(input int k);
    case (((k % 6) + 6) % 6)
      0: return 1;  1: return -2; 2: return -3;
      3: return -1; 4: return 2;  default: return 3;
    endcase
  endfunction

  // Offset of cell m (0 = centre, 1..6 = direction m-1) inside a cluster.
  function automatic int cell_q(input int m);
    return (m == 0) ? 0 : dir_q(m - 1);
  endfunction

  function automatic int cell_r(input int m);
    return (m == 0) ? 0 : dir_r(m - 1);
  endfunction

  // Cell index (0..6) of the j-th cell of neighbour cluster k that lies
  // within distance 3 of the local centre.
  function automatic int exch_cell(input int k, input int j);
    int n;
    n = 0;
    for (int m = 0; m < NLOCAL; m++) begin
      if (hex_dist(clu_q(k) + cell_q(m), clu_r(k) + cell_r(m)) <= 3) begin
        if (n == j) return m;
        n++;
      end
    end
    return -1;
  endfunction

  function automatic int pix_q(input int i);
    if (i < NLOCAL) return cell_q(i);
    return clu_q((i - NLOCAL) / NEXCH) + cell_q(exch_cell((i - NLOCAL) / NEXCH, (i - NLOCAL) % NEXCH));
  endfunction

  function automatic int pix_r(input int i);
    if (i < NLOCAL) return cell_r(i);
    return clu_r((i - NLOCAL) / NEXCH) + cell_r(exch_cell((i - NLOCAL) / NEXCH, (i - NLOCAL) % NEXCH));
  endfunction

  // Index of the pixel at (q, r), or -1 if it is outside the region.
  function automatic int pix_at(input int q, input int r);
    for (int i = 0; i < NPIX; i++)
      if (pix_q(i) == q && pix_r(i) == r) return i;
    return -1;
  endfunction

  // Neighbour in direction d of pixel i, or -1.
  function automatic int pix_nb(input int i, input int d);
    return pix_at(pix_q(i) + dir_q(d), pix_r(i) + dir_r(d));
  endfunction

  // 7-pixel patch p (0..18) is centred on the p-th pixel, counted in index
  // order, whose six neighbours all lie in the region (distance <= 2).
  function automatic int patch7_centre(input int p);
    int n;
    n = 0;
    for (int i = 0; i < NPIX; i++) begin
      if (hex_dist(pix_q(i), pix_r(i)) <= 2) begin
        if (n == p) return i;
        n++;
      end
    end
    return -1;
  endfunction

  // Pixel e (0..6) of 7-pixel patch p: the centre, then its six neighbours.
  function automatic int patch7_pix(input int p, input int e);
    if (e == 0) return patch7_centre(p);
    return pix_nb(patch7_centre(p), e - 1);
  endfunction

  // Three-cluster patch t (0..5): the local cluster and neighbour clusters
  // t and t+1 (mod 6), which are adjacent to each other.
  function automatic logic in_patch21(input int t, input int i);
    int k;
    if (i < NLOCAL) return 1'b1;
    k = (i - NLOCAL) / NEXCH;
    return (k == t) || (k == (t + 1) % NNB);
  endfunction

  // ------------------------------------------------ tabulated geometry
  // The functions above are evaluated once here, in the package, and the
  // modules read the results from these tables (8-bit entries, all-ones for
  // "none").
  localparam int NB_BITS = 8;

  function automatic logic [NPIX*NNB*NB_BITS-1:0] make_nb_tab();
    logic [NPIX*NNB*NB_BITS-1:0] t;
    for (int i = 0; i < NPIX; i++)
      for (int d = 0; d < NNB; d++)
        t[(i*NNB + d)*NB_BITS +: NB_BITS] = NB_BITS'(pix_nb(i, d));
    return t;
  endfunction

  function automatic logic [NPATCH7*7*NB_BITS-1:0] make_patch7_tab();
    logic [NPATCH7*7*NB_BITS-1:0] t;
    for (int p = 0; p < NPATCH7; p++)
      for (int e = 0; e < 7; e++)
        t[(p*7 + e)*NB_BITS +: NB_BITS] = NB_BITS'(patch7_pix(p, e));
    return t;
  endfunction

  function automatic logic [NNB*NEXCH*NB_BITS-1:0] make_exch_tab();
    logic [NNB*NEXCH*NB_BITS-1:0] t;
    for (int k = 0; k < NNB; k++)
      for (int j = 0; j < NEXCH; j++)
        t[(k*NEXCH + j)*NB_BITS +: NB_BITS] = NB_BITS'(exch_cell(k, j));
    return t;
  endfunction

  localparam logic [NPIX*NNB*NB_BITS-1:0]    NB_TAB     = make_nb_tab();
  localparam logic [NPATCH7*7*NB_BITS-1:0]   PATCH7_TAB = make_patch7_tab();
  localparam logic [NNB*NEXCH*NB_BITS-1:0]   EXCH_TAB   = make_exch_tab();

  // Table readers: neighbour of pixel i in direction d (-1 if none),
  // pixel e of 7-pixel patch p, cell sent as the j-th signal to a receiver
  // that sees this cluster as its neighbour k.
  function automatic int nb_of(input int i, input int d);
    return int'($signed(NB_TAB[(i*NNB + d)*NB_BITS +: NB_BITS]));
  endfunction

  function automatic int patch7_of(input int p, input int e);
    return int'($signed(PATCH7_TAB[(p*7 + e)*NB_BITS +: NB_BITS]));
  endfunction

  function automatic int exch_of(input int k, input int j);
    return int'($signed(EXCH_TAB[(k*NEXCH + j)*NB_BITS +: NB_BITS]));
  endfunction

  // ------------------------------------------------------ cluster lattice
  // Clusters of a camera are addressed by axial coordinates (a, b) on their
  // own hexagonal lattice; lattice direction k leads to neighbour cluster k.
  // A camera of ring radius R holds the 1 + 3R(R+1) clusters with
  // hex_dist(a, b) <= R (R = 9 gives the 271 clusters of the MST camera),
  // numbered row by row (b from -R to R, a increasing).
  function automatic int cam_nclu(input int R);
    return 1 + 3 * R * (R + 1);
  endfunction

  function automatic int cam_row_amin(input int R, input int b);
    return (-b - R > -R) ? -b - R : -R;
  endfunction

  function automatic int cam_index(input int R, input int a, input int b);
    int off;
    if (hex_dist(a, b) > R) return -1;
    off = 0;
    for (int bb = -R; bb < b; bb++) off += 2 * R + 1 - iabs(bb);
    return off + a - cam_row_amin(R, b);
  endfunction

  function automatic int cam_b(input int R, input int i);
    int off;
    off = 0;
    for (int bb = -R; bb <= R; bb++) begin
      if (i < off + 2 * R + 1 - iabs(bb)) return bb;
      off += 2 * R + 1 - iabs(bb);
    end
    return 0;
  endfunction

  function automatic int cam_a(input int R, input int i);
    int off;
    off = 0;
    for (int bb = -R; bb <= R; bb++) begin
      if (i < off + 2 * R + 1 - iabs(bb)) return cam_row_amin(R, bb) + i - off;
      off += 2 * R + 1 - iabs(bb);
    end
    return 0;
  endfunction

  // Index of the neighbour of cluster i in direction k, or -1.
  function automatic int cam_nb(input int R, input int i, input int k);
    return cam_index(R, cam_a(R, i) + dir_q(k), cam_b(R, i) + dir_r(k));
  endfunction

  // Number of slices between an L0 edge at a DTB input and the same edge on
  // the L1 output, with all programmable delays at zero and an L0 length of
  // one slice. Worked out in dtb_fpga's header.
  localparam int DTB_LATENCY = 1 + 4 * NSLICE;

endpackage
