// tb_ref_pkg: reference models used by the testbenches.
//
// The trigger algorithms are recomputed here by brute force from pixel
// coordinates alone: two pixels are neighbours when their coordinate
// difference is one of the six unit steps; 3NN searches all triples of
// mutually adjacent pixels; Majority N/7 takes every pixel whose six
// neighbours all exist in the region; Majority N/21 uses the cluster
// grouping of the pixel numbering (7 local, then 5 per neighbour cluster).
// None of the elaboration-time tables of the design are reused.
package tb_ref_pkg;
  import trig_pkg::*;

  function automatic bit adjacent(input int i, input int j);
    int dq, dr;
    dq = pix_q(j) - pix_q(i);
    dr = pix_r(j) - pix_r(i);
    return (dq == 1 && dr == 0) || (dq == -1 && dr == 0) || (dq == 0 && dr == 1) ||
           (dq == 0 && dr == -1) || (dq == 1 && dr == -1) || (dq == -1 && dr == 1);
  endfunction

  // adjacency matrix, filled once by init()
  bit adj [NPIX][NPIX];
  bit interior [NPIX];
  bit inited = 0;

  function automatic void init();
    int n;
    for (int i = 0; i < NPIX; i++)
      for (int j = 0; j < NPIX; j++) adj[i][j] = (i != j) && adjacent(i, j);
    for (int i = 0; i < NPIX; i++) begin
      n = 0;
      for (int j = 0; j < NPIX; j++) if (adj[i][j]) n++;
      interior[i] = (n == 6);
    end
    inited = 1;
  endfunction

  function automatic bit ref_nn3(input logic [NPIX-1:0] img);
    if (!inited) init();
    for (int i = 0; i < NPIX; i++) if (img[i])
      for (int j = i + 1; j < NPIX; j++) if (img[j] && adj[i][j])
        for (int k = j + 1; k < NPIX; k++)
          if (img[k] && adj[i][k] && adj[j][k]) return 1;
    return 0;
  endfunction

  function automatic bit ref_maj7(input logic [NPIX-1:0] img, input int n);
    int c;
    if (!inited) init();
    for (int i = 0; i < NPIX; i++) if (interior[i]) begin
      c = img[i];
      for (int j = 0; j < NPIX; j++) if (adj[i][j] && img[j]) c++;
      if (c >= n) return 1;
    end
    return 0;
  endfunction

  function automatic bit ref_maj21(input logic [NPIX-1:0] img, input int n);
    int c;
    for (int t = 0; t < 6; t++) begin
      c = 0;
      for (int i = 0; i < NPIX; i++) begin
        if (i < 7) c += img[i];
        else if ((i - 7) / 5 == t || (i - 7) / 5 == (t + 1) % 6) c += img[i];
      end
      if (c >= n) return 1;
    end
    return 0;
  endfunction

  function automatic logic [2:0] ref_alg(input logic [NPIX-1:0] img, input fabric_cfg_t cfg);
    return {ref_maj21(img, int'(cfg.maj21_n)), ref_maj7(img, int'(cfg.maj7_n)), ref_nn3(img)};
  endfunction

  function automatic logic [1:0] ref_l1(input logic [NPIX-1:0] img, input fabric_cfg_t cfg);
    logic [2:0] a;
    a = ref_alg(img, cfg);
    return {|(a & cfg.l1_sel1), |(a & cfg.l1_sel0)};
  endfunction

  // Random sparse image: each pixel set with probability pct percent.
  function automatic logic [NPIX-1:0] rand_img(input int pct);
    logic [NPIX-1:0] v;
    for (int i = 0; i < NPIX; i++) v[i] = ($urandom_range(99) < pct);
    return v;
  endfunction
endpackage
