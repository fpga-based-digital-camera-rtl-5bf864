// tb_l0_fanout: drives one local pixel at a time and checks that it reaches
// exactly the neighbour outputs whose receiving pixel has the same
// coordinates (seen from the neighbour's centre) as the local pixel; also
// checks that absent neighbours get nothing.
module tb_l0_fanout;
  import trig_pkg::*;
  logic [NLOCAL-1:0] l0_local = '0;
  logic [NNB-1:0] nb_present = '1;
  logic [NNB-1:0][NEXCH-1:0] to_nb;
  int checks = 0, failures = 0;

  l0_fanout dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kr, rq, rr;
    bit e;
    for (int rep = 0; rep < 3; rep++) begin
      nb_present = (rep == 0) ? 6'h3f : 6'($urandom);
      for (int m = 0; m < NLOCAL; m++) begin
        l0_local = '0;
        l0_local[m] = 1'b1;
        #1;
        for (int k = 0; k < NNB; k++) begin
          kr = (k + 3) % NNB;      // this cluster as seen by neighbour k
          for (int j = 0; j < NEXCH; j++) begin
            // receiving pixel in neighbour k's region, relative to our centre
            rq = pix_q(NLOCAL + NEXCH * kr + j) - clu_q(kr);
            rr = pix_r(NLOCAL + NEXCH * kr + j) - clu_r(kr);
            e = nb_present[k] && (rq == pix_q(m)) && (rr == pix_r(m));
            checks++;
            if (to_nb[k][j] !== e) begin
              failures++;
              if (failures < 5) $display("m=%0d k=%0d j=%0d got=%b exp=%b", m, k, j, to_nb[k][j], e);
            end
          end
        end
      end
    end
    // every neighbour gets 5 distinct local pixels: all 7 set -> all 30 set
    nb_present = '1;
    l0_local = '1;
    #1;
    checks++;
    if (to_nb !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
