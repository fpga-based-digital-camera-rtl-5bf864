// tb_l0_history: random words for all 37 pixels and random L0 lengths; the
// reference keeps every pixel's full bit history and ORs the last 'stretch'
// slices for each output bit. Also checks the one-word latency.
module tb_l0_history;
  import trig_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [4:0] stretch = 1;
  logic [NPIX-1:0][NSLICE-1:0] word_in = '0, word_out;
  int checks = 0, failures = 0;
  bit hist [NPIX][0:8191];
  int nw = 0;   // number of words presented so far

  l0_history dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_bit(int i, int t, int s);
    bit v = 0;
    int pos = nw * NSLICE + t;      // position of this bit in the history
    if (s < 1) s = 1;
    for (int j = 0; j < s; j++) if (pos - j >= 0) v |= hist[i][pos - j];
    return v;
  endfunction

  initial begin
    logic [NPIX-1:0][NSLICE-1:0] exp_w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 600; w++) begin
      if (w % 50 == 0) stretch = 5'($urandom_range(16));
      for (int i = 0; i < NPIX; i++)
        for (int t = 0; t < NSLICE; t++) begin
          word_in[i][t] = ($urandom_range(99) < 12);
          hist[i][w * NSLICE + t] = word_in[i][t];
        end
      for (int i = 0; i < NPIX; i++)
        for (int t = 0; t < NSLICE; t++) exp_w[i][t] = expect_bit(i, t, int'(stretch));
      // idle clocks between strobes, output must not change
      repeat (3) @(negedge clk);
      en = 1;
      @(negedge clk);
      en = 0;
      nw++;
      checks++;
      if (word_out !== exp_w) begin
        failures++;
        if (failures < 4) $display("w=%0d stretch=%0d mismatch", w, stretch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
