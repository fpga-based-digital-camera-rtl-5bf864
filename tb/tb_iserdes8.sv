// tb_iserdes8: feeds a random bit stream and checks that every word holds
// the 8 samples ending with the one present during 'load', oldest in bit 0,
// and that the word is stable between loads.
module tb_iserdes8;
  logic clk = 0, rst = 1, load = 0, in = 0;
  logic [7:0] word;
  int checks = 0, failures = 0;
  bit hist [0:4095];
  logic [7:0] exp_w;

  iserdes8 #(.N(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      in   = 1'($urandom_range(1));
      load = (n % 8 == 7);
      hist[n] = in;
      @(posedge clk);
      #1;
      if (n % 8 == 7) begin
        for (int t = 0; t < 8; t++) exp_w[t] = hist[n - 7 + t];
      end
      if (n >= 8) begin
        checks++;
        if (word !== exp_w) begin
          failures++;
          if (failures < 5) $display("n=%0d word=%b exp=%b", n, word, exp_w);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
