// tb_prog_delay: checks out(n) = in(n - 1 - delay) for random inputs and
// every delay setting, including changes of the setting.
module tb_prog_delay;
  logic clk = 0, rst = 1, in = 0, out;
  logic [3:0] delay = 0;
  int checks = 0, failures = 0;
  bit hist [0:4095];
  int n = 0;

  prog_delay #(.DW(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n >= 20 && n % 100 == 0) delay = 4'($urandom_range(15));
      #1;
      if (n >= 20) begin
        checks++;
        if (out !== hist[n - 1 - delay]) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d delay=%0d out=%b exp=%b", n, delay, out, hist[n-1-delay]);
        end
      end
      in = 1'($urandom_range(1));
      hist[n] = in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
