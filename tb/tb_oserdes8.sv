// tb_oserdes8: loads random words every 8 clocks and checks that the serial
// output shows bit t of the last loaded word t+1 clocks after the load.
module tb_oserdes8;
  logic clk = 0, rst = 1, load = 0, out;
  logic [7:0] word = 0, cur = 0;
  int checks = 0, failures = 0;

  oserdes8 #(.N(8)) dut (.*);
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
      load = (n % 8 == 7);
      if (load) word = 8'($urandom);
      @(posedge clk);
      #1;
      if (n % 8 == 7) cur = word;
      if (n >= 8) begin
        checks++;
        if (out !== cur[(n + 1) % 8]) begin
          failures++;
          if (failures < 5) $display("n=%0d out=%b exp=%b", n, out, cur[(n + 1) % 8]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
