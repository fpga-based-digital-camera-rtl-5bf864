// tb_csb: random L1 inputs and enables; checks the per-bit OR of the enabled
// inputs and the returned camera trigger, each one clock later.
module tb_csb;
  import trig_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst = 1, l2_in = 0;
  logic [N-1:0] in_en = '1;
  logic [N-1:0][NL1-1:0] l1_in = '0;
  logic [NL1-1:0] l1_csb;
  logic [N-1:0] l2_out;
  int checks = 0, failures = 0;

  csb #(.N_IN(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NL1-1:0] e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      in_en = N'($urandom);
      for (int i = 0; i < N; i++) l1_in[i] = ($urandom_range(99) < 8) ? 2'($urandom_range(1, 3)) : 2'b00;
      l2_in = 1'($urandom);
      e = '0;
      for (int i = 0; i < N; i++) if (in_en[i]) e |= l1_in[i];
      @(negedge clk);
      checks++;
      if (l1_csb !== e || l2_out !== {N{l2_in}}) begin
        failures++;
        if (failures < 5) $display("n=%0d l1_csb=%b exp=%b", n, l1_csb, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
