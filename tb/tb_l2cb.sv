// tb_l2cb: random L1_CSB inputs, CSB enables and type enables; checks the
// camera trigger and trigger type one clock later and counts rising edges
// of the camera trigger against event_nr.
module tb_l2cb;
  import trig_pkg::*;
  localparam int N = 18;
  logic clk = 0, rst = 1;
  logic [N-1:0] csb_en = '1;
  logic [NL1-1:0] type_en = '1;
  logic [N-1:0][NL1-1:0] l1_csb = '0;
  logic cam_trig;
  logic [NL1-1:0] trig_type;
  logic [31:0] event_nr;
  int checks = 0, failures = 0;

  l2cb #(.N_CSB(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NL1-1:0] e;
    bit prev = 0;
    int events = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      csb_en  = N'($urandom);
      type_en = 2'($urandom);
      for (int i = 0; i < N; i++) l1_csb[i] = ($urandom_range(99) < 4) ? 2'($urandom_range(1, 3)) : 2'b00;
      e = '0;
      for (int i = 0; i < N; i++) if (csb_en[i]) e |= l1_csb[i];
      e &= type_en;
      @(negedge clk);
      checks++;
      if (cam_trig !== (|e) || trig_type !== e) begin
        failures++;
        if (failures < 5) $display("n=%0d cam=%b type=%b exp=%b", n, cam_trig, trig_type, e);
      end
      if (cam_trig && !prev) events++;
      prev = cam_trig;
    end
    @(negedge clk);
    checks++;
    if (event_nr != 32'(events)) begin
      failures++;
      $display("event_nr=%0d exp=%0d", event_nr, events);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
