// tb_pattern_gen: fills part of the table with random 38-bit entries, plays
// them once and in a loop, and checks every output entry, its order and the
// playback length.
module tb_pattern_gen;
  import trig_pkg::*;
  localparam int DEPTH = 8192, AW = 13;
  logic clk = 0, rst = 1, we = 0, start = 0, loop = 0;
  logic [AW-1:0] waddr = '0;
  logic [NPIX:0] wdata = '0;
  logic [AW:0] len = '0;
  logic [NPIX-1:0] l0;
  logic expect_out, valid, busy;
  int checks = 0, failures = 0;
  logic [NPIX:0] tab [DEPTH];

  pattern_gen #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(input int n, input bit lp, input int cycles);
    int got;
    got = 0;
    @(negedge clk);
    len = (AW+1)'(n); loop = lp; start = 1;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (valid) begin
        checks++;
        if ({expect_out, l0} !== tab[got % n]) begin
          failures++;
          if (failures < 5) $display("entry %0d got %h exp %h", got, {expect_out, l0}, tab[got % n]);
        end
        got++;
      end else if (l0 !== '0 || expect_out !== 1'b0) failures++;
      if (lp && c == cycles - 3) loop = 0;
    end
    checks++;
    if (!lp && got != n) begin
      failures++;
      $display("played %0d entries, expected %0d", got, n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      tab[a] = {$urandom, $urandom};
      if (a < 600 || a >= DEPTH - 4) begin
        we = 1; waddr = AW'(a); wdata = tab[a];
        @(negedge clk);
      end
    end
    we = 0;
    play(500, 0, 520);
    play(37, 1, 200);
    repeat (60) @(negedge clk);
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
