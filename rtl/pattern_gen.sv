// pattern_gen: pattern-generator firmware for testing a cluster FPGA.
//
// In the reference design's test setup one DTB board plays back a look-up table of
// 38-bit entries (8k deep, up to 37k): 37 bits emulate the 37 L0 signals of
// a trigger board and the 38th holds the expected trigger outcome. This block
// is that table plus its playback: a write port fills it, 'start' plays
// entries 0 .. len-1, one entry per sample clock, once or repeatedly.
//
// Interface: we/waddr/wdata write one entry per clock. 'start' (one clock)
// begins playback at entry 0. Outputs are registered: entry n appears on
// l0/expect in the clock after it is read; 'valid' marks clocks that carry
// an entry. When idle, l0 and expect are low.
module pattern_gen
  import trig_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [NPIX:0]    wdata,     // {expected outcome, 37 L0 bits}
  input  logic             start,
  input  logic [AW:0]      len,       // number of entries to play, 1..DEPTH
  input  logic             loop,      // restart at entry 0 after the last
  output logic [NPIX-1:0]  l0,
  output logic             expect_out,
  output logic             valid,
  output logic             busy
);
  logic [NPIX:0] mem [DEPTH];
  logic [AW:0]   ptr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      ptr  <= '0;
      l0   <= '0;
      expect_out <= 1'b0;
      valid <= 1'b0;
    end else begin
      if (start) begin
        busy <= 1'b1;
        ptr  <= '0;
      end else if (busy) begin
        if (ptr + 1'b1 >= len) begin
          ptr  <= '0;
          busy <= loop;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
      valid <= busy && !start;
      if (busy && !start) {expect_out, l0} <= mem[ptr[AW-1:0]];
      else                {expect_out, l0} <= '0;
    end
  end
endmodule
