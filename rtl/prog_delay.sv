// prog_delay: programmable delay of one sampled L0 signal.
//
// The cluster FPGA delays every L0 input by a programmable amount so that
// signals of different pixels and cables arrive aligned at the trigger
// fabric. The reference design places this at the input pins (delay lines of up to
// 10 ns in about 40 ps steps). This model works on the sampled signal, so its
// step is one sample period (one slice, about 1.05 ns): a shift register of
// 2**DW stages with the output taken at the tap selected by 'delay'. With
// DW = 4 the range is 0..15 slices (0..16 ns), which covers the reference design's
// 10 ns. The sub-slice fine steps of the pin delay are not modelled.
//
// Timing: out(n) = in(n - 1 - delay). 'delay' may change at any time; the
// output then jumps to the new tap.
module prog_delay #(
  parameter int DW = 4          // delay select width; range 0 .. 2**DW-1 slices
) (
  input  logic          clk,
  input  logic          rst,    // synchronous, clears the delay line
  input  logic          in,     // sampled L0 signal, one bit per slice
  input  logic [DW-1:0] delay,  // extra delay in slices
  output logic          out
);
  localparam int DEPTH = 1 << DW;
  logic [DEPTH-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst) sh <= '0;
    else     sh <= {sh[DEPTH-2:0], in};
  end

  assign out = sh[delay];
endmodule
