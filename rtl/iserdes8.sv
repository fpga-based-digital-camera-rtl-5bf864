// iserdes8: 1:N input deserializer for one L0 channel.
//
// The L0 signal is sampled once per slice (950 MS/s in the reference design) and
// collected into N-bit words (N = 8, the reference design's SerDes factor), so that
// the trigger fabric can process N time slices in parallel at the word rate.
// A shift register takes one sample per clock; on the clock where 'load' is
// high (once every N clocks, supplied by the word-phase counter of the
// cluster FPGA) the N most recent samples, including the one at the input
// in that clock, are copied into 'word'.
//
// Bit order: word[0] is the oldest sample (the earliest slice), word[N-1]
// the sample present at the input while 'load' was high. 'word' holds its
// value for the N clocks until the next load.
module iserdes8 #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,   // word boundary strobe, one clock in N
  input  logic         in,
  output logic [N-1:0] word
);
  logic [N-2:0] sh;  // the N-1 samples before the current one, sh[N-2] newest

  always_ff @(posedge clk) begin
    if (rst) begin
      sh   <= '0;
      word <= '0;
    end else begin
      sh <= {in, sh[N-2:1]};
      if (load) word <= {in, sh};
    end
  end
endmodule
