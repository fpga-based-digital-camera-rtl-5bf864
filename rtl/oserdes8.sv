// oserdes8: N:1 output serializer for one trigger word.
//
// The trigger fabric produces one N-bit trigger word per word period; this
// block turns it back into a serial trigger signal with one bit per slice,
// which gives the L1 output a fixed latency. On the clock where 'load' is
// high the word is captured; the output then presents word[0] in the next
// clock, word[1] in the one after, and so on up to word[N-1], in the clock
// in which the next word is loaded.
module oserdes8 #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,   // word boundary strobe, one clock in N
  input  logic [N-1:0] word,
  output logic         out
);
  logic [N-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst)       sh <= '0;
    else if (load) sh <= word;
    else           sh <= {1'b0, sh[N-1:1]};
  end

  assign out = sh[0];
endmodule
