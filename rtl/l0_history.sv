// l0_history: history shift registers and L0 length setting for all pixels
// of a cluster FPGA.
//
// The reference design stores the history of each pixel by moving its 8-bit words
// into shift registers, so that algorithms can look back in time; its
// simulated algorithms also set the L0 signal length (3.3, 6.6 or 9.9 ns),
// which, together with the required overlap, sets the coincidence window.
// Here each pixel keeps its two previous words (16 past slices). The output
// word has bit t set when the pixel was above threshold in any of the last
// 'stretch' slices up to and including slice t, that is, every L0 pulse is
// extended by stretch-1 slices (stretch = 1 or 0 passes the signal
// unchanged). Extending, rather than replacing, the pulse keeps the
// time-over-threshold information in the signal length.
//
// Timing: registered on 'en' (the word strobe). A word presented while 'en'
// is high appears, stretched, on 'out' from the next clock until the next
// strobe: one word of latency.
module l0_history
  import trig_pkg::*;
#(
  parameter int NP = NPIX,
  parameter int N  = NSLICE
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [4:0]            stretch,        // 1 .. 2*N, L0 length in slices
  input  logic [NP-1:0][N-1:0]  word_in,
  output logic [NP-1:0][N-1:0]  word_out
);
  logic [NP-1:0][N-1:0] p1, p2;   // previous word, the one before that
  logic [NP-1:0][N-1:0] st;

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      logic [3*N-1:0] tl;          // timeline: p2 (oldest), p1, current
      tl = {word_in[i], p1[i], p2[i]};
      for (int t = 0; t < N; t++) begin
        st[i][t] = 1'b0;
        for (int j = 0; j < 2 * N; j++)
          if (j == 0 || j < int'(stretch)) st[i][t] = st[i][t] | tl[2*N + t - j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0;
      p2 <= '0;
      word_out <= '0;
    end else if (en) begin
      p1 <= word_in;
      p2 <= p1;
      word_out <= st;
    end
  end
endmodule
