// l2cb: trigger logic of the FPGA on the L2 Controller Board (L2CB).
//
// The L2CB receives the L1_CSB signals of the 18 CSBs and generates the
// camera trigger. As for the CSB, the reference design's simplest case is an OR.
// Here each CSB input can be enabled, and 'type_en' selects which of the two
// L1 trigger-type bits may fire the camera; 'trig_type' reports which types
// took part. The L2CB is also the place where event-numbered time stamps
// could be formed: 'event_nr' counts camera triggers (rising edges of
// 'cam_trig'), which is this design's small rendering of that idea.
//
// Timing: cam_trig and trig_type are registered (one clock); event_nr
// increments in the clock after cam_trig rises.
module l2cb
  import trig_pkg::*;
#(
  parameter int N_CSB = 18
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [N_CSB-1:0]           csb_en,
  input  logic [NL1-1:0]             type_en,
  input  logic [N_CSB-1:0][NL1-1:0]  l1_csb,
  output logic                       cam_trig,
  output logic [NL1-1:0]             trig_type,
  output logic [31:0]                event_nr
);
  logic [NL1-1:0] acc;
  logic           cam_trig_q;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N_CSB; i++)
      if (csb_en[i]) acc = acc | l1_csb[i];
    acc = acc & type_en;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cam_trig   <= 1'b0;
      cam_trig_q <= 1'b0;
      trig_type  <= '0;
      event_nr   <= '0;
    end else begin
      cam_trig   <= |acc;
      trig_type  <= acc;
      cam_trig_q <= cam_trig;
      if (cam_trig && !cam_trig_q) event_nr <= event_nr + 1'b1;
    end
  end
endmodule
