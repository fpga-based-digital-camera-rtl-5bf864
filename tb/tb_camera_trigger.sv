// tb_camera_trigger: end-to-end test of the camera trigger at reduced size
// (7 clusters, the central one with a full neighbourhood and six edge
// clusters, on 2 CSBs of 4 inputs); see camera_tb_core.
module tb_camera_trigger;
  camera_tb_core #(.FULL(0), .RING(1), .N_CSB(2), .CSB_IN(4), .PT_DEPTH(64), .NCYC(3000)) u_core ();
endmodule
