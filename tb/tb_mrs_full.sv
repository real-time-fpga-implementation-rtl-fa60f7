// tb_mrs_full: end-to-end test of mrs_top at its default size: five full
// 720x480 frames with 480p timing (858 x 525 pixel clocks), each scaled to
// 1080x720 and checked pixel by pixel. The five frames follow the length of
// the functional simulation run on the reference design; sizes and timing are
// the design defaults. See tb_mrs_core for what is checked.
module tb_mrs_full;
  tb_mrs_core #(.NFRAMES(5), .FULL(1'b1)) u_core ();
endmodule
