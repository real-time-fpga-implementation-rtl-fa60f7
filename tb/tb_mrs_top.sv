// tb_mrs_top: end-to-end test of mrs_top on a reduced picture (48 x 24
// pixels, short blanking, two frames). See tb_mrs_core for what is checked.
module tb_mrs_top;
  tb_mrs_core #(
    .W(48), .H(24), .HFP(4), .HSY(4), .HBP(8), .VFP(2), .VSY(2), .VBP(4),
    .NFRAMES(2), .OUT_LINES(0), .FULL(1'b0)
  ) u_core ();
endmodule
