// tb_fbs_top_full: end-to-end test of the Fabric-Based System with every
// parameter at its default: 150-class K-means, 140 matched filters of 32
// bands over 8 pixels, 140 Receive cells of 256 words, linear array of 256
// words. The test itself is in fbs_top_body.svh.
module tb_fbs_top_full;
  localparam int KM_N = 150, KM_D = 3, MF_N = 140, MF_D = 32, MF_NP = 8;
  localparam int BC_N = 140, BC_L = 256, LIN_L = 256, NPIX = 4;

  fbs_top dut (.*);

  `include "fbs_top_body.svh"
endmodule
