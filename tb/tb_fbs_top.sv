// tb_fbs_top: end-to-end test of the Fabric-Based System at reduced fabric
// sizes (8 K-means classes, 6 matched filters of 8 bands and 4 pixels,
// 5 Receive cells of 20 words). The test itself is in fbs_top_body.svh.
module tb_fbs_top;
  localparam int KM_N = 8, KM_D = 3, MF_N = 6, MF_D = 8, MF_NP = 4;
  localparam int BC_N = 5, BC_L = 20, LIN_L = 20, NPIX = 5;

  fbs_top #(.KM_N(KM_N), .KM_D(KM_D), .MF_N(MF_N), .MF_D(MF_D), .MF_NP(MF_NP),
            .BC_N(BC_N), .BC_L(BC_L), .LIN_L(LIN_L)) dut (.*);

  `include "fbs_top_body.svh"
endmodule
