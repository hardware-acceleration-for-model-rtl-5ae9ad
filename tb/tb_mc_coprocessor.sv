// End-to-end test of the coprocessor at a small partition (4 x 4 DPUs,
// 3-bit run lengths so that long zero runs are split) and a throttled disk,
// on several matrix sizes, so that every phase of the schedule, partition
// stalls and run splitting all occur. Each closure bit is compared with a
// software Warshall closure.
module tb_mc_coprocessor;
  localparam int PN = 4;
  localparam int RLE_W = 3;
  localparam int CW = 8;
  localparam int QDEPTH = 32;
  localparam int CNT_W = 27;
  localparam int NMAX = 32;
  localparam int NMATS = 3;
  localparam int MAT_N[NMATS] = '{16, 8, 24};
  localparam int DENS_PML[NMATS] = '{40, 150, 15};
  localparam bit THROTTLE = 1'b1;
  localparam bit EXPECT_SPLIT = 1'b1;
  localparam int MAX_CYCLES = 200000;

  `include "mc_tb_body.svh"

  mc_coprocessor #(.PN(PN), .RLE_W(RLE_W), .CW(CW), .QDEPTH(QDEPTH), .CNT_W(CNT_W)) dut (.*);
endmodule
