// Full-size test of the coprocessor: every parameter at its default (32 x 32
// partition, 8-bit run lengths), one transitive closure of a 1024 x 1024
// relation, which runs all schedule phases (32 x 33 tiles). Each closure bit is
// compared with a software Warshall closure.
module tb_mc_coprocessor_full;
  localparam int PN = 32;
  localparam int RLE_W = 8;
  localparam int CW = 16;
  localparam int QDEPTH = 64;
  localparam int CNT_W = 27;
  localparam int NMAX = 1024;
  localparam int NMATS = 1;
  localparam int MAT_N[NMATS] = '{1024};
  localparam int DENS_PML[NMATS] = '{1};
  localparam bit THROTTLE = 1'b0;
  localparam bit EXPECT_SPLIT = 1'b0;
  localparam int MAX_CYCLES = 3000000;

  `include "mc_tb_body.svh"

  mc_coprocessor dut (.*);
endmodule
