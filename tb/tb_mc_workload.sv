// Workload test of the coprocessor at its default parameters (32 x 32
// partition, 8-bit run lengths) on the three matrix sizes whose run times are
// projected for a 200 MHz clock: N = 10^4 (padded to 10016, a multiple of 32),
// 10^5 and 10^6, for about 5 s, 80 min and 57 days. A whole closure at these
// sizes is far too long to simulate, so each run covers the input load and the
// first tiles of the schedule, then the design is reset.
//
// The relation is sparse, like a transition relation: state i has the
// successors i+1 (mod N) and one pseudo-random state. Its input column slices
// are prepared on the disk before the start. For every tile the test checks
//   - that the tiles come in the schedule's order with the right phase,
//   - that the partition takes exactly N + 3n steps and, the disk being fast,
//     the tile at most 8 cycles more,
//   - that each horizontal slice read from disk was used up completely, and
//     that the last one written decodes to N + 2n bits per lane,
//   - that the compressed disk traffic stays within 100 MB/s at 200 MHz.
// From the measured tile length it projects the time of the full closure,
// (N/n)(N/n + 1) tiles, at 200 MHz and checks it within 5 % of the figure
// above.
module tb_mc_workload;
  localparam int PN = 32;
  localparam int RLE_W = 8;
  localparam int CW = 16;
  localparam int QDEPTH = 64;
  localparam int CNT_W = 27;
  localparam int NMAX = 1000000;
  localparam bit THROTTLE = 1'b0;
  localparam int NW = 3;
  localparam int W_N[NW]     = '{10016, 100000, 1000000};
  localparam int W_TILES[NW] = '{6, 3, 2};
  localparam real W_SECONDS[NW] = '{5.0, 80.0 * 60.0, 57.0 * 86400.0};
  localparam real F_CLK = 200.0e6;
  localparam longint MAX_CYCLES = 6000000;

  `include "mc_tb_env.svh"

  mc_coprocessor dut (.*);

  // ---------------- per-tile measurement ----------------
  // Sampled at each clock edge: the schedule state of the controller, the
  // partition's step enable and the disk traffic of that edge.
  localparam int MAXT = 8;
  int unsigned t_cyc[MAXT], t_steps[MAXT], t_wr[MAXT], t_rd[MAXT];
  int t_r[MAXT], t_c[MAXT];
  mc_pkg::phase_e t_ph[MAXT];
  int tiles_seen = 0;
  int unsigned load_cyc = 0;
  bit in_tile = 1'b0;
  mc_pkg::phase_e cur_ph;
  int cur_r, cur_c;

  always @(posedge clk) begin
    automatic int r = int'(dut.u_ctrl.tile_r);
    automatic int c = int'(dut.u_ctrl.tile_c);
    automatic int i;
    if (!rst_n) begin
      tiles_seen = 0;
      load_cyc = 0;
      in_tile = 1'b0;
    end else if (phase inside {mc_pkg::PH_A1, mc_pkg::PH_A2, mc_pkg::PH_B,
                               mc_pkg::PH_C1, mc_pkg::PH_C2}) begin
      if (!in_tile || phase != cur_ph || r != cur_r || c != cur_c) begin
        if (tiles_seen < MAXT) begin
          t_ph[tiles_seen] = phase;
          t_r[tiles_seen] = r;
          t_c[tiles_seen] = c;
          t_cyc[tiles_seen] = 0;
          t_steps[tiles_seen] = 0;
          t_wr[tiles_seen] = 0;
          t_rd[tiles_seen] = 0;
        end
        tiles_seen++;
        in_tile = 1'b1;
        cur_ph = phase;
        cur_r = r;
        cur_c = c;
      end
      i = tiles_seen - 1;
      if (i < MAXT) begin
        t_cyc[i]++;
        if (dut.u_ctrl.part_en) t_steps[i]++;
        for (int l = 0; l < PN; l++) begin
          if (hd_wr_valid) t_wr[i] += int'(hd_wr_len[l]);
          t_rd[i] += int'(hd_rd_len[l]);
        end
      end
    end else begin
      in_tile = 1'b0;
      if (phase == mc_pkg::PH_LOAD) load_cyc++;
    end
  end

  function automatic mc_pkg::phase_e want_phase(int r, int c, int nt);
    if (c == r)            return (r == nt - 1) ? mc_pkg::PH_A2 : mc_pkg::PH_A1;
    else if (c - r == nt)  return (r == 0) ? mc_pkg::PH_C1 : mc_pkg::PH_C2;
    else                   return mc_pkg::PH_B;
  endfunction

  function automatic int succ(int i, int n);
    return int'((longint'(i) * 2654435761 + 12345) % longint'(n));
  endfunction

  task automatic run_workload(int w);
    int n = W_N[w];
    int nt = n / PN;
    int lv = n + PN;
    int lh = n + 2 * PN;
    int lt = n + 3 * PN;
    int max_tile = 0, tr = 0, tc = 0, cols;
    bit s[$];
    cols = 1;
    // the tiles run here, in schedule order, and the input slices they load
    begin
      int r = 0, c = 0;
      for (int t = 0; t < W_TILES[w]; t++) begin
        if (r == c) cols = c + 2;
        if (r < ((c < nt - 1) ? c : nt - 1)) r++;
        else begin c++; r = (c > nt) ? c - nt : 0; end
      end
    end
    disk.delete();
    // predecessors of the columns that are loaded, then the lane streams
    for (int c = 0; c < cols; c++)
      for (int q = 0; q < PN; q++) begin
        int j = c * PN + q;
        bit col[$];
        col = {};
        for (int t = 0; t < lv; t++) col.push_back(1'b0);
        // A[i][j] = 1 for j = i+1 mod N and j = succ(i); slot t holds row t - q
        for (int i = 0; i < n; i++)
          if ((i + 1) % n == j || succ(i, n) == j) col[i + q] = 1'b1;
        rle_put(key(fid(mc_pkg::FILE_INPUT, 0, c), q), col);
      end
    @(posedge clk);
    mat_size <= CNT_W'(n);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // run until the tile after the last one measured has begun, then give the
    // compressor a few cycles to write its last codes
    while (tiles_seen <= W_TILES[w]) @(posedge clk);
    repeat (8) @(posedge clk);
    checks++;
    if (load_cyc > lv + 8) begin
      failures++;
      $display("FAIL: N=%0d: input load took %0d cycles for %0d words", n, load_cyc, lv);
    end
    for (int t = 0; t < W_TILES[w]; t++) begin
      real mbs = real'(t_wr[t] + t_rd[t]) / real'(t_cyc[t]) * F_CLK / 8.0e6;
      checks++;
      if (t_ph[t] != want_phase(tr, tc, nt) || t_r[t] != tr || t_c[t] != tc) begin
        failures++;
        $display("FAIL: N=%0d: tile %0d is (%0d,%0d) %s, expected (%0d,%0d) %s", n, t,
                 t_r[t], t_c[t], t_ph[t].name(), tr, tc, want_phase(tr, tc, nt).name());
      end
      if (int'(t_cyc[t]) > max_tile) max_tile = int'(t_cyc[t]);
      $display("N=%0d tile (%0d,%0d) %s: %0d cycles, %0d steps, disk %0d bits written, %0d read, %0.1f MB/s",
               n, t_r[t], t_c[t], t_ph[t].name(), t_cyc[t], t_steps[t], t_wr[t], t_rd[t], mbs);
      checks++;
      if (int'(t_steps[t]) != lt) begin
        failures++;
        $display("FAIL: %0d partition steps, expected %0d", t_steps[t], lt);
      end
      checks++;
      if (int'(t_cyc[t]) > lt + 8) begin
        failures++;
        $display("FAIL: tile took %0d cycles, schedule %0d", t_cyc[t], lt);
      end
      checks++;
      if (mbs > 100.0) begin
        failures++;
        $display("FAIL: disk traffic above 100 MB/s");
      end
      // a horizontal slice that was read must have been used up
      if (t_ph[t] inside {mc_pkg::PH_B, mc_pkg::PH_C1, mc_pkg::PH_C2})
        for (int l = 0; l < PN; l++) begin
          automatic longint unsigned k = key(fid(mc_pkg::FILE_HSLICE, tr, tc), l);
          checks++;
          if (disk.exists(k) && disk[k].size() != 0) begin
            failures++;
            $display("FAIL: slice (%0d,%0d) lane %0d: %0d bits left", tr, tc, l, disk[k].size());
          end
        end
      // the slice written for the tile to the right has N + 2n bits per lane
      if (t == W_TILES[w] - 1 && t_ph[t] inside {mc_pkg::PH_A1, mc_pkg::PH_A2, mc_pkg::PH_B})
        for (int l = 0; l < PN; l++) begin
          automatic longint unsigned k = key(fid(mc_pkg::FILE_HSLICE, tr, tc + 1), l);
          rle_get(k, lh, s);
          checks++;
          if (s.size() != lh || (disk.exists(k) && disk[k].size() != 0)) begin
            failures++;
            $display("FAIL: slice (%0d,%0d) lane %0d decodes to %0d bits, expected %0d",
                     tr, tc + 1, l, s.size(), lh);
          end
        end
      if (tr < ((tc < nt - 1) ? tc : nt - 1)) tr++;
      else begin tc++; tr = (tc > nt) ? tc - nt : 0; end
    end
    // projection of the whole closure: load, (N/n)(N/n+1) tiles, output
    begin
      real tiles = real'(nt) * real'(nt + 1);
      real secs = (tiles * real'(max_tile) + 2.0 * real'(load_cyc)) / F_CLK;
      $display("N=%0d: projected closure %0.3g cycles = %0.4g s at 200 MHz (expected about %0.4g s)",
               n, secs * F_CLK, secs, W_SECONDS[w]);
      checks++;
      if (secs < 0.95 * W_SECONDS[w] || secs > 1.05 * W_SECONDS[w]) begin
        failures++;
        $display("FAIL: projection more than 5 %% off");
      end
    end
    // stop the run and clear the design for the next size
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int w = 0; w < NW; w++) run_workload(w);
    checks++;
    if (stall_cycles > 4 * (6 + 3 + 2)) begin
      failures++;
      $display("FAIL: %0d stall cycles with a fast disk", stall_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
