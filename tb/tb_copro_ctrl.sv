// Test of the schedule controller with the buffers, RAM and decompressor
// replaced by simple counters here. For N = 12 and N = 8 on a 4 x 4
// partition it checks: the order of phases and tiles (columns left to
// right, each from top to bottom, A1/A2/B/C1/C2 by position, LOAD first and
// FINAL last), the disk stream names of each phase, and how many words
// each phase moves on each path (partition steps N + 3n, RAM reads and
// writes N + n, disk reads and writes N + 2n or N + n, exactly one "last"
// per written stream, the first-row markers of each row at steps 2r and
// N + 2r). Without stalls a tile must take N + 3n steps plus a
// small fixed overhead; with the decompressor withholding data the
// partition must stall, and otherwise only wait for the first RAM word.
module tb_copro_ctrl;
  import mc_pkg::*;
  localparam int PN = 4;
  localparam int CNT_W = 27;
  localparam int FDEPTH = 4;
  localparam int FCW = $clog2(FDEPTH) + 1;
  localparam int AW = CNT_W + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [CNT_W-1:0] mat_size = '0;
  logic busy, done, stall;
  phase_e phase;
  logic part_en, top_use, left_use;
  tile_kind_e tile_kind;
  logic [PN-1:0] left_f;
  logic top_empty, out_empty, bot_empty, bot_full, load_empty, load_full;
  logic [FCW-1:0] top_count = '0, out_count = '0;
  int bot_count = 0, load_count = 0;
  logic top_push, top_pop, out_push, out_pop, bot_push, bot_pop, load_push, load_pop;
  logic ram_rd_en, ram_wr_en, ram_wr_from_load;
  logic [AW-1:0] ram_rd_addr, ram_wr_addr;
  logic rle_valid, rle_last, rle_from_out;
  logic dec_valid = 1'b1, dec_take;
  logic hd_rd_req;
  file_id_t hd_rd_file, hd_wr_file;

  copro_ctrl #(.PN(PN), .CNT_W(CNT_W), .FDEPTH(FDEPTH)) dut (.*);

  assign top_empty  = (top_count == 0);
  assign out_empty  = (out_count == 0);
  assign bot_empty  = (bot_count == 0);
  assign bot_full   = (bot_count == FDEPTH);
  assign load_empty = (load_count == 0);
  assign load_full  = (load_count == FDEPTH);

  always_ff @(posedge clk) begin
    top_count  <= top_count + FCW'(top_push) - FCW'(top_pop);
    out_count  <= out_count + FCW'(out_push) - FCW'(out_pop);
    bot_count  <= bot_count + int'(bot_push) - int'(bot_pop);
    load_count <= load_count + int'(load_push) - int'(load_pop);
  end

  int checks = 0, failures = 0;
  int throttle = 0;
  always @(negedge clk) dec_valid = (throttle == 0) || (($urandom % 100) >= throttle);

  // per-phase counters
  int n_part, n_rd, n_wr, n_take, n_rle, n_last, n_cyc, stalls;
  phase_e cur;
  file_id_t rd_f, wr_f;
  int rd_req_seen;
  always @(posedge clk) begin
    n_cyc++;
    if (part_en && rst_n)
      for (int r = 0; r < PN; r++) begin
        automatic bit want = (n_part == 2 * r) || (n_part == int'(mat_size) + 2 * r);
        checks++;
        if (left_f[r] !== want) begin
          failures++;
          if (failures < 10) $display("FAIL: marker of row %0d at step %0d is %0b (%s, N=%0d, tau=%0d)", r, n_part, left_f[r], phase.name(), mat_size, dut.tau);
        end
      end
    n_part += int'(part_en);
    n_rd   += int'(ram_rd_en);
    n_wr   += int'(ram_wr_en);
    n_take += int'(dec_take);
    n_rle  += int'(rle_valid);
    n_last += int'(rle_valid && rle_last);
    stalls += int'(stall);
    if (hd_rd_req) begin rd_f = hd_rd_file; rd_req_seen++; end
    if (rle_valid) wr_f = dut.wr_file_now;
    if (ram_wr_en && int'(ram_wr_addr) >= int'(ram_rd_addr) &&
        (phase inside {PH_A1, PH_A2, PH_B, PH_C2, PH_FINAL}) && int'(ram_rd_addr) < int'(mat_size) + PN) begin
      failures++;
      $display("FAIL: RAM write to %0d before it was read (read at %0d)", ram_wr_addr, ram_rd_addr);
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic file_id_t fid(file_kind_e k, int r, int c);
    file_id_t f;
    f.kind = k; f.row = 24'(r); f.col = 24'(c);
    return f;
  endfunction

  task automatic expect_phase(int n, phase_e ph, int r, int c, bit timed);
    int nt = n / PN, lv = n + PN, lh = n + 2 * PN, lt = n + 3 * PN;
    bit is_tile = (ph inside {PH_A1, PH_A2, PH_B, PH_C1, PH_C2});
    string tag;
    $sformat(tag, "N=%0d %s(%0d,%0d)", n, ph.name(), r, c);
    checks++;
    if (phase != ph || (is_tile && (int'(dut.tile_r) != r || int'(dut.tile_c) != c))) begin
      failures++;
      $display("FAIL %s: controller is in %s(%0d,%0d)", tag, phase.name(), dut.tile_r, dut.tile_c);
    end
    n_part = 0; n_rd = 0; n_wr = 0; n_take = 0; n_rle = 0; n_last = 0; n_cyc = 0; rd_req_seen = 0;
    rd_f = '0; wr_f = '0;
    while (phase == ph && (!is_tile || (int'(dut.tile_r) == r && int'(dut.tile_c) == c))) @(posedge clk);
    expect_eq({tag, " partition steps"}, n_part, is_tile ? lt : 0);
    expect_eq({tag, " RAM reads"}, n_rd, (ph inside {PH_A1, PH_A2, PH_B, PH_C2, PH_FINAL}) ? lv : 0);
    expect_eq({tag, " RAM writes"}, n_wr, (ph inside {PH_LOAD, PH_A1, PH_B, PH_C1, PH_C2}) ? lv : 0);
    expect_eq({tag, " disk words read"}, n_take,
              (ph inside {PH_LOAD, PH_A1}) ? lv : ((ph inside {PH_B, PH_C1, PH_C2}) ? lh : 0));
    expect_eq({tag, " disk words written"}, n_rle,
              (ph inside {PH_A1, PH_A2, PH_B}) ? lh : ((ph inside {PH_C2, PH_FINAL}) ? lv : 0));
    expect_eq({tag, " stream ends"}, n_last, (ph inside {PH_A1, PH_A2, PH_B, PH_C2, PH_FINAL}) ? 1 : 0);
    if (ph inside {PH_LOAD, PH_A1}) begin
      checks++;
      if (rd_f != fid(FILE_INPUT, 0, (ph == PH_LOAD) ? 0 : c + 1)) begin failures++; $display("FAIL %s: read file", tag); end
    end
    if (ph inside {PH_B, PH_C1, PH_C2}) begin
      checks++;
      if (rd_f != fid(FILE_HSLICE, r, c)) begin failures++; $display("FAIL %s: read file", tag); end
    end
    if (ph inside {PH_A1, PH_A2, PH_B}) begin
      checks++;
      if (wr_f != fid(FILE_HSLICE, r, c + 1)) begin failures++; $display("FAIL %s: write file", tag); end
    end
    if (ph inside {PH_C2, PH_FINAL}) begin
      checks++;
      if (wr_f != fid(FILE_OUTPUT, 0, (ph == PH_FINAL) ? nt - 1 : c - 1 - nt)) begin failures++; $display("FAIL %s: write file", tag); end
    end
    if (timed && is_tile) begin
      checks++;
      if (n_cyc > lt + 4) begin failures++; $display("FAIL %s: took %0d cycles for %0d steps", tag, n_cyc, lt); end
    end
  endtask

  task automatic run(int n, bit timed);
    int nt = n / PN;
    @(negedge clk);
    mat_size = CNT_W'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_phase(n, PH_LOAD, 0, 0, timed);
    for (int c = 0; c < 2 * nt; c++) begin
      int rlo = (c > nt) ? c - nt : 0;
      int rhi = (c < nt - 1) ? c : nt - 1;
      for (int r = rlo; r <= rhi; r++) begin
        phase_e ph;
        if (c == r) ph = (r == nt - 1) ? PH_A2 : PH_A1;
        else if (c - r == nt) ph = (r == 0) ? PH_C1 : PH_C2;
        else ph = PH_B;
        expect_phase(n, ph, r, c, timed);
      end
    end
    expect_phase(n, PH_FINAL, 0, 0, timed);
    checks++;
    if (!done || phase != PH_DONE) begin failures++; $display("FAIL: not done after FINAL"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(12, 1'b1);
    // without a slow disk the only waits are the RAM read latency at the
    // start of a tile that reads RAM: at most two cycles per tile
    checks++;
    if (stalls > 2 * (3 * 4)) begin failures++; $display("FAIL: %0d stalls without a slow disk", stalls); end
    stalls = 0;
    throttle = 60;
    run(8, 1'b0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall although the disk was slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
