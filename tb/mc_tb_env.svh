// Environment shared by the coprocessor testbenches. The including module
// defines PN, RLE_W, CW, QDEPTH, CNT_W, NMAX (largest matrix edge) and THROTTLE,
// and instantiates the coprocessor as `dut` on the signals declared here.
//
// It provides a RAM (one-cycle read latency, separate write port, NMAX + PN
// words) and a disk that keeps every named stream as one bit queue per lane,
// keyed by stream name and lane. The disk stores what the compressor writes
// and pushes up to CW bits per lane into the decompressor whenever it has
// room, at random moments when THROTTLE is set so that the partition has to
// stall. rle_put and rle_get code and decode a lane's bit stream the way the
// design does: a 1 is written as 1, a run of z zeros (1 <= z <= 2^RLE_W - 1,
// longer runs split) as 0 followed by z in RLE_W bits, least significant first.

  localparam int TW  = 2 * RLE_W + 2;
  localparam int LW  = $clog2(TW + 1);
  localparam int QCW = $clog2(QDEPTH + 1);
  localparam int PLW = $clog2(CW + 1);
  localparam int AW  = CNT_W + 1;
  localparam int MAXRUN = (1 << RLE_W) - 1;


  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] mat_size = '0;
  logic busy, done, stall;
  mc_pkg::phase_e phase;
  logic ram_rd_en, ram_wr_en;
  logic [AW-1:0] ram_rd_addr, ram_wr_addr;
  logic [PN-1:0] ram_rd_data = '0, ram_wr_data;
  logic hd_wr_valid, hd_rd_req;
  mc_pkg::file_id_t hd_wr_file, hd_rd_file;
  logic [PN-1:0][TW-1:0]  hd_wr_code;
  logic [PN-1:0][LW-1:0]  hd_wr_len;
  logic [PN-1:0][CW-1:0]  hd_rd_bits = '0;
  logic [PN-1:0][PLW-1:0] hd_rd_len = '0;
  logic [PN-1:0][QCW-1:0] hd_rd_space;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycles = 0;
  int ph_seen[16];
  int stall_cycles = 0, split_runs = 0, rd_pushes = 0;

  // ---------------- RAM ----------------
  logic [PN-1:0] ram [NMAX + PN];
  always_ff @(posedge clk) begin
    if (ram_rd_en) ram_rd_data <= ram[ram_rd_addr];
    if (ram_wr_en) ram[ram_wr_addr] <= ram_wr_data;
  end

  // ---------------- disk ----------------
  bit disk [longint unsigned][$];

  function automatic longint unsigned key(mc_pkg::file_id_t f, int lane);
    return (longint'(f) << 8) | longint'(lane);
  endfunction

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (busy) ph_seen[int'(phase)]++;
    if (stall) stall_cycles++;
    if (hd_wr_valid) begin
      for (int l = 0; l < PN; l++) begin
        automatic longint unsigned k = key(hd_wr_file, l);
        automatic int len = int'(hd_wr_len[l]);
        // A run of the largest length that is not the last code of a token
        // means a long run was split.
        if ((len == RLE_W + 1 || len == TW) && !hd_wr_code[l][0] &&
            int'(hd_wr_code[l][RLE_W:1]) == MAXRUN) split_runs++;
        for (int b = 0; b < len; b++) disk[k].push_back(hd_wr_code[l][b]);
      end
    end
  end

  always @(negedge clk) begin
    for (int l = 0; l < PN; l++) begin
      hd_rd_bits[l] = '0;
      hd_rd_len[l]  = '0;
      if (rst_n && hd_rd_req && int'(hd_rd_space[l]) >= CW &&
          (!THROTTLE || ($urandom % 4) == 0)) begin
        automatic longint unsigned k = key(hd_rd_file, l);
        if (disk.exists(k)) begin
          automatic int n = 0;
          while (n < CW && disk[k].size() > 0) begin
            hd_rd_bits[l][n] = disk[k].pop_front();
            n++;
          end
          hd_rd_len[l] = PLW'(n);
          if (n > 0) rd_pushes++;
        end
      end
    end
  end

  // ---------------- run-length code, as the design writes it ----------------
  task automatic rle_put(longint unsigned k, ref bit s[$]);
    int z = 0;
    disk[k] = {};
    foreach (s[i]) begin
      if (s[i]) begin
        if (z > 0) begin
          disk[k].push_back(1'b0);
          for (int b = 0; b < RLE_W; b++) disk[k].push_back(bit'((z >> b) & 1));
        end
        disk[k].push_back(1'b1);
        z = 0;
      end else begin
        z++;
        if (z == MAXRUN) begin
          disk[k].push_back(1'b0);
          for (int b = 0; b < RLE_W; b++) disk[k].push_back(bit'((z >> b) & 1));
          z = 0;
        end
      end
    end
    if (z > 0) begin
      disk[k].push_back(1'b0);
      for (int b = 0; b < RLE_W; b++) disk[k].push_back(bit'((z >> b) & 1));
    end
  endtask

  task automatic rle_get(longint unsigned k, int nbits, ref bit s[$]);
    s = {};
    while (s.size() < nbits && disk.exists(k) && disk[k].size() > 0) begin
      if (disk[k].pop_front()) s.push_back(1'b1);
      else begin
        int z = 0;
        for (int b = 0; b < RLE_W; b++) if (disk[k].size() > 0) z |= int'(disk[k].pop_front()) << b;
        repeat (z) s.push_back(1'b0);
      end
    end
  endtask

  function automatic mc_pkg::file_id_t fid(mc_pkg::file_kind_e kd, int r, int c);
    mc_pkg::file_id_t f;
    f.kind = kd;
    f.row  = 24'(r);
    f.col  = 24'(c);
    return f;
  endfunction
