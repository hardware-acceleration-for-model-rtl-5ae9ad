// mc_coprocessor - coprocessor that computes the transitive closure of an
// N x N Boolean matrix (the reachability relation of a state graph) on a
// fixed n x n systolic partition.
//
// Structure (the dotted box of the block diagram): a run-length decompressor
// (deRLE) behind the disk read port, a run-length compressor (RLE) in front
// of the disk write port, the partition, four slice buffers and the
// multiplexers between them, all driven by copro_ctrl:
//   RAM read  -> top buffer  -> partition top edge        (phases A, B)
//   RAM read  -> out buffer  -> RLE -> disk               (C2, FINAL)
//   partition bottom edge -> bottom buffer -> RAM write   (B, C)
//   disk -> deRLE -> load buffer -> RAM write             (LOAD, A1)
//   disk -> deRLE -> partition left edge                  (B, C)
//   partition right edge -> RLE -> disk                   (A, B)
// The RAM (one vertical slice, N + n words of n bits) and the disk are
// outside: the RAM port is a plain one-cycle-latency read port plus a write
// port; the disk write port carries one run-length token per lane and cycle
// (hd_wr_valid), tagged with the stream name hd_wr_file; the disk read
// port lets the disk push up to CW compressed bits per lane and cycle into
// the deRLE queues while hd_rd_req is high, from the stream hd_rd_file.
// Data formats on the disk (per lane q of a column slice, one bit per step
// t): input slice C holds A[t-q][C*n+q] for 0 <= t-q < N, else 0, for
// t = 0 .. N+n-1; output slice C holds the closure bit T[t-q][C*n+q] in the
// same layout. Each lane is run-length coded on its own.
// Start with start high for a cycle (mat_size = N, a multiple of n); done
// rises when the last output slice has been written. stall is high in each
// cycle in which the partition waits for the disk or the RAM.
module mc_coprocessor
  import mc_pkg::*;
#(
  parameter int unsigned PN     = 32,  // partition edge n
  parameter int unsigned RLE_W  = 8,   // run-length field width
  parameter int unsigned CNT_W  = 27,  // width of N
  parameter int unsigned FDEPTH = 4,   // slice buffer depth (words)
  parameter int unsigned QDEPTH = 64,  // deRLE bit queue depth per lane
  parameter int unsigned CW     = 16,  // disk read chunk per lane and cycle
  localparam int unsigned TW    = 2 * RLE_W + 2,
  localparam int unsigned LW    = $clog2(TW + 1),
  localparam int unsigned QCW   = $clog2(QDEPTH + 1),
  localparam int unsigned PLW   = $clog2(CW + 1),
  localparam int unsigned AW    = CNT_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [CNT_W-1:0]        mat_size,
  output logic                    busy,
  output logic                    done,
  output phase_e                  phase,
  output logic                    stall,
  // RAM
  output logic                    ram_rd_en,
  output logic [AW-1:0]           ram_rd_addr,
  input  logic [PN-1:0]           ram_rd_data,
  output logic                    ram_wr_en,
  output logic [AW-1:0]           ram_wr_addr,
  output logic [PN-1:0]           ram_wr_data,
  // disk write
  output logic                    hd_wr_valid,
  output file_id_t                hd_wr_file,
  output logic [PN-1:0][TW-1:0]   hd_wr_code,
  output logic [PN-1:0][LW-1:0]   hd_wr_len,
  // disk read
  output logic                    hd_rd_req,
  output file_id_t                hd_rd_file,
  input  logic [PN-1:0][CW-1:0]   hd_rd_bits,
  input  logic [PN-1:0][PLW-1:0]  hd_rd_len,
  output logic [PN-1:0][QCW-1:0]  hd_rd_space
);

  localparam int unsigned FCW = $clog2(FDEPTH) + 1;

  tile_kind_e    tile_kind;
  logic          part_en, top_use, left_use;
  logic [PN-1:0] left_f, bot_d, right_x;
  logic          top_empty, top_push, top_pop;
  logic          out_empty, out_push, out_pop;
  logic          bot_empty, bot_full, bot_push, bot_pop;
  logic          load_empty, load_full, load_push, load_pop;
  logic [FCW-1:0] top_count, out_count;
  logic [PN-1:0] top_q, out_q, bot_q, load_q;
  logic          ram_wr_from_load, rle_valid, rle_last, rle_from_out;
  logic          dec_valid, dec_take;
  logic [PN-1:0] dec_bits;

  copro_ctrl #(.PN(PN), .CNT_W(CNT_W), .FDEPTH(FDEPTH)) u_ctrl (
    .clk, .rst_n, .start, .mat_size, .busy, .done, .phase, .stall,
    .part_en, .tile_kind, .top_use, .left_use, .left_f,
    .top_empty, .top_count, .top_push, .top_pop,
    .out_empty, .out_count, .out_push, .out_pop,
    .bot_empty, .bot_full, .bot_push, .bot_pop,
    .load_empty, .load_full, .load_push, .load_pop,
    .ram_rd_en, .ram_rd_addr, .ram_wr_en, .ram_wr_addr, .ram_wr_from_load,
    .rle_valid, .rle_last, .rle_from_out,
    .dec_valid, .dec_take,
    .hd_rd_req, .hd_rd_file, .hd_wr_file
  );

  // RAM -> partition
  sync_fifo #(.WIDTH(PN), .DEPTH(FDEPTH)) u_top_buf (
    .clk, .rst_n, .wr_en(top_push), .wr_data(ram_rd_data), .rd_en(top_pop),
    .rd_data(top_q), .empty(top_empty), .full(), .count(top_count));

  // RAM -> compressor (output slices)
  sync_fifo #(.WIDTH(PN), .DEPTH(FDEPTH)) u_out_buf (
    .clk, .rst_n, .wr_en(out_push), .wr_data(ram_rd_data), .rd_en(out_pop),
    .rd_data(out_q), .empty(out_empty), .full(), .count(out_count));

  // partition -> RAM
  sync_fifo #(.WIDTH(PN), .DEPTH(FDEPTH)) u_bot_buf (
    .clk, .rst_n, .wr_en(bot_push), .wr_data(bot_d), .rd_en(bot_pop),
    .rd_data(bot_q), .empty(bot_empty), .full(bot_full), .count());

  // decompressor -> RAM (input slices)
  sync_fifo #(.WIDTH(PN), .DEPTH(FDEPTH)) u_load_buf (
    .clk, .rst_n, .wr_en(load_push), .wr_data(dec_bits), .rd_en(load_pop),
    .rd_data(load_q), .empty(load_empty), .full(load_full), .count());

  partition #(.PN(PN)) u_part (
    .clk,
    .en     (part_en),
    .kind   (tile_kind),
    .top_d  (top_use  ? top_q    : '0),
    .left_x (left_use ? dec_bits : '0),
    .left_f (left_f),
    .bot_d  (bot_d),
    .right_x(right_x)
  );

  assign ram_wr_data = ram_wr_from_load ? load_q : bot_q;

  rle_compressor #(.PN(PN), .W(RLE_W)) u_rle (
    .clk, .rst_n,
    .in_valid  (rle_valid),
    .in_bits   (rle_from_out ? out_q : right_x),
    .in_last   (rle_last),
    .code_valid(hd_wr_valid),
    .code      (hd_wr_code),
    .code_len  (hd_wr_len)
  );

  rle_decompressor #(.PN(PN), .W(RLE_W), .DEPTH(QDEPTH), .CW(CW)) u_derle (
    .clk, .rst_n,
    .hd_bits  (hd_rd_bits),
    .hd_len   (hd_rd_len),
    .hd_space (hd_rd_space),
    .out_valid(dec_valid),
    .out_bits (dec_bits),
    .out_take (dec_take)
  );

endmodule
