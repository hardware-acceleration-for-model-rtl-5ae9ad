// copro_ctrl - schedule and stream sequencing of the coprocessor.
//
// The virtual array for an N x N matrix is covered by n x n tiles; tile
// (R, C) holds virtual rows R*n .. R*n+n-1 and sheared columns C*n .. C*n+n-1.
// Only tiles with R <= C <= R + N/n touch the array. They are processed one
// tile column C at a time, from top to bottom, then the next column. Data that
// crosses a tile's bottom edge (the "vertical slice") goes to RAM for the
// tile below; data crossing the right edge (the "horizontal slice") goes,
// run-length coded, to disk for the tile to the right. The phase of a tile:
//   A1  left border, not last row: RAM -> partition -> disk, and the next
//       input column slice is loaded disk -> RAM at the same time
//   A2  left border, last row:     RAM -> partition -> disk
//   B   interior:                   RAM + disk -> partition -> RAM + disk
//   C1  right border, first row:    disk -> partition -> RAM
//   C2  right border, other rows:   disk -> partition -> RAM, and the output
//       column slice left in RAM by the tile column before goes RAM -> disk
// plus LOAD (first input slice disk -> RAM) before and FINAL (last output
// slice RAM -> disk) after. The phase names and what each moves follow the
// described schedule; the stream lengths below come from this design's
// timing (cell (r, q) handles slot s at local step s + q + 2r, with S = N+1
// slots per block, the last one flushing the pivot rows):
//   vertical slice  Lv = N + n words, written from step 2n on
//   horizontal slice Lh = N + 2n words, written from step n on
//   one tile takes L = N + 3n partition steps (plus stalls)
// Every stream moves one n-bit word per cycle at most. The partition steps
// only when its RAM word (top buffer), its disk word (decompressor) and room
// in the bottom buffer are all there; otherwise it stalls (stall = 1).
// The RAM is a one-cycle-latency memory with separate read and write ports;
// a write to address a waits until a has been read in the same phase, so
// one slice area of Lv words suffices. hd_wr_file is delayed one cycle to
// line up with the compressor's registered tokens. The design never reads
// an output stream back, so the upper bit of hd_rd_file.kind stays 0.
module copro_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned PN    = 32,  // partition edge n (power of two)
  parameter int unsigned CNT_W = 27,  // width of the matrix size N
  parameter int unsigned FDEPTH = 4,  // depth of the RAM-side buffers
  localparam int unsigned FCW  = $clog2(FDEPTH) + 1,
  localparam int unsigned AW   = CNT_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] mat_size,     // N, a multiple of PN
  output logic             busy,
  output logic             done,
  output phase_e           phase,
  output logic             stall,
  // partition
  output logic             part_en,
  output tile_kind_e       tile_kind,
  output logic             top_use,      // top input from top buffer, else 0
  output logic             left_use,     // left input from decompressor, else 0
  output logic [PN-1:0]    left_f,
  // top buffer (RAM -> partition)
  input  logic             top_empty,
  input  logic [FCW-1:0]   top_count,
  output logic             top_push,
  output logic             top_pop,
  // out buffer (RAM -> compressor)
  input  logic             out_empty,
  input  logic [FCW-1:0]   out_count,
  output logic             out_push,
  output logic             out_pop,
  // bottom buffer (partition -> RAM)
  input  logic             bot_empty,
  input  logic             bot_full,
  output logic             bot_push,
  output logic             bot_pop,
  // load buffer (decompressor -> RAM)
  input  logic             load_empty,
  input  logic             load_full,
  output logic             load_push,
  output logic             load_pop,
  // RAM
  output logic             ram_rd_en,
  output logic [AW-1:0]    ram_rd_addr,
  output logic             ram_wr_en,
  output logic [AW-1:0]    ram_wr_addr,
  output logic             ram_wr_from_load, // write data from load buffer, else bottom
  // compressor
  output logic             rle_valid,
  output logic             rle_last,
  output logic             rle_from_out,     // input from out buffer, else partition
  // decompressor
  input  logic             dec_valid,
  output logic             dec_take,
  // disk
  output logic             hd_rd_req,
  output file_id_t         hd_rd_file,
  output file_id_t         hd_wr_file
);

  localparam int unsigned LOG_PN = $clog2(PN);

  logic [AW-1:0] n_r, nt, lv, lh, lt;
  logic [AW-1:0] tile_r, tile_c;
  logic [AW-1:0] tau, rd_addr, wr_addr, load_cnt, out_cnt;
  logic          rd_inflight, rd_to_out;

  assign nt = n_r >> LOG_PN;
  assign lv = n_r + AW'(PN);
  assign lh = n_r + AW'(2 * PN);
  assign lt = n_r + AW'(3 * PN);

  // ---- what the current phase moves ----
  logic use_part, rd_top, rd_out, wr_bot, do_load, rd_left, wr_right, wr_out;
  always_comb begin
    use_part = phase inside {PH_A1, PH_A2, PH_B, PH_C1, PH_C2};
    rd_top   = phase inside {PH_A1, PH_A2, PH_B};
    rd_out   = phase inside {PH_C2, PH_FINAL};
    wr_bot   = phase inside {PH_B, PH_C1, PH_C2};
    do_load  = phase inside {PH_LOAD, PH_A1};
    rd_left  = phase inside {PH_B, PH_C1, PH_C2};
    wr_right = phase inside {PH_A1, PH_A2, PH_B};
    wr_out   = rd_out;
    unique case (phase)
      PH_A1, PH_A2: tile_kind = TILE_A;
      PH_C1, PH_C2: tile_kind = TILE_C;
      default:      tile_kind = TILE_B;
    endcase
  end

  // ---- partition stepping ----
  logic need_top, need_left, cap_bot, cap_right, top_ok, left_ok, bot_ok;
  always_comb begin
    need_top  = rd_top  && (tau < lv);
    need_left = rd_left && (tau < lh);
    cap_bot   = wr_bot  && (tau >= AW'(2 * PN)) && (tau < AW'(2 * PN) + lv);
    cap_right = wr_right && (tau >= AW'(PN)) && (tau < AW'(PN) + lh);
    top_ok    = !need_top  || !top_empty;
    left_ok   = !need_left || dec_valid;
    bot_ok    = !cap_bot   || !bot_full;
    part_en   = use_part && (tau < lt) && top_ok && left_ok && bot_ok;
    stall     = use_part && (tau < lt) && !part_en;
    top_use   = need_top;
    left_use  = need_left;
    top_pop   = part_en && need_top;
    bot_push  = part_en && cap_bot;
    for (int r = 0; r < PN; r++)
      left_f[r] = (tau == AW'(2 * r)) || (tau == n_r + AW'(2 * r));
  end

  // ---- RAM reads (into the top or the out buffer) ----
  logic rd_any, rd_room;
  always_comb begin
    rd_any      = rd_top || rd_out;
    rd_room     = rd_top ? (32'(top_count) + 32'(rd_inflight) < FDEPTH)
                         : (32'(out_count) + 32'(rd_inflight) < FDEPTH);
    ram_rd_en   = rd_any && (rd_addr < lv) && rd_room;
    ram_rd_addr = rd_addr;
    top_push    = rd_inflight && !rd_to_out;
    out_push    = rd_inflight && rd_to_out;
  end

  // ---- RAM writes (from the bottom or the load buffer) ----
  logic wr_src_ok, wr_order_ok;
  always_comb begin
    ram_wr_from_load = do_load;
    wr_src_ok   = do_load ? !load_empty : !bot_empty;
    wr_order_ok = !rd_any || (wr_addr < rd_addr);
    ram_wr_en   = (do_load || wr_bot) && (wr_addr < lv) && wr_src_ok && wr_order_ok;
    ram_wr_addr = wr_addr;
    load_pop    = ram_wr_en && do_load;
    bot_pop     = ram_wr_en && !do_load;
  end

  // ---- decompressor -> load buffer ----
  logic load_step;
  always_comb begin
    load_step = do_load && (load_cnt < lv) && dec_valid && !load_full;
    load_push = load_step;
    dec_take  = load_step || (part_en && need_left);
  end

  // ---- out buffer / partition -> compressor ----
  logic out_step;
  always_comb begin
    out_step     = wr_out && (out_cnt < lv) && !out_empty;
    out_pop      = out_step;
    rle_from_out = wr_out;
    rle_valid    = out_step || (part_en && cap_right);
    rle_last     = wr_out ? (out_cnt == lv - 1'b1)
                          : (tau == AW'(PN) + lh - 1'b1);
  end

  // ---- end of phase ----
  logic phase_done;
  always_comb begin
    phase_done = (!use_part || tau == lt)
              && (!rd_any   || (rd_addr == lv && !rd_inflight))
              && (!(do_load || wr_bot) || wr_addr == lv)
              && (!do_load  || load_cnt == lv)
              && (!wr_out   || out_cnt == lv);
  end

  // ---- next tile ----
  function automatic phase_e tile_phase(input logic [AW-1:0] r, input logic [AW-1:0] c,
                                        input logic [AW-1:0] ntiles);
    if (c == r)               return (r == ntiles - 1'b1) ? PH_A2 : PH_A1;
    else if (c - r == ntiles) return (r == 0) ? PH_C1 : PH_C2;
    else                      return PH_B;
  endfunction

  logic [AW-1:0] r_hi, nxt_c, nxt_r_lo;
  always_comb begin
    r_hi     = (tile_c < nt - 1'b1) ? tile_c : nt - 1'b1;
    nxt_c    = tile_c + 1'b1;
    nxt_r_lo = (nxt_c > nt) ? nxt_c - nt : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      n_r         <= '0;
      tile_r      <= '0;
      tile_c      <= '0;
      tau         <= '0;
      rd_addr     <= '0;
      wr_addr     <= '0;
      load_cnt    <= '0;
      out_cnt     <= '0;
      rd_inflight <= 1'b0;
      rd_to_out   <= 1'b0;
      done        <= 1'b0;
    end else begin
      rd_inflight <= ram_rd_en;
      rd_to_out   <= rd_out;
      if (part_en)   tau      <= tau + 1'b1;
      if (ram_rd_en) rd_addr  <= rd_addr + 1'b1;
      if (ram_wr_en) wr_addr  <= wr_addr + 1'b1;
      if (load_step) load_cnt <= load_cnt + 1'b1;
      if (out_step)  out_cnt  <= out_cnt + 1'b1;

      if (phase == PH_IDLE || phase == PH_DONE) begin
        if (start) begin
          n_r   <= AW'(mat_size);
          phase <= PH_LOAD;
          done  <= 1'b0;
        end
      end else if (phase_done) begin
        tau      <= '0;
        rd_addr  <= '0;
        wr_addr  <= '0;
        load_cnt <= '0;
        out_cnt  <= '0;
        if (phase == PH_LOAD) begin
          tile_r <= '0;
          tile_c <= '0;
          phase  <= tile_phase('0, '0, nt);
        end else if (phase == PH_FINAL) begin
          phase <= PH_DONE;
          done  <= 1'b1;
        end else if (tile_r < r_hi) begin
          tile_r <= tile_r + 1'b1;
          phase  <= tile_phase(tile_r + 1'b1, tile_c, nt);
        end else if (nxt_c == nt << 1) begin
          phase <= PH_FINAL;
        end else begin
          tile_c <= nxt_c;
          tile_r <= nxt_r_lo;
          phase  <= tile_phase(nxt_r_lo, nxt_c, nt);
        end
      end
    end
  end

  assign busy = !(phase inside {PH_IDLE, PH_DONE});

  // ---- disk stream names ----
  file_id_t wr_file_now;
  always_comb begin
    hd_rd_req  = (do_load && load_cnt < lv) || need_left;
    hd_rd_file = '0;
    if (do_load) begin
      hd_rd_file.kind = FILE_INPUT;
      hd_rd_file.col  = 24'((phase == PH_LOAD) ? '0 : tile_c + 1'b1);
    end else begin
      hd_rd_file.kind = FILE_HSLICE;
      hd_rd_file.row  = 24'(tile_r);
      hd_rd_file.col  = 24'(tile_c);
    end
    wr_file_now = '0;
    if (wr_out) begin
      wr_file_now.kind = FILE_OUTPUT;
      wr_file_now.col  = 24'((phase == PH_FINAL) ? nt - 1'b1 : tile_c - 1'b1 - nt);
    end else begin
      wr_file_now.kind = FILE_HSLICE;
      wr_file_now.row  = 24'(tile_r);
      wr_file_now.col  = 24'(tile_c + 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hd_wr_file <= '0;
    else        hd_wr_file <= wr_file_now;
  end

  a_size_multiple: assert property (@(posedge clk) disable iff (!rst_n)
                                    start && !busy |-> (32'(mat_size) % PN) == 0 && mat_size != 0);

endmodule
