// rle_decompressor - the deRLE block behind the disk: PN lanes, each a
// bit_fifo fed by the disk and an rle_dec_lane.
//
// The disk side pushes up to CW compressed bits per lane and cycle
// (hd_len[r] bits of hd_bits[r]); hd_space[r] tells how much room is left.
// The consumer sees a decoded PN-bit word on out_bits with out_valid high
// only when every lane has its next bit, and takes the whole word with
// out_take; lanes therefore advance in lock step, as the partition edge and
// the RAM word need. A lane that lacks bits holds back all lanes: this is
// where a slow disk stalls the computation. One decoder per lane mirrors
// the per-lane compressor; queue depth and chunk width are this design's
// choices.
module rle_decompressor #(
  parameter int unsigned PN    = 32,
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned CW    = 16,
  localparam int unsigned CNTW = $clog2(DEPTH + 1),
  localparam int unsigned PLW  = $clog2(CW + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PN-1:0][CW-1:0]     hd_bits,
  input  logic [PN-1:0][PLW-1:0]    hd_len,
  output logic [PN-1:0][CNTW-1:0]   hd_space,
  output logic                      out_valid,
  output logic [PN-1:0]             out_bits,
  input  logic                      out_take
);

  localparam int unsigned OLW = $clog2(W + 2);

  logic [PN-1:0] lane_avail;

  for (genvar r = 0; r < PN; r++) begin : g_lane
    logic [W:0]      win;
    logic [CNTW-1:0] cnt;
    logic [OLW-1:0]  pop_len;

    bit_fifo #(.DEPTH(DEPTH), .CW(CW), .WIN(W + 1)) u_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .push_bits(hd_bits[r]),
      .push_len (hd_len[r]),
      .pop_len  (pop_len),
      .win      (win),
      .count    (cnt),
      .space    (hd_space[r])
    );

    rle_dec_lane #(.W(W), .CNTW(CNTW)) u_dec (
      .clk      (clk),
      .rst_n    (rst_n),
      .win      (win),
      .win_count(cnt),
      .take     (out_take),
      .avail    (lane_avail[r]),
      .out_bit  (out_bits[r]),
      .pop_len  (pop_len)
    );
  end

  assign out_valid = &lane_avail;

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) out_take |-> out_valid);

endmodule
