// bit_fifo - variable-width bit queue between the disk and one run-length
// decoder lane.
//
// The disk side pushes a chunk of 0 .. CW bits per cycle (push_len, first bit
// in push_bits[0]); the decoder sees the oldest WIN bits in win (win[0] is
// the oldest) and removes 0 .. WIN of them per cycle with pop_len. count is
// the number of valid bits, space the free room. Storage is a DEPTH-bit
// shift register: popping shifts towards bit 0, pushing fills in above the
// bits that remain. A push that does not fit or a pop of bits that are not
// there is a usage error (asserted). This buffer exists so that a decoder can
// look at a whole run code at once; its depth and chunk size are this
// design's choices.
module bit_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned CW    = 16,  // largest push
  parameter int unsigned WIN   = 9,   // window and largest pop
  localparam int unsigned CNTW = $clog2(DEPTH + 1),
  localparam int unsigned PLW  = $clog2(CW + 1),
  localparam int unsigned OLW  = $clog2(WIN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CW-1:0]   push_bits,
  input  logic [PLW-1:0]  push_len,
  input  logic [OLW-1:0]  pop_len,
  output logic [WIN-1:0]  win,
  output logic [CNTW-1:0] count,
  output logic [CNTW-1:0] space
);

  logic [DEPTH-1:0] q;

  assign win   = q[WIN-1:0];
  assign space = CNTW'(DEPTH) - count;

  logic [DEPTH-1:0] kept, added, mask;
  logic [CNTW-1:0]  left;

  always_comb begin
    left  = count - CNTW'(pop_len);
    kept  = q >> pop_len;
    mask  = ~({DEPTH{1'b1}} << push_len);
    added = (DEPTH'(push_bits) & mask) << left;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      count <= '0;
    end else begin
      q     <= (kept & ~({DEPTH{1'b1}} << left)) | added;
      count <= left + CNTW'(push_len);
    end
  end

  a_pop_ok:  assert property (@(posedge clk) disable iff (!rst_n) CNTW'(pop_len) <= count);
  a_push_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              CNTW'(push_len) <= CNTW'(DEPTH) - count + CNTW'(pop_len));

endmodule
