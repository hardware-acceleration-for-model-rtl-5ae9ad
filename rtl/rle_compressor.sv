// rle_compressor - the RLE block in front of the disk: one run-length
// encoder per bit lane of the partition edge (PN lanes).
//
// A slice is a stream of PN-bit words, one per step; lane r of the stream is
// encoded independently by rle_enc_lane, so every lane forms its own
// compressed bit stream on the disk. All lanes take a word in the same cycle
// (in_valid), in_last marks the final word of a slice and closes all open
// runs. One token per lane leaves the cycle after the input (see
// rle_enc_lane for the code). Keeping one encoder per lane follows the
// per-edge-bit compression described for the design; the token interface
// towards the disk controller is this design's choice.
module rle_compressor #(
  parameter int unsigned PN = 32,
  parameter int unsigned W  = 8,
  localparam int unsigned TW = 2 * W + 2,
  localparam int unsigned LW = $clog2(TW + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [PN-1:0]          in_bits,
  input  logic                   in_last,
  output logic                   code_valid,
  output logic [PN-1:0][TW-1:0]  code,
  output logic [PN-1:0][LW-1:0]  code_len
);

  logic [PN-1:0] lane_valid;

  for (genvar r = 0; r < PN; r++) begin : g_lane
    rle_enc_lane #(.W(W)) u_enc (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_bit    (in_bits[r]),
      .in_last   (in_last),
      .code_valid(lane_valid[r]),
      .code      (code[r]),
      .code_len  (code_len[r])
    );
  end

  // All lanes are driven by the same in_valid and so are valid together.
  assign code_valid = &lane_valid;

endmodule
