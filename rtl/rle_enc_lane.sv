// rle_enc_lane - run-length encoder for one bit stream.
//
// Code: each one is sent as a single '1'; each run of zeros is sent as a
// single '0' followed by W bits giving the run length (1 .. 2^W-1, least
// significant bit first). Runs longer than 2^W-1 are split. The encoder
// takes one input bit per cycle without ever stalling; because a run can only
// be closed when the next one or the end of the stream (last) arrives, one
// input bit can close a run and add a '1' (or close a full run and start and
// close a run of one at the end), so an output token holds up to 2W+2 bits.
// Tokens are registered: code/code_len/code_valid appear the cycle after
// the input. code[0] is the first bit of the token on the disk.
// The zero-run code follows the description of the run-length scheme; the
// length field width W, its bit order and the split of long runs are this
// design's choices.
module rle_enc_lane #(
  parameter int unsigned W  = 8,
  localparam int unsigned TW = 2 * W + 2,
  localparam int unsigned LW = $clog2(TW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic          in_last,
  output logic          code_valid,
  output logic [TW-1:0] code,
  output logic [LW-1:0] code_len
);

  localparam logic [W-1:0] MAXRUN = '1;

  logic [W-1:0] zc;  // zeros of the open run

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zc         <= '0;
      code_valid <= 1'b0;
      code       <= '0;
      code_len   <= '0;
    end else begin
      code_valid <= in_valid;
      if (in_valid) begin
        code     <= '0;
        code_len <= '0;
        if (in_bit) begin
          if (zc != 0) begin
            code     <= TW'({1'b1, zc, 1'b0});
            code_len <= LW'(W + 2);
          end else begin
            code     <= TW'(1);
            code_len <= LW'(1);
          end
          zc <= '0;
        end else if (zc == MAXRUN) begin
          if (in_last) begin
            code     <= {W'(1), 1'b0, MAXRUN, 1'b0};
            code_len <= LW'(TW);
            zc       <= '0;
          end else begin
            code     <= TW'({MAXRUN, 1'b0});
            code_len <= LW'(W + 1);
            zc       <= W'(1);
          end
        end else if (in_last) begin
          code     <= TW'({zc + 1'b1, 1'b0});
          code_len <= LW'(W + 1);
          zc       <= '0;
        end else begin
          zc <= zc + 1'b1;
        end
      end
    end
  end

endmodule
