// rle_dec_lane - run-length decoder for one bit stream (inverse of
// rle_enc_lane).
//
// It reads codes from the window of a bit_fifo: '1' yields a one, '0'
// followed by a W-bit length L yields L zeros. A decoded bit is offered on
// out_bit with avail high; the consumer takes it by raising take in the
// same cycle, which pops the code from the queue (1 or W+1 bits, pop_len)
// and, for a run, loads the counter of zeros still owed. Zeros of an open run
// need no queue bits, so the lane delivers one bit per cycle as long as the
// next code is in the window. Timing: combinational from window to
// avail/out_bit/pop_len; the run counter is registered.
module rle_dec_lane #(
  parameter int unsigned W    = 8,
  parameter int unsigned CNTW = 7,
  localparam int unsigned OLW = $clog2(W + 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W:0]      win,
  input  logic [CNTW-1:0] win_count,
  input  logic            take,
  output logic            avail,
  output logic            out_bit,
  output logic [OLW-1:0]  pop_len
);

  logic [W-1:0] zleft;  // zeros still owed from the current run

  always_comb begin
    pop_len = '0;
    if (zleft != 0) begin
      avail   = 1'b1;
      out_bit = 1'b0;
    end else if (win_count != 0 && win[0]) begin
      avail   = 1'b1;
      out_bit = 1'b1;
      if (take) pop_len = OLW'(1);
    end else begin
      avail   = (win_count >= CNTW'(W + 1));
      out_bit = 1'b0;
      if (take) pop_len = OLW'(W + 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zleft <= '0;
    end else if (take) begin
      if (zleft != 0)
        zleft <= zleft - 1'b1;
      else if (!win[0])
        zleft <= win[W:1] - 1'b1;
    end
  end

  a_take_avail: assert property (@(posedge clk) disable iff (!rst_n) take |-> avail);

endmodule
