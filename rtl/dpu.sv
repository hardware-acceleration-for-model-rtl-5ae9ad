// dpu - one data processing unit of the transitive-closure systolic array.
//
// A DPU at virtual position (stage k, column c) works on one matrix row per
// step. Rows arrive from above (d_in), the pivot-column bit of the same row
// arrives from the left (x_in) together with a "first" marker (fx_in) that
// flags the first row of a block, which is the pivot row of this stage.
//   PIVOT : stores the pivot-row bit on "first"; otherwise forwards the row's
//           pivot-column bit to the right. On "first" it sends the stored
//           pivot bit to the right instead, so the pivot row leaves last.
//   NORMAL: stores the pivot-row bit t[k][j] on "first" and then emits the
//           previously stored one; otherwise emits d_in | (x_in & p), the
//           Warshall update t[i][j] |= t[i][k] & t[k][j].
//   EDGE  : turns the rightward pivot-column stream into the downward stream
//           of the next stage's last local column.
//   IDLE  : outside the array; passes the left-to-right signals on.
// All outputs are registered and advance only when en is high, so a whole
// partition can be stalled. Data only moves down and to the right.
// The function and the mapping (j, k to space, i to time) follow the
// Warshall mapping; the exact cell behaviour, the row/column rotation used
// to keep data flowing down/right and the four-state role encoding are this
// design's own.
module dpu
  import mc_pkg::*;
(
  input  logic      clk,
  input  logic      en,
  input  dpu_mode_e mode,
  input  logic      d_in,    // row bit from the DPU above
  input  logic      x_in,    // pivot-column bit from the DPU to the left
  input  logic      fx_in,   // "first row of block" marker from the left
  output logic      d_out,   // to the DPU below
  output logic      x_out,   // to the DPU to the right
  output logic      fx_out   // marker to the right
);

  logic p;  // stored pivot-row bit

  always_ff @(posedge clk) begin
    if (en) begin
      fx_out <= fx_in;
      unique case (mode)
        DPU_PIVOT: begin
          d_out <= 1'b0;
          if (fx_in) begin
            p     <= d_in;
            x_out <= p;
          end else begin
            x_out <= d_in;
          end
        end
        DPU_NORMAL: begin
          x_out <= x_in;
          if (fx_in) begin
            p     <= d_in;
            d_out <= p;
          end else begin
            d_out <= d_in | (x_in & p);
          end
        end
        DPU_EDGE: begin
          d_out <= x_in;
          x_out <= 1'b0;
        end
        default: begin
          d_out <= 1'b0;
          x_out <= x_in;
        end
      endcase
    end
  end

endmodule
