// partition - the n x n systolic array that is time-shared over the virtual
// transitive-closure array.
//
// The virtual array for an N x N matrix has N rows (one per pivot k) and,
// after shearing each row k by k positions to the right, 2N columns; data
// then flows only downwards and to the right, so it can be cut into n x n
// tiles and processed tile by tile. A tile at the left border (kind A)
// contains the diagonal of PIVOT cells, one at the right border (kind C) the
// diagonal of EDGE cells, and interior tiles (kind B) only NORMAL cells. The
// cell roles are derived here from the local coordinates (r, q) and kind:
//   A: q == r PIVOT, q > r NORMAL, q < r IDLE
//   B: NORMAL everywhere
//   C: q == r EDGE,  q < r NORMAL, q > r IDLE
// Interface (all n bits wide, one bit per column q or per row r):
//   top_d[q]   row stream entering column q from above
//   left_x[r]  pivot-column stream entering row r from the left
//   left_f[r]  "first row" markers entering row r from the left
//   bot_d[q]   registered outputs of the last row
//   right_x[r] registered outputs of the last column
// Timing: cell (r, q) handles block slot s at local step s + q + 2r, so a
// value needed by the tile below appears on bot_d 2n steps before that tile
// consumes it and a value for the tile to the right appears on right_x n
// steps early. Every register advances only while en is high.
module partition
  import mc_pkg::*;
#(
  parameter int unsigned PN = 32   // partition edge length n
) (
  input  logic          clk,
  input  logic          en,
  input  tile_kind_e    kind,
  input  logic [PN-1:0] top_d,
  input  logic [PN-1:0] left_x,
  input  logic [PN-1:0] left_f,
  output logic [PN-1:0] bot_d,
  output logic [PN-1:0] right_x
);

  // d[r][q] enters cell (r, q) from above; x/f[r][q] enter it from the left.
  logic [PN:0][PN-1:0] d;
  logic [PN-1:0][PN:0] x;
  logic [PN-1:0][PN:0] f;

  assign d[0] = top_d;
  assign bot_d = d[PN];

  for (genvar r = 0; r < PN; r++) begin : g_row
    assign x[r][0]   = left_x[r];
    assign f[r][0]   = left_f[r];
    assign right_x[r] = x[r][PN];
    for (genvar q = 0; q < PN; q++) begin : g_col
      dpu_mode_e mode;
      always_comb begin
        unique case (kind)
          TILE_A:  mode = (q == r) ? DPU_PIVOT : ((q > r) ? DPU_NORMAL : DPU_IDLE);
          TILE_C:  mode = (q == r) ? DPU_EDGE  : ((q < r) ? DPU_NORMAL : DPU_IDLE);
          default: mode = DPU_NORMAL;
        endcase
      end
      dpu u_dpu (
        .clk   (clk),
        .en    (en),
        .mode  (mode),
        .d_in  (d[r][q]),
        .x_in  (x[r][q]),
        .fx_in (f[r][q]),
        .d_out (d[r+1][q]),
        .x_out (x[r][q+1]),
        .fx_out(f[r][q+1])
      );
    end
  end

endmodule
