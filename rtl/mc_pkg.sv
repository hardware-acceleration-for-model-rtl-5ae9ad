// Shared types for the transitive-closure coprocessor.
//
// The coprocessor emulates a large "sheared" systolic array for the Warshall
// algorithm (virtual row k handles pivot k, virtual column c = k + b holds the
// local column b of that stage) by running a small n x n partition over it,
// one rectangular tile at a time. This package holds the enumerations used to
// describe what each DPU in a tile does, which kind of tile is running, which
// phase of the schedule is active, and how slices are named on the disk.
package mc_pkg;

  // Role of one DPU in the virtual array, derived from c - k:
  //   c - k == 0      -> PIVOT  (local column 0 of stage k)
  //   0 < c - k < N   -> NORMAL (local columns 1 .. N-1)
  //   c - k == N      -> EDGE   (carries the pivot column down to the next stage)
  //   otherwise       -> IDLE   (outside the parallelogram)
  typedef enum logic [1:0] {
    DPU_IDLE   = 2'd0,
    DPU_PIVOT  = 2'd1,
    DPU_NORMAL = 2'd2,
    DPU_EDGE   = 2'd3
  } dpu_mode_e;

  // Kind of tile: the left border (holds the diagonal of pivots), an interior
  // tile, or the right border (holds the diagonal of edge DPUs).
  typedef enum logic [1:0] {
    TILE_A = 2'd0,
    TILE_B = 2'd1,
    TILE_C = 2'd2
  } tile_kind_e;

  // Phases of the schedule. LOAD brings the first input slice from disk to
  // RAM; FINAL writes the last output slice from RAM to disk.
  typedef enum logic [3:0] {
    PH_IDLE  = 4'd0,
    PH_LOAD  = 4'd1,
    PH_A1    = 4'd2,
    PH_A2    = 4'd3,
    PH_B     = 4'd4,
    PH_C1    = 4'd5,
    PH_C2    = 4'd6,
    PH_FINAL = 4'd7,
    PH_DONE  = 4'd8
  } phase_e;

  // Kinds of compressed streams kept on the disk.
  typedef enum logic [1:0] {
    FILE_INPUT  = 2'd0,   // column slice `col` of the input matrix
    FILE_HSLICE = 2'd1,   // horizontal slice read by tile (row, col)
    FILE_OUTPUT = 2'd2    // column slice `col` of the output matrix
  } file_kind_e;

  typedef struct packed {
    file_kind_e  kind;
    logic [23:0] row;
    logic [23:0] col;
  } file_id_t;

endpackage
