// Test of the partition on its own: the testbench plays the part of the
// schedule, keeping the vertical slice and the horizontal slices in arrays,
// and runs every tile (R, C) with R <= C <= R + N/n of the sheared virtual
// array for a 4 x 4 partition. Input slices are the skewed matrix columns
// (column q of a slice lags q steps); output slices are compared bit by bit
// with a software Warshall closure. Sizes N = 4 (tiles A and C only), 8 and
// 12 (all three tile kinds). Each tile is run for exactly N + 3n steps, so
// the tile latency is checked too.
module tb_partition;
  import mc_pkg::*;
  localparam int PN = 4;
  localparam int NMAX = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0;
  tile_kind_e kind = TILE_B;
  logic [PN-1:0] top_d = '0, left_x = '0, left_f = '0;
  logic [PN-1:0] bot_d, right_x;

  partition #(.PN(PN)) dut (.*);

  int checks = 0, failures = 0;
  bit A [NMAX][NMAX];
  bit T [NMAX][NMAX];
  logic [PN-1:0] V  [NMAX + PN];                   // vertical slice (RAM)
  logic [PN-1:0] VN [NMAX + PN];                   // vertical slice being written
  logic [PN-1:0] H  [NMAX / PN][NMAX + 2 * PN];     // horizontal slice per tile row
  logic [PN-1:0] HN [NMAX + 2 * PN];
  logic [PN-1:0] O  [2 * NMAX / PN][NMAX + PN];     // output slices

  task automatic run_tile(int n, int r, int c);
    int nt = n / PN, lv = n + PN, lh = n + 2 * PN, lt = n + 3 * PN;
    bit is_a = (c == r), is_c = (c - r == nt);
    kind = is_a ? TILE_A : (is_c ? TILE_C : TILE_B);
    for (int tau = 0; tau < lt; tau++) begin
      @(negedge clk);
      // capture the registered outputs ("values at step tau")
      if (tau >= PN && tau < PN + lh) HN[tau - PN] = right_x;
      if (tau >= 2 * PN && tau < 2 * PN + lv) VN[tau - 2 * PN] = bot_d;
      top_d  = (!is_c && tau < lv) ? V[tau] : '0;
      left_x = (!is_a && tau < lh) ? H[r][tau] : '0;
      for (int q = 0; q < PN; q++) left_f[q] = (tau == 2 * q) || (tau == n + 2 * q);
      en = 1'b1;
      @(posedge clk);
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic run_n(int n, int dens);
    int nt = n / PN, lv = n + PN;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) A[i][j] = (($urandom % 100) < dens);
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) T[i][j] = A[i][j];
    for (int k = 0; k < n; k++) for (int i = 0; i < n; i++)
      if (T[i][k]) for (int j = 0; j < n; j++) T[i][j] |= T[k][j];
    for (int c = 0; c < 2 * nt; c++) begin
      int rlo = (c > nt) ? c - nt : 0;
      int rhi = (c < nt - 1) ? c : nt - 1;
      // top of the column: an input slice or nothing
      for (int t = 0; t < lv; t++)
        for (int q = 0; q < PN; q++)
          V[t][q] = (c < nt && t - q >= 0 && t - q < n) ? A[t - q][c * PN + q] : 1'b0;
      for (int r = rlo; r <= rhi; r++) begin
        if (r > rlo) V = VN;           // vertical slice from the tile above
        run_tile(n, r, c);
        if (c != r + nt) H[r] = HN;     // horizontal slice for the next column
      end
      if (c >= nt) O[c - nt] = VN;     // bottom of a right-half column: output
    end
    for (int c = 0; c < nt; c++)
      for (int q = 0; q < PN; q++)
        for (int i = 0; i < n; i++) begin
          checks++;
          if (O[c][i + q][q] !== T[i][c * PN + q]) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d T[%0d][%0d] = %0b expected %0b",
                                        n, i, c * PN + q, O[c][i + q][q], T[i][c * PN + q]);
          end
        end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run_n(4, 40);
    run_n(8, 25);
    run_n(12, 12);
    run_n(12, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
