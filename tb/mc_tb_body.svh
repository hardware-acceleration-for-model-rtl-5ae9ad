// Shared body of the end-to-end coprocessor testbenches. The including module
// defines PN, RLE_W, CW, QDEPTH, CNT_W, NMAX, NMATS, MAT_N[], DENS_PML[] (edge
// density in 1/1000), THROTTLE, EXPECT_SPLIT and MAX_CYCLES, and instantiates
// the coprocessor as `dut` on the signals of mc_tb_env.svh.
//
// Each run prepares a random matrix, writes it to the disk as run-length coded
// column slices, starts the coprocessor, then decodes the output slices and
// compares every element with a plain Warshall closure computed here.

  `include "mc_tb_env.svh"

  bit A [NMAX][NMAX];
  bit T [NMAX][NMAX];

  task automatic run_one(int n, int dens);
    int nt = n / PN;
    int lv = n + PN;
    longint unsigned t0;
    bit s[$];
    // random relation plus a few long chains so that the closure is rich
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        A[i][j] = (($urandom % 1000) < dens);
    for (int i = 0; i + 3 < n; i += 3) A[i][i + 3] = 1'b1;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) T[i][j] = A[i][j];
    for (int k = 0; k < n; k++)
      for (int i = 0; i < n; i++)
        if (T[i][k]) for (int j = 0; j < n; j++) T[i][j] |= T[k][j];
    disk.delete();
    for (int c = 0; c < nt; c++)
      for (int q = 0; q < PN; q++) begin
        s = {};
        for (int t = 0; t < lv; t++)
          s.push_back((t - q >= 0 && t - q < n) ? A[t - q][c * PN + q] : 1'b0);
        rle_put(key(fid(mc_pkg::FILE_INPUT, 0, c), q), s);
      end
    @(posedge clk);
    mat_size <= CNT_W'(n);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cycles;
    @(posedge clk);
    while (!done) @(posedge clk);
    $display("N=%0d: %0d cycles (%0d tiles of %0d steps, %0d stall cycles so far)",
             n, cycles - t0, nt * (nt + 1), n + 3 * PN, stall_cycles);
    // the run cannot be faster than its tiles' steps
    checks++;
    if (cycles - t0 < longint'(nt * (nt + 1) * (n + 3 * PN))) begin
      failures++;
      $display("FAIL: finished faster than the schedule allows");
    end
    // without a slow disk a run may only add a few cycles per tile
    if (!THROTTLE) begin
      checks++;
      if (cycles - t0 > longint'(nt * (nt + 1) * (n + 3 * PN + 8) + 2 * (lv + 8))) begin
        failures++;
        $display("FAIL: %0d cycles is too slow for the schedule", cycles - t0);
      end
    end
    for (int c = 0; c < nt; c++)
      for (int q = 0; q < PN; q++) begin
        rle_get(key(fid(mc_pkg::FILE_OUTPUT, 0, c), q), lv, s);
        checks++;
        if (s.size() != lv) begin
          failures++;
          $display("FAIL: output slice %0d lane %0d has %0d bits, expected %0d", c, q, s.size(), lv);
        end else begin
          for (int i = 0; i < n; i++) begin
            checks++;
            if (s[i + q] != T[i][c * PN + q]) begin
              failures++;
              if (failures < 10)
                $display("FAIL: T[%0d][%0d] = %0d, expected %0d", i, c * PN + q, s[i + q], T[i][c * PN + q]);
            end
          end
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int m = 0; m < NMATS; m++) run_one(MAT_N[m], DENS_PML[m]);
    // every mechanism of the design must have been exercised
    begin
      string names[7] = '{"LOAD", "A1", "A2", "B", "C1", "C2", "FINAL"};
      for (int p = 1; p <= 7; p++) begin
        checks++;
        $display("phase %s: %0d cycles", names[p - 1], ph_seen[p]);
        if (ph_seen[p] == 0) begin
          failures++;
          $display("FAIL: phase %s never ran", names[p - 1]);
        end
      end
    end
    $display("stall cycles: %0d, split runs: %0d, disk pushes: %0d", stall_cycles, split_runs, rd_pushes);
    checks++;
    if (THROTTLE && stall_cycles == 0) begin failures++; $display("FAIL: no stall"); end
    checks++;
    if (EXPECT_SPLIT && split_runs == 0) begin failures++; $display("FAIL: no long run split"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
