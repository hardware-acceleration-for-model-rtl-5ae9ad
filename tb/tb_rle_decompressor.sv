// Test of the run-length decompressor: random bit streams on 4 lanes
// (W = 3, so runs over 7 zeros are split), run-length coded here, fed in
// chunks of random size at random moments, and read back word by word at
// random moments. The decoded words must equal the original lanes, words
// may only be offered when every lane has its bit, and the queues must end
// empty. Also checks that a stream of ones is decoded at one word per
// cycle once data is queued.
module tb_rle_decompressor;
  localparam int PN = 4;
  localparam int W = 3;
  localparam int DEPTH = 32;
  localparam int CW = 8;
  localparam int CNTW = $clog2(DEPTH + 1);
  localparam int PLW = $clog2(CW + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PN-1:0][CW-1:0]   hd_bits = '0;
  logic [PN-1:0][PLW-1:0]  hd_len = '0;
  logic [PN-1:0][CNTW-1:0] hd_space;
  logic out_valid;
  logic [PN-1:0] out_bits;
  logic out_take = 1'b0;

  rle_decompressor #(.PN(PN), .W(W), .DEPTH(DEPTH), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  bit src [PN][$];     // original bits still expected
  bit enc [PN][$];     // coded bits still to push
  bit feed_on = 1'b0;
  int feed_pct = 50, take_pct = 50;

  task automatic encode(int l, int len, int dens);
    int z = 0;
    for (int t = 0; t < len; t++) begin
      bit b = (($urandom % 100) < dens);
      src[l].push_back(b);
      if (b) begin
        if (z > 0) begin
          enc[l].push_back(1'b0);
          for (int k = 0; k < W; k++) enc[l].push_back(bit'((z >> k) & 1));
        end
        enc[l].push_back(1'b1);
        z = 0;
      end else begin
        z++;
        if (z == (1 << W) - 1) begin
          enc[l].push_back(1'b0);
          for (int k = 0; k < W; k++) enc[l].push_back(bit'((z >> k) & 1));
          z = 0;
        end
      end
    end
    if (z > 0) begin
      enc[l].push_back(1'b0);
      for (int k = 0; k < W; k++) enc[l].push_back(bit'((z >> k) & 1));
    end
  endtask

  // disk side
  always @(negedge clk) begin
    for (int l = 0; l < PN; l++) begin
      hd_bits[l] = '0;
      hd_len[l]  = '0;
      if (feed_on && int'(hd_space[l]) >= CW && enc[l].size() > 0 && ($urandom % 100) < feed_pct) begin
        automatic int n = 1 + ($urandom % CW);
        automatic int k = 0;
        while (k < n && enc[l].size() > 0) begin
          hd_bits[l][k] = enc[l].pop_front();
          k++;
        end
        hd_len[l] = PLW'(k);
      end
    end
  end

  // consumer side
  int words = 0;
  always @(negedge clk) begin
    out_take = out_valid && (($urandom % 100) < take_pct);
  end
  always @(posedge clk) begin
    if (rst_n && out_take) begin
      words++;
      for (int l = 0; l < PN; l++) begin
        checks++;
        if (src[l].size() == 0) begin
          failures++;
          $display("FAIL: lane %0d produced more bits than sent", l);
        end else if (out_bits[l] !== src[l].pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL: lane %0d word %0d wrong", l, words);
        end
      end
    end
  end

  initial begin
    int w0, c0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      int len = 30 + ($urandom % 60);
      for (int l = 0; l < PN; l++) encode(l, len, (round % 4 == 0) ? 3 : 20 + 15 * l);
      feed_on = 1'b1;
      feed_pct = (round % 2) ? 100 : 30;
      take_pct = (round % 3) ? 100 : 40;
      while (src[0].size() > 0) @(posedge clk);
      repeat (2) @(posedge clk);
    end
    // rate: ones only, queued in advance, must come out one word per cycle
    take_pct = 0;
    for (int l = 0; l < PN; l++) encode(l, 16, 100);
    feed_pct = 100;
    repeat (12) @(posedge clk);
    w0 = words;
    take_pct = 100;
    repeat (9) @(posedge clk);
    checks++;
    if (words - w0 < 8) begin
      failures++;
      $display("FAIL: only %0d words in 9 cycles", words - w0);
    end
    while (src[0].size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int l = 0; l < PN; l++) begin
      checks++;
      if (src[l].size() != 0 || enc[l].size() != 0 || int'(hd_space[l]) != DEPTH) begin
        failures++;
        $display("FAIL: lane %0d left %0d/%0d bits, space %0d", l, src[l].size(), enc[l].size(), hd_space[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
