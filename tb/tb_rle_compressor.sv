// Test of the run-length compressor: random slices of several densities
// (including long zero runs that must be split at 2^W-1) on 4 lanes with
// W = 3. The tokens of each lane are concatenated and decoded here by the
// code rules ('1' = one, '0' + W-bit length = run of zeros), and the result
// must equal the input. Also checks the exact token for a few known
// patterns and that each token leaves one cycle after its input bit.
module tb_rle_compressor;
  localparam int PN = 4;
  localparam int W  = 3;
  localparam int TW = 2 * W + 2;
  localparam int LW = $clog2(TW + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_last = 1'b0;
  logic [PN-1:0] in_bits = '0;
  logic code_valid;
  logic [PN-1:0][TW-1:0] code;
  logic [PN-1:0][LW-1:0] code_len;

  rle_compressor #(.PN(PN), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  bit sent [PN][$];
  bit coded [PN][$];
  bit iv_q = 1'b0;  // in_valid seen at the previous edge

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (code_valid !== iv_q) begin
        failures++;
        $display("FAIL: code_valid %0b, expected %0b", code_valid, iv_q);
      end
      if (code_valid)
        for (int l = 0; l < PN; l++)
          for (int b = 0; b < int'(code_len[l]); b++) coded[l].push_back(code[l][b]);
      iv_q = in_valid;
    end
  end

  task automatic send(int len, int dens);
    for (int t = 0; t < len; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = (t == len - 1);
      for (int l = 0; l < PN; l++) begin
        in_bits[l] = (($urandom % 100) < dens + 20 * l);
        sent[l].push_back(in_bits[l]);
      end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    @(posedge clk);
  endtask

  task automatic compare();
    for (int l = 0; l < PN; l++) begin
      bit got[$];
      while (coded[l].size() > 0) begin
        if (coded[l].pop_front()) got.push_back(1'b1);
        else begin
          int z = 0;
          for (int b = 0; b < W; b++) z |= int'(coded[l].pop_front()) << b;
          checks++;
          if (z == 0) begin failures++; $display("FAIL: zero-length run, lane %0d", l); end
          repeat (z) got.push_back(1'b0);
        end
      end
      checks++;
      if (got != sent[l]) begin
        failures++;
        $display("FAIL: lane %0d decoded %0d bits, sent %0d", l, got.size(), sent[l].size());
        for (int i = 0; i < got.size() && i < sent[l].size(); i++)
          if (got[i] != sent[l][i]) begin $display("  first difference at bit %0d", i); break; end
      end
      sent[l] = {};
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // known pattern on all lanes: 0 0 1 -> '0' + length 2 + '1' in one token
    @(negedge clk);
    in_valid = 1'b1; in_bits = '0; in_last = 1'b0;
    @(posedge clk); @(negedge clk);
    @(posedge clk); @(negedge clk);
    in_bits = '1; in_last = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (int'(code_len[0]) != W + 2 || code[0][W + 1:0] != {1'b1, 3'd2, 1'b0}) begin
      failures++;
      $display("FAIL: token for 001 is len %0d code %b", code_len[0], code[0]);
    end
    @(negedge clk); in_valid = 1'b0; in_last = 1'b0;
    @(posedge clk); #1;
    for (int l = 0; l < PN; l++) coded[l] = {};
    for (int k = 0; k < 30; k++) send(20 + ($urandom % 40), (k % 3 == 0) ? 2 : 25);
    repeat (3) @(posedge clk);
    compare();
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
