// Unit test of the slice buffer: random pushes and pops (never past full or
// empty) against a queue kept here; checks data order, empty, full, count.
module tb_sync_fifo;
  localparam int WIDTH = 8;
  localparam int DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || int'(count) != model.size()) begin
        failures++;
        $display("FAIL flags: empty=%0b full=%0b count=%0d model=%0d", empty, full, count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data !== model[0]) begin
          failures++;
          $display("FAIL data: %h expected %h", rd_data, model[0]);
        end
      end
      rd_en   = (model.size() > 0) && ($urandom % 2);
      wr_en   = ((model.size() < DEPTH) || rd_en) && ($urandom % 2);
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
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
