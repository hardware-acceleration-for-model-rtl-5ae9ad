// Unit test of one DPU: random inputs in every role, each registered output
// compared with the cell rules written out here (pivot store and release,
// Warshall update d | (x & p), edge turn-around, idle pass-through, stall
// with en low).
module tb_dpu;
  import mc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en, d_in, x_in, fx_in;
  dpu_mode_e mode;
  logic d_out, x_out, fx_out;

  dpu dut (.*);

  int checks = 0, failures = 0;
  bit p_ref;          // reference copy of the stored pivot bit
  bit p_known = 0;
  bit exp_d, exp_x, exp_f;
  bit chk_d, chk_x;

  task automatic check(string what, bit got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (mode %s)", what, got, exp, mode.name());
    end
  endtask

  initial begin
    en = 1'b0; d_in = 1'b0; x_in = 1'b0; fx_in = 1'b0; mode = DPU_NORMAL;
    // load a known pivot bit first
    @(negedge clk);
    en = 1'b1; mode = DPU_NORMAL; fx_in = 1'b1; d_in = 1'b1;
    @(posedge clk); #1;
    p_ref = 1'b1; p_known = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      mode  = dpu_mode_e'($urandom % 4);
      en    = ($urandom % 8) != 0;
      d_in  = 1'($urandom);
      x_in  = 1'($urandom);
      fx_in = (($urandom % 4) == 0);
      // expected values after this edge
      exp_d = d_out; exp_x = x_out; exp_f = fx_out;
      chk_d = 1'b1; chk_x = 1'b1;
      if (en) begin
        exp_f = fx_in;
        case (mode)
          DPU_PIVOT:  begin exp_d = 1'b0; exp_x = fx_in ? p_ref : d_in; end
          DPU_NORMAL: begin exp_x = x_in; exp_d = fx_in ? p_ref : (d_in | (x_in & p_ref)); end
          DPU_EDGE:   begin exp_d = x_in; exp_x = 1'b0; end
          default:    begin exp_d = 1'b0; exp_x = x_in; end
        endcase
      end
      @(posedge clk); #1;
      if (en && fx_in && (mode == DPU_PIVOT || mode == DPU_NORMAL)) p_ref = d_in;
      check("d_out", d_out, exp_d);
      check("x_out", x_out, exp_x);
      check("fx_out", fx_out, exp_f);
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
