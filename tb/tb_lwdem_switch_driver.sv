// tb_lwdem_switch_driver: self-checking test of the clocked switch drivers.
// Checks the reset state (every element to the negative output), the one
// clock latency, and that sw_n is the complement of sw_p for random
// controls.
module tb_lwdem_switch_driver;
  import lwdem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  sw_ctrl_t ctrl, sw_p, sw_n;
  int checks = 0, failures = 0;

  lwdem_switch_driver dut (.clk, .rst_n, .ctrl, .sw_p, .sw_n);

  always #20ns clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '1;
    #1ns rst_n = 1'b0;
    #4ns;
    checks++;
    if (sw_p !== '0 || sw_n !== '1) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      sw_ctrl_t v;
      v = sw_ctrl_t'($urandom);
      ctrl = v;
      #5ns;
      checks++;   // nothing moves before the edge
      if (t > 0 && sw_p === v && v !== ctrl_prev) begin failures++; $display("FAIL early %0d", t); end
      @(posedge clk); #1ns;
      checks++;
      if (sw_p !== v || sw_n !== ~v) begin
        failures++;
        $display("FAIL drive %0d: p=%h n=%h expected %h", t, sw_p, sw_n, v);
      end
      ctrl_prev = v;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sw_ctrl_t ctrl_prev = '0;
endmodule
