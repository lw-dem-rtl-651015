// tb_lwdem_input_reg: self-checking test of the input flip-flop bank.
// Checks the reset value, then that every clock edge captures the code
// presented before it (one clock of latency) over random codes.
module tb_lwdem_input_reg;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [11:0] din, dout;
  int checks = 0, failures = 0;

  lwdem_input_reg dut (.clk, .rst_n, .din, .dout);

  always #20ns clk = ~clk;   // 25 MS/s

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 12'hABC;
    #1ns rst_n = 1'b0;
    #4ns;
    checks++;
    if (dout !== 12'h000) begin failures++; $display("FAIL reset: %h", dout); end
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic [11:0] v;
      v = 12'($urandom);
      din = v;
      @(posedge clk); #1ns;
      checks++;
      if (dout !== v) begin failures++; $display("FAIL capture %0d: %h expected %h", t, dout, v); end
      din = ~v;            // changes between edges must not show
      #5ns;
      checks++;
      if (dout !== v) begin failures++; $display("FAIL hold %0d: %h expected %h", t, dout, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
