// lwdem_switch_driver: clocked drivers of the differential current switches.
//
// Every current element is steered by a differential pair whose two gates
// must change together.  The driver bank re-times all 24 switch controls
// (3 x 7 unary elements and the 3 binary LLSB elements) on the sample clock,
// so the combinational skew of the barrel shifters never reaches the
// switches, and drives each pair with complementary signals: sw_p steers the
// element to the positive output, sw_n to the negative one.  That the drivers
// are clocked from the same clock as the input flip-flops is the design's;
// that they are plain flip-flops with complementary outputs, and that reset
// steers every element to the negative output, are this design's choices.
//
// Interface: clk, rst_n, ctrl (selects from the shifters), sw_p, sw_n.
// Timing: sw_p and sw_n follow ctrl one clock later; sw_n is always ~sw_p.
module lwdem_switch_driver
  import lwdem_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  sw_ctrl_t ctrl,
  output sw_ctrl_t sw_p,
  output sw_ctrl_t sw_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_p <= '0;
      sw_n <= '1;
    end else begin
      sw_p <= ctrl;
      sw_n <= ~ctrl;
    end
  end

  // Both sides of a pair must never be on, or off, together (reset included).
  a_complementary: assert property (@(posedge clk) (sw_p ^ sw_n) == '1);

endmodule
