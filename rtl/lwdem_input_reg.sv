// lwdem_input_reg: input flip-flop bank of the DAC.
//
// Captures the input code on every rising edge of the sample clock, so that
// both the barrel shifters and the rotation-number logic see one stable code
// for a whole sample period.  In the LW-DEM converter the same registered
// code supplies the segment data and the rotation numbers.  The flip-flop
// bank is part of the design; its asynchronous active-low reset to code 0 is
// this design's own choice.
//
// Interface: clk, rst_n, din (code B_N..B_1, din[0] = B1), dout.
// Timing: dout follows din one clock later.
module lwdem_input_reg #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= din;
  end

endmodule
