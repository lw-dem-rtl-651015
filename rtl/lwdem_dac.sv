// lwdem_dac: 12-bit current-steering DAC with lightweight dynamic element
// matching (LW-DEM).
//
// A current-steering DAC adds up equal current sources, and the mismatch
// between them makes the output error depend on the code, which shows up as
// harmonic spurs.  Dynamic element matching changes, sample by sample, which
// physical sources make up each binary weight, so the error turns into
// noise.  Conventional random-rotation (RRBS) DEM takes the rotation of each
// barrel shifter from a PRNG; LW-DEM drops the PRNG and takes the rotation
// from low-order bits of the input code itself, which are random enough for
// real signals.
//
// The top joins the digital half (lwdem_digital: input flip-flops, rotation
// numbers, three barrel shifters, switch drivers) to a behavioural model of
// the analog half (lwdem_current_array: current switches, 3 x 7 unary and
// 3 binary sources, 8 mA full scale).  The bias circuit and clock buffer
// have no logic function and are not modelled.
//
// Interface: clk, rst_n (asynchronous, active low), din (12-bit offset-binary
// code, din[0] = B1), mode (DEM_OFF, DEM_LW, DEM_EXT), ext_rot (rotation
// numbers used in DEM_EXT), sw_p/sw_n (switch gate signals), iout_p/iout_n
// (differential output currents in amperes, from the model).
// Timing: one sample per clock (25 MS/s in the prototype); a code on din at
// clock edge k reaches the switches and the output currents after edge k+1.
module lwdem_dac
  import lwdem_pkg::*;
#(
  parameter real         I_FS  = 8.0e-3,   // full-scale output current (A)
  parameter real         SIGMA = 0.0,      // current-source mismatch (model only)
  parameter int unsigned SEED  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] din,
  input  dem_mode_e         mode,
  input  seg_code_t         ext_rot [N_UNARY_SEGS],
  output sw_ctrl_t          sw_p,
  output sw_ctrl_t          sw_n,
  output real               iout_p,
  output real               iout_n
);

  lwdem_digital u_digital (
    .clk, .rst_n, .din, .mode, .ext_rot, .sw_p, .sw_n
  );

  lwdem_current_array #(.I_FS(I_FS), .SIGMA(SIGMA), .SEED(SEED)) u_array (
    .sw_p, .sw_n, .iout_p, .iout_n
  );

endmodule
