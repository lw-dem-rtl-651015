// lwdem_digital: digital half of the LW-DEM DAC, from the input code to the
// gate signals of the current switches.
//
// The registered 12-bit code B12..B1 is cut into four 3-bit segments.  The
// three upper segments each go through a 3-bit barrel shifter that spreads
// the segment code over seven equal elements in groups of 1, 2 and 4 and
// rotates the groups; the LLSB segment drives its binary sources directly:
//     B12..B10 -> shifter, rotation {B1,B4,B7} -> 7 MSB elements
//     B9..B7   -> shifter, rotation {B2,B5,B8} -> 7 ULSB elements
//     B6..B4   -> shifter, rotation {B3,B6,B9} -> 7 LSB elements
//     B3..B1   -> 4, 2, 1 x LLSB elements (no DEM)
// In LW-DEM mode the rotation numbers are input bits (Method-I above); they
// can also be forced to zero (plain binary-weighted DAC) or taken from the
// ext_rot input (conventional RRBS with an outside PRNG).  All 24 selects are
// re-timed by the clocked switch drivers.  Segmentation, shifter wiring and
// the Method-I bits follow the prototype; the mode input and its encoding,
// the ext_rot port and the reset values are this design's own.
//
// Interface: clk, rst_n (asynchronous, active low), din (din[0] = B1), mode,
// ext_rot (rotation numbers for DEM_EXT, index SEG_LSB/ULSB/MSB), sw_p/sw_n
// (complementary switch gate signals).
// Timing: one sample per clock; a code on din at clock edge k reaches sw_p
// and sw_n at edge k+1 (two clocks of latency).  mode acts on the code held
// in the input flip-flops; ext_rot is registered together with din.
module lwdem_digital
  import lwdem_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] din,
  input  dem_mode_e         mode,
  input  seg_code_t         ext_rot [N_UNARY_SEGS],
  output sw_ctrl_t          sw_p,
  output sw_ctrl_t          sw_n
);

  logic [N_BITS-1:0] code;
  logic [N_UNARY_SEGS*SEG_BITS-1:0] ext_flat, ext_flat_q;
  seg_code_t ext_rot_q [N_UNARY_SEGS];
  seg_code_t rot       [N_UNARY_SEGS];
  seg_code_t seg_code  [N_UNARY_SEGS];
  unary_t    seg_sel   [N_UNARY_SEGS];
  sw_ctrl_t  ctrl;

  // Input flip-flops for the code and for the external rotation numbers.
  lwdem_input_reg #(.WIDTH(N_BITS)) u_din_reg (
    .clk, .rst_n, .din(din), .dout(code)
  );

  for (genvar c = 0; c < N_UNARY_SEGS; c++) begin : g_ext
    assign ext_flat[c*SEG_BITS +: SEG_BITS] = ext_rot[c];
    assign ext_rot_q[c] = ext_flat_q[c*SEG_BITS +: SEG_BITS];
  end

  lwdem_input_reg #(.WIDTH(N_UNARY_SEGS*SEG_BITS)) u_ext_reg (
    .clk, .rst_n, .din(ext_flat), .dout(ext_flat_q)
  );

  // Rotation numbers (Method-I in LW-DEM mode).
  lwdem_rotation_select u_rot (
    .code(code), .mode(mode), .ext_rot(ext_rot_q), .rot(rot)
  );

  // One barrel shifter per unary segment: segment c takes B(3c+6)..B(3c+4).
  for (genvar c = 0; c < N_UNARY_SEGS; c++) begin : g_seg
    assign seg_code[c] = code[SEG_BITS*(c+1) +: SEG_BITS];
    lwdem_barrel_shifter u_shifter (
      .code(seg_code[c]), .rot(rot[c]), .sel(seg_sel[c])
    );
  end

  assign ctrl.msb  = seg_sel[SEG_MSB];
  assign ctrl.ulsb = seg_sel[SEG_ULSB];
  assign ctrl.lsb  = seg_sel[SEG_LSB];
  assign ctrl.llsb = code[SEG_BITS-1:0];

  lwdem_switch_driver u_drv (
    .clk, .rst_n, .ctrl(ctrl), .sw_p(sw_p), .sw_n(sw_n)
  );

endmodule
