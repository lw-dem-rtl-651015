// lwdem_rotation_select: rotation numbers of the three barrel shifters.
//
// In lightweight DEM the rotation numbers are not drawn from a PRNG but taken
// from the input code itself, using only bits B1..B9 (B1 = LSB of the code):
// the three MSBs B10..B12 hardly change for slow signals and are left out.
// The bits are assigned by "Method-I", which gives the fastest-changing bits
// to the largest rotation step:
//
//              MSB shifter   ULSB shifter   LSB shifter
//   4-step        B1            B2             B3
//   2-step        B4            B5             B6
//   1-step        B7            B8             B9
//
// so R_MSB = {B1,B4,B7}, R_ULSB = {B2,B5,B8} and R_LSB = {B3,B6,B9}.  That
// table is the design's.  Two more sources can be selected for comparison:
// DEM_OFF forces every rotation number to 0 (plain binary-weighted
// selection) and DEM_EXT passes rotation numbers from outside, e.g. from a
// PRNG for conventional RRBS DEM.  The converter was measured in both of
// those modes, but the mode encoding and the ext_rot port are this design's
// own.
//
// Interface: code (registered input code, code[0] = B1), mode, ext_rot,
// rot[SEG_*] (rotation numbers).  Purely combinational.
module lwdem_rotation_select
  import lwdem_pkg::*;
(
  input  logic [N_BITS-1:0] code,
  input  dem_mode_e         mode,
  input  seg_code_t         ext_rot [N_UNARY_SEGS],
  output seg_code_t         rot     [N_UNARY_SEGS]
);

  // Method-I: column c (LSB=0, ULSB=1, MSB=2) of the table above takes the
  // bits B(3-c), B(6-c), B(9-c) as its 4-, 2- and 1-step bits.
  seg_code_t lw_rot [N_UNARY_SEGS];

  always_comb begin
    for (int unsigned c = 0; c < N_UNARY_SEGS; c++) begin
      // B(n) is code[n-1].
      lw_rot[c] = {code[2-c], code[5-c], code[8-c]};
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < N_UNARY_SEGS; c++) begin
      unique case (mode)
        DEM_LW:  rot[c] = lw_rot[c];
        DEM_EXT: rot[c] = ext_rot[c];
        default: rot[c] = '0;
      endcase
    end
  end

endmodule
