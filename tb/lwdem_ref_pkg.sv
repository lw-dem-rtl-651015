// lwdem_ref_pkg: reference model of the LW-DEM DAC's switch selection, for
// the testbenches.  Written from the selection rule, not from the RTL:
// element i of a 7-element segment is on when bit g of the segment code is
// on, g being the binary group (0: one element, 1: two, 2: four) found at
// unrotated position (i - R) mod 7.  Rotation numbers follow Method-I in
// LW-DEM mode (MSB {B1,B4,B7}, ULSB {B2,B5,B8}, LSB {B3,B6,B9}).  Also holds
// a 15-bit LFSR (x^15 + x^14 + 1) used as a stand-in for the external PRNG
// of conventional RRBS DEM.
package lwdem_ref_pkg;
  import lwdem_pkg::*;

  function automatic logic [6:0] ref_unary(logic [2:0] c, logic [2:0] r);
    logic [6:0] s;
    for (int i = 0; i < 7; i++) begin
      int k = (i - int'(r) % 7 + 7) % 7;
      s[i] = c[(k == 0) ? 0 : (k < 3) ? 1 : 2];
    end
    return s;
  endfunction

  // Rotation number of segment c (SEG_LSB/ULSB/MSB) for a registered code.
  function automatic logic [2:0] ref_rot(logic [11:0] code, dem_mode_e m,
                                         seg_code_t e [3], int c);
    logic [2:0] lw [3];
    lw[SEG_MSB]  = {code[0], code[3], code[6]};   // B1, B4, B7
    lw[SEG_ULSB] = {code[1], code[4], code[7]};   // B2, B5, B8
    lw[SEG_LSB]  = {code[2], code[5], code[8]};   // B3, B6, B9
    case (m)
      DEM_LW:  return lw[c];
      DEM_EXT: return e[c];
      default: return 3'd0;
    endcase
  endfunction

  function automatic sw_ctrl_t ref_ctrl(logic [11:0] code, dem_mode_e m, seg_code_t e [3]);
    sw_ctrl_t s;
    s.msb  = ref_unary(code[11:9], ref_rot(code, m, e, SEG_MSB));
    s.ulsb = ref_unary(code[8:6],  ref_rot(code, m, e, SEG_ULSB));
    s.lsb  = ref_unary(code[5:3],  ref_rot(code, m, e, SEG_LSB));
    s.llsb = code[2:0];
    return s;
  endfunction

  function automatic logic [14:0] lfsr_next(logic [14:0] s);
    return {s[13:0], s[14] ^ s[13]};
  endfunction

  // Number of switch pairs that change between two samples.
  function automatic int n_switched(sw_ctrl_t a, sw_ctrl_t b);
    return $countones(a ^ b);
  endfunction

endpackage
