// lwdem_pkg: types and constants shared by the LW-DEM DAC.
//
// The converter is a 12-bit current-steering DAC cut into four 3-bit segments
// (MSB, ULSB, LSB, LLSB).  Each of the three upper segments drives seven equal
// unit current sources through a 3-bit barrel shifter; the LLSB segment drives
// three binary-weighted sources (1, 2 and 4 LLSB units) directly.  The segment
// split and the sizes follow the prototype; the mode encoding is this design's
// own choice.
package lwdem_pkg;

  // Resolution and segmentation of the prototype.
  localparam int unsigned N_BITS   = 12;
  localparam int unsigned SEG_BITS = 3;
  localparam int unsigned N_UNITS  = (1 << SEG_BITS) - 1;   // 7 unit elements
  localparam int unsigned N_UNARY_SEGS = 3;                  // MSB, ULSB, LSB
  // Switches driven: 3 x 7 unary elements + 3 binary LLSB elements.
  localparam int unsigned N_SWITCHES = N_UNARY_SEGS * N_UNITS + SEG_BITS;

  // Index of each unary segment in the arrays below.
  localparam int unsigned SEG_LSB  = 0;
  localparam int unsigned SEG_ULSB = 1;
  localparam int unsigned SEG_MSB  = 2;

  typedef logic [SEG_BITS-1:0] seg_code_t;   // 3-bit segment code or rotation number
  typedef logic [N_UNITS-1:0]  unary_t;      // one select per unit element, bit k = I_k

  // Where the rotation numbers come from.
  typedef enum logic [1:0] {
    DEM_OFF = 2'd0,   // no rotation: plain binary-weighted selection
    DEM_LW  = 2'd1,   // lightweight DEM: rotation taken from input bits B1..B9
    DEM_EXT = 2'd2    // rotation supplied from outside (e.g. a PRNG, RRBS DEM)
  } dem_mode_e;

  // All switch controls of the converter for one sample.
  typedef struct packed {
    unary_t    msb;    // I_MSB elements
    unary_t    ulsb;   // I_ULSB elements
    unary_t    lsb;    // I_LSB elements
    seg_code_t llsb;   // 4, 2, 1 x I_LLSB (bit 2 = 4 I_LLSB)
  } sw_ctrl_t;

endpackage
