// lwdem_barrel_shifter: 3-bit randomizer of one DAC segment.
//
// A 3-bit segment code B2 B1 B0 is first spread over the 2^3-1 = 7 equal unit
// elements in binary-weighted groups: with no rotation B0 drives element I0,
// B1 drives I1..I2 and B2 drives I3..I6.  The grouping is then rotated to the
// left by the rotation number R, so the group of B0 starts at element R and
// the groups of B1 and B2 follow it, wrapping round from I6 to I0.  Because
// there are seven elements the rotation is taken modulo 7, so R = 7 gives the
// same selection as R = 0.  This is the random-rotation binary-weighted
// selection (RRBS) mapping; in the LW-DEM converter R comes from input bits
// rather than from a PRNG.  The grouping, the rotation direction and the
// modulo-7 wrap all follow the worked examples of the design; the
// implementation as a logarithmic rotator (stages of 1, 2 and 4 positions)
// is this design's own.
//
// Interface: code (segment code), rot (rotation number), sel (element
// selects, bit k = element I_k).  Purely combinational, no clock.
module lwdem_barrel_shifter
  import lwdem_pkg::*;
#(
  parameter int unsigned SEG_W = SEG_BITS
) (
  input  logic [SEG_W-1:0]        code,
  input  logic [SEG_W-1:0]        rot,
  output logic [(1<<SEG_W)-2:0]   sel
);

  localparam int unsigned NU = (1 << SEG_W) - 1;

  logic [NU-1:0] grouped;            // unrotated binary-weighted grouping
  logic [NU-1:0] stage [SEG_W+1];    // rotator stages

  // Element k belongs to bit floor(log2(k+1)) of the code.
  always_comb begin
    for (int unsigned b = 0; b < SEG_W; b++) begin
      for (int unsigned k = (1 << b) - 1; k < (2 << b) - 1; k++) begin
        grouped[k] = code[b];
      end
    end
  end

  // Logarithmic left rotator: stage s rotates by 2^s when rot[s] is set.
  // The stages add up modulo NU, so the all-ones rotation number (NU)
  // rotates by a whole turn and leaves the grouping as it was.
  assign stage[0] = grouped;
  for (genvar s = 0; s < SEG_W; s++) begin : g_stage
    localparam int unsigned SH = 1 << s;
    assign stage[s+1] = rot[s] ? {stage[s][NU-1-SH:0], stage[s][NU-1:NU-SH]}
                               : stage[s];
  end

  assign sel = stage[SEG_W];

endmodule
