// lwdem_current_array: behavioural model of the current switches and the
// current source array (analog; not synthesizable logic).
//
// The converter's analog half holds 3 x 7 equal unary sources for the MSB,
// ULSB and LSB segments, with unit currents of 512, 64 and 8 LLSB units,
// and three binary sources of 4, 2 and 1 LLSB units.  Each source sits under
// a differential switch pair that steers its current to the positive or the
// negative output.  Full scale is 4095 LLSB units = I_FS.  The segment
// weights and the 8 mA full-scale current are the design's; the model of
// mismatch is this design's own: every source gets a fixed relative error
// drawn once from a normal distribution (seeded by SEED), so that a
// testbench can see what dynamic element matching does with it.  SIGMA is
// the relative deviation of a single LLSB unit; a source of W units is taken
// to be W units in parallel, so its deviation is SIGMA / sqrt(W).
// SIGMA = 0 gives an ideal array.  A source whose two switches are both on
// splits its current evenly; one with both off delivers nothing.
//
// Interface: sw_p, sw_n (switch gate signals), iout_p, iout_n (output
// currents in amperes).  The outputs follow the switches without delay.
module lwdem_current_array
  import lwdem_pkg::*;
#(
  parameter real         I_FS  = 8.0e-3,   // full-scale current (A)
  parameter real         SIGMA = 0.0,      // relative mismatch of one LLSB unit
  parameter int unsigned SEED  = 1
) (
  input  sw_ctrl_t sw_p,
  input  sw_ctrl_t sw_n,
  output real      iout_p,
  output real      iout_n
);

  localparam real I_UNIT = I_FS / real'((1 << N_BITS) - 1);   // one LLSB unit

  // Element e of the flattened struct: 0..2 LLSB (1,2,4), 3..9 LSB,
  // 10..16 ULSB, 17..23 MSB.
  real     weight [N_SWITCHES];   // nominal current in LLSB units
  real     err    [N_SWITCHES];   // relative mismatch
  logic [N_SWITCHES-1:0] p_on, n_on;

  assign p_on = sw_p;
  assign n_on = sw_n;

  function automatic real nominal_weight(int unsigned e);
    if (e < SEG_BITS) return real'(1 << e);
    return real'(1 << (SEG_BITS * (1 + (e - SEG_BITS) / N_UNITS)));
  endfunction

  // Normal deviate from two uniform ones (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 32'd1000000) + 0.5) / 1.0e6;
    u2 = (real'($urandom % 32'd1000000) + 0.5) / 1.0e6;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    void'($urandom(SEED));
    for (int unsigned e = 0; e < N_SWITCHES; e++) begin
      weight[e] = nominal_weight(e);
      err[e]    = SIGMA * gauss() / $sqrt(weight[e]);
    end
  end

  always_comb begin
    real ip, in_;
    ip  = 0.0;
    in_ = 0.0;
    for (int unsigned e = 0; e < N_SWITCHES; e++) begin
      real i_e;
      i_e = I_UNIT * weight[e] * (1.0 + err[e]);
      if (p_on[e] && n_on[e]) begin
        ip  += 0.5 * i_e;
        in_ += 0.5 * i_e;
      end else if (p_on[e]) begin
        ip  += i_e;
      end else if (n_on[e]) begin
        in_ += i_e;
      end
    end
    iout_p = ip;
    iout_n = in_;
  end

endmodule
