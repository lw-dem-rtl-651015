// tb_lwdem_static: static transfer characteristic of the DAC, with and
// without LW-DEM, over all 4096 codes.
//
// The DAC is built with mismatched sources (SIGMA = 5 % per LLSB unit).  The
// codes 0..4095 are stepped through slowly, in DEM_OFF and in DEM_LW, and
// the differential output is compared with the straight line through its
// end points.  Every code's switch gates are checked against the reference
// model.  Expected, as in the measured characteristic of the converter: the
// largest error is of the same order in both modes, but without DEM the
// error keeps its sign over long runs of codes (it is set by the few
// mismatched MSB sources), while with LW-DEM it changes sign far more often
// because every code uses a different set of sources.
module tb_lwdem_static;
  import lwdem_pkg::*;
  import lwdem_ref_pkg::*;

  localparam int N = 4096;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [11:0] din;
  dem_mode_e   mode;
  seg_code_t   ext_rot [3];
  sw_ctrl_t    sw_p, sw_n;
  real         iout_p, iout_n;

  lwdem_dac #(.SIGMA(0.05), .SEED(3)) dut (
    .clk, .rst_n, .din, .mode, .ext_rot, .sw_p, .sw_n, .iout_p, .iout_n
  );

  always #20ns clk = ~clk;

  int checks = 0, failures = 0;
  real y [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Sweep all codes in mode m; return the number of sign changes of the
  // end-point error and the largest error, both in LLSB units.
  task automatic sweep(dem_mode_e m, output int sign_changes, output real max_err);
    real lsb, err, prev_err;
    mode = m;
    for (int c = 0; c < N + 2; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        checks++;
        if (sw_p !== ref_ctrl(12'(c - 2), m, ext_rot)) begin
          failures++;
          $display("FAIL switches at code %0d mode %s", c - 2, m.name());
        end
        y[c-2] = iout_p - iout_n;
      end
      din = (c < N) ? 12'(c) : 12'(N - 1);
    end
    lsb = (y[N-1] - y[0]) / real'(N - 1);
    sign_changes = 0;
    max_err = 0.0;
    prev_err = 0.0;
    for (int c = 1; c < N - 1; c++) begin
      err = (y[c] - y[0]) / lsb - real'(c);
      if (absr(err) > max_err) max_err = absr(err);
      if (c > 1 && ((err > 0.0) != (prev_err > 0.0))) sign_changes++;
      prev_err = err;
    end
  endtask

  initial begin
    int  sc_off, sc_lw;
    real me_off, me_lw;
    din = '0;
    mode = DEM_OFF;
    for (int c = 0; c < 3; c++) ext_rot[c] = '0;
    #1ns rst_n = 1'b0;
    #10ns rst_n = 1'b1;
    sweep(DEM_OFF, sc_off, me_off);
    sweep(DEM_LW,  sc_lw,  me_lw);
    $display("DEM off: max error %.3f LLSB, %0d sign changes", me_off, sc_off);
    $display("LW-DEM : max error %.3f LLSB, %0d sign changes", me_lw, sc_lw);
    checks++;
    if (!(sc_lw > 2 * sc_off)) begin
      failures++;
      $display("FAIL LW-DEM error does not alternate more often");
    end
    checks++;
    if (!(me_lw < 4.0 * me_off && me_off < 4.0 * me_lw)) begin
      failures++;
      $display("FAIL largest errors not of the same order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
