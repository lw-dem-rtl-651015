// tb_lwdem_current_array: self-checking test of the current array model.
// With an ideal array (SIGMA = 0) the positive output must carry
// I_FS * value / 4095, where value counts 512 per MSB element, 64 per ULSB
// element, 8 per LSB element and 4/2/1 for the LLSB bits, and the negative
// output the rest.  Also checks a pair with both sides on (current split)
// and, in a second instance with 1 % mismatch, that outputs still add up to
// close to full scale but no longer match the ideal values exactly.
module tb_lwdem_current_array;
  import lwdem_pkg::*;

  localparam real IFS = 8.0e-3;
  sw_ctrl_t sw_p, sw_n;
  real ip, in_, ipm, inm;
  int checks = 0, failures = 0;

  lwdem_current_array dut (.sw_p, .sw_n, .iout_p(ip), .iout_n(in_));
  lwdem_current_array #(.SIGMA(0.01), .SEED(7)) dut_mm (.sw_p, .sw_n, .iout_p(ipm), .iout_n(inm));

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check_close(string what, real got, real exp, real tol);
    checks++;
    if (absr(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: %e expected %e", what, got, exp);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_differ = 0;
    for (int t = 0; t < 400; t++) begin
      int value;
      sw_p = sw_ctrl_t'($urandom);
      sw_n = ~sw_p;
      #1;
      value = 512 * $countones(sw_p.msb) + 64 * $countones(sw_p.ulsb) +
              8 * $countones(sw_p.lsb) + int'(sw_p.llsb);
      check_close("iout_p", ip, IFS * value / 4095.0, 1e-12);
      check_close("iout_n", in_, IFS * (4095 - value) / 4095.0, 1e-12);
      check_close("mismatch total", ipm + inm, IFS, 0.05 * IFS);
      if (absr(ipm - ip) > 1e-12) n_differ++;
    end
    checks++;
    if (n_differ < 300) begin failures++; $display("FAIL mismatch not visible (%0d)", n_differ); end
    // one MSB element with both switches on: half of 512 units to each side
    sw_p = '0; sw_n = '1; sw_p.msb = 7'b0000001; #1;
    check_close("split p", ip, IFS * 256.0 / 4095.0, 1e-12);
    check_close("split n", in_, IFS * (4095.0 - 256.0) / 4095.0, 1e-12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
