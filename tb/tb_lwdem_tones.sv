// tb_lwdem_tones: sine tones at 25 MS/s through the whole DAC with mismatched
// current sources: SFDR and switching activity, with and without DEM.
//
// Tones are coherently sampled over 4096 samples (an odd number of cycles),
// with full-scale 12-bit offset-binary codes.  The DAC's sources carry a
// fixed random mismatch (SIGMA = 5 % per LLSB unit, 0.22 % per MSB element).
// Four rotation sources are compared:
//   OFF   DEM disabled (plain binary-weighted selection)
//   LW    LW-DEM, rotation from B1..B9 (Method-I)
//   RRBS  rotation from a 15-bit LFSR through ext_rot
//   HIGH  rotation from B4..B12 of the same code through ext_rot, laid out
//         like Method-I: MSB {B4,B7,B10}, ULSB {B5,B8,B11}, LSB {B6,B9,B12}
// For each run the testbench
//   - checks every switch gate against the reference model;
//   - computes the spectrum of iout_p - iout_n with a 4096-point DFT and
//     the SFDR (fundamental over the largest other bin, DC excluded);
//   - counts the switch pairs that change between consecutive samples.
// Part 1 plays about 1.2 MHz (197 cycles) and 12.46 MHz (2041 cycles), the
// measured tones.  Part 2 sweeps tones from low frequency up to Nyquist.
// Checked: LW-DEM and RRBS give a higher SFDR than no DEM at every tone,
// and LW-DEM switches fewer elements than no DEM near Nyquist.  LW against
// HIGH is only reported: the model has static mismatch only, and every
// full-scale coherent tone then uses the same set of codes, so the SFDR of a
// rotation scheme that depends on the code alone cannot change with
// frequency here.  Frequency-dependent effects (the slowly moving upper
// bits at low frequency, timing skew) are outside this model.
module tb_lwdem_tones;
  import lwdem_pkg::*;
  import lwdem_ref_pkg::*;

  localparam int  N     = 4096;
  localparam real TWOPI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [11:0] din;
  dem_mode_e   mode;
  seg_code_t   ext_rot [3];
  sw_ctrl_t    sw_p, sw_n;
  real         iout_p, iout_n;

  lwdem_dac #(.SIGMA(0.05), .SEED(11)) dut (
    .clk, .rst_n, .din, .mode, .ext_rot, .sw_p, .sw_n, .iout_p, .iout_n
  );

  always #20ns clk = ~clk;

  int checks = 0, failures = 0;
  real cos_t [N], sin_t [N];
  real y [N];
  logic [14:0] lfsr = 15'h1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sfdr_db(int fund);
    real p_fund, p_spur, re, im, p;
    p_fund = 0.0;
    p_spur = 0.0;
    for (int k = 1; k < N / 2; k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < N; n++) begin
        int idx = (k * n) % N;
        re += y[n] * cos_t[idx];
        im -= y[n] * sin_t[idx];
      end
      p = re * re + im * im;
      if (k == fund) p_fund = p;
      else if (p > p_spur) p_spur = p;
    end
    return 10.0 * $log10(p_fund / p_spur);
  endfunction

  typedef enum int {V_OFF, V_LW, V_RRBS, V_HIGH} variant_e;

  function automatic seg_code_t [2:0] high_rot(logic [11:0] c);
    seg_code_t [2:0] r;
    r[SEG_MSB]  = {c[3], c[6], c[9]};    // B4, B7, B10
    r[SEG_ULSB] = {c[4], c[7], c[10]};   // B5, B8, B11
    r[SEG_LSB]  = {c[5], c[8], c[11]};   // B6, B9, B12
    return r;
  endfunction

  // Play one tone with one rotation source; returns SFDR and switching count.
  task automatic run(int cycles, variant_e v, output real sfdr, output longint switched);
    dem_mode_e m;
    logic [11:0] codes [N + 2];
    sw_ctrl_t prev, exp;
    seg_code_t ext_hist [N + 2][3];
    for (int n = 0; n < N + 2; n++) begin
      codes[n] = 12'($rtoi(2047.5 + 2047.0 * $sin(TWOPI * real'(cycles) * real'(n % N) / real'(N))));
    end
    m = (v == V_OFF) ? DEM_OFF : (v == V_LW) ? DEM_LW : DEM_EXT;
    mode = m;
    switched = 0;
    // The code driven before edge t reaches the switches after edge t+1.
    for (int t = 0; t < N + 2; t++) begin
      @(negedge clk);
      din = codes[t];
      lfsr = lfsr_next(lfsr);
      for (int c = 0; c < 3; c++) begin
        ext_hist[t][c] = (v == V_HIGH) ? high_rot(codes[t])[c] : lfsr[3*c +: 3];
      end
      ext_rot = ext_hist[t];
      if (t >= 2) begin
        exp = ref_ctrl(codes[t-2], m, ext_hist[t-2]);
        checks++;
        if (sw_p !== exp) begin
          failures++;
          $display("FAIL switches at sample %0d mode %s", t - 2, m.name());
        end
        y[t-2] = iout_p - iout_n;
        if (t > 2) switched += n_switched(prev, sw_p);
        prev = sw_p;
      end
    end
    // wrap round: N samples form an exact period
    switched += n_switched(prev, ref_ctrl(codes[0], m, ext_hist[0]));
    sfdr = sfdr_db(cycles);
  endtask

  initial begin
    int  tone  [2] = '{197, 2041};
    int  sweep [8] = '{11, 197, 501, 999, 1501, 1801, 2041, 2047};
    real sfdr [4];
    longint sw [4];
    real sum_lw = 0.0, sum_high = 0.0;
    for (int n = 0; n < N; n++) begin
      cos_t[n] = $cos(TWOPI * real'(n) / real'(N));
      sin_t[n] = $sin(TWOPI * real'(n) / real'(N));
    end
    din = '0;
    mode = DEM_OFF;
    for (int c = 0; c < 3; c++) ext_rot[c] = '0;
    #1ns rst_n = 1'b0;
    #10ns rst_n = 1'b1;

    // Part 1: the measured tones, switching activity included.
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 3; v++) begin
        run(tone[f], variant_e'(v), sfdr[v], sw[v]);
        $display("tone %4.2f MHz  %-6s SFDR %6.2f dB  switched %0d",
                 25.0 * tone[f] / N, variant_e'(v) == V_OFF ? "OFF" : variant_e'(v) == V_LW ? "LW" : "RRBS",
                 sfdr[v], sw[v]);
      end
      checks++;
      if (!(sfdr[V_LW] > sfdr[V_OFF])) begin
        failures++;
        $display("FAIL LW-DEM does not raise SFDR at tone %0d", tone[f]);
      end
      checks++;
      if (!(sfdr[V_RRBS] > sfdr[V_OFF])) begin
        failures++;
        $display("FAIL RRBS does not raise SFDR at tone %0d", tone[f]);
      end
      if (f == 1) begin
        checks++;
        if (!(sw[V_LW] < sw[V_OFF])) begin
          failures++;
          $display("FAIL LW-DEM does not reduce switching near Nyquist");
        end
      end
    end

    // Part 2: SFDR against frequency, and B1..B9 against B4..B12.
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 4; v++) run(sweep[f], variant_e'(v), sfdr[v], sw[v]);
      $display("sweep %5.2f MHz  SFDR OFF %6.2f  LW %6.2f  RRBS %6.2f  HIGH(B4..B12) %6.2f dB",
               25.0 * sweep[f] / N, sfdr[V_OFF], sfdr[V_LW], sfdr[V_RRBS], sfdr[V_HIGH]);
      sum_lw   += sfdr[V_LW];
      sum_high += sfdr[V_HIGH];
      checks++;
      if (!(sfdr[V_LW] > sfdr[V_OFF] && sfdr[V_RRBS] > sfdr[V_OFF])) begin
        failures++;
        $display("FAIL DEM does not raise SFDR at %0d cycles", sweep[f]);
      end
    end
    $display("average SFDR over the sweep: LW %.2f dB, HIGH %.2f dB", sum_lw / 8.0, sum_high / 8.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
