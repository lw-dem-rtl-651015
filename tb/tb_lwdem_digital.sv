// tb_lwdem_digital: self-checking test of the digital half of the DAC.
//
// Drives random codes and a sampled sine, at 25 MS/s, through the three
// rotation modes (DEM off, LW-DEM, external rotation from a 15-bit LFSR
// standing in for the PRNG of conventional RRBS DEM).  The reference model
// of lwdem_ref_pkg predicts every switch gate of the next sample from the
// code registered one clock earlier, so the two-clock latency is checked on
// every sample, and sw_n must always be the complement of sw_p.  It also
// counts each mode, mode switches, wrapped rotations, rotation number 7,
// selections that differ from the plain binary one and reset, and fails if
// one never happened.
module tb_lwdem_digital;
  import lwdem_pkg::*;
  import lwdem_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [11:0] din;
  dem_mode_e   mode;
  seg_code_t   ext_rot [3];
  sw_ctrl_t    sw_p, sw_n;

  lwdem_digital dut (.clk, .rst_n, .din, .mode, .ext_rot, .sw_p, .sw_n);

  always #20ns clk = ~clk;   // 40 ns period: 25 MS/s

  int checks = 0, failures = 0;
  int n_mode [3];
  int n_mode_switch = 0, n_wrap = 0, n_rot7 = 0, n_dem_differs = 0, n_reset = 0;

  logic [14:0] lfsr = 15'h1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] code_m;                 // model of the input register
  seg_code_t   ext_m [3], ext_drv [3];
  dem_mode_e   mode_prev;

  // One sample: optionally change mode, predict, drive, clock, check.
  task automatic sample(dem_mode_e m, logic [11:0] value);
    sw_ctrl_t exp, bin;
    @(negedge clk);
    if (m != mode_prev) n_mode_switch++;
    mode = m;
    mode_prev = m;
    exp = ref_ctrl(code_m, m, ext_m);
    bin = ref_ctrl(code_m, DEM_OFF, ext_m);
    n_mode[m]++;
    if (exp != bin) n_dem_differs++;
    for (int c = 0; c < 3; c++) begin
      logic [2:0] r;
      r = ref_rot(code_m, m, ext_m, c);
      if (r == 3'd7) n_rot7++;
      else if (r != 3'd0) n_wrap++;
    end
    din = value;
    lfsr = lfsr_next(lfsr);
    for (int c = 0; c < 3; c++) ext_drv[c] = lfsr[3*c +: 3];
    ext_rot = ext_drv;
    @(posedge clk); #1ns;
    checks++;
    if (sw_p !== exp || sw_n !== ~exp) begin
      failures++;
      $display("FAIL switches: code=%h mode=%s sw_p=%h expected %h", code_m, m.name(), sw_p, exp);
    end
    code_m = value;
    ext_m  = ext_drv;
  endtask

  initial begin
    din = 12'hFFF;
    mode = DEM_LW;
    mode_prev = DEM_LW;
    for (int c = 0; c < 3; c++) ext_rot[c] = 3'd5;
    #1ns rst_n = 1'b0;
    #10ns;
    // reset: every element to the negative output, zero positive current
    checks++;
    if (sw_p !== '0 || sw_n !== '1) begin
      failures++;
      $display("FAIL reset state");
    end else n_reset++;
    din = '0;
    for (int c = 0; c < 3; c++) ext_rot[c] = '0;
    @(negedge clk); rst_n = 1'b1;
    code_m = '0;
    for (int c = 0; c < 3; c++) ext_m[c] = '0;

    // random codes, every mode, with mode switches
    for (int blk = 0; blk < 12; blk++) begin
      dem_mode_e m;
      m = dem_mode_e'(blk % 3);
      for (int t = 0; t < 300; t++) sample(m, 12'($urandom));
    end
    // a 1.2 MHz-like sine in each mode: 4096 samples of 197 cycles
    for (int m = 0; m < 3; m++) begin
      for (int t = 0; t < 1024; t++) begin
        real ph;
        ph = 6.283185307179586 * 197.0 * real'(t) / 4096.0;
        sample(dem_mode_e'(m), 12'($rtoi(2047.5 + 2047.0 * $sin(ph))));
      end
    end
    // edge codes
    sample(DEM_LW, 12'h000); sample(DEM_LW, 12'hFFF); sample(DEM_LW, 12'h7FF); sample(DEM_LW, 12'h800);
    sample(DEM_LW, 12'h000);

    $display("mechanisms: off=%0d lw=%0d ext=%0d mode_switch=%0d wrapped_rotation=%0d rot7=%0d dem_differs=%0d reset=%0d",
             n_mode[DEM_OFF], n_mode[DEM_LW], n_mode[DEM_EXT], n_mode_switch, n_wrap, n_rot7,
             n_dem_differs, n_reset);
    checks++;
    if (n_mode[DEM_OFF] == 0 || n_mode[DEM_LW] == 0 || n_mode[DEM_EXT] == 0 || n_mode_switch == 0 ||
        n_wrap == 0 || n_rot7 == 0 || n_dem_differs == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
