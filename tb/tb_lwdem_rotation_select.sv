// tb_lwdem_rotation_select: self-checking test of the rotation numbers.
// For random codes in each mode, compares with the Method-I table
// (4-step bits B1/B2/B3, 2-step B4/B5/B6, 1-step B7/B8/B9 for the
// MSB/ULSB/LSB shifters), with zero when DEM is off and with the external
// rotation numbers in DEM_EXT.  Also checks that bits B10..B12 never affect
// the LW-DEM rotation.
module tb_lwdem_rotation_select;
  import lwdem_pkg::*;

  logic [11:0] code;
  dem_mode_e   mode;
  seg_code_t   ext_rot [3];
  seg_code_t   rot     [3];
  int checks = 0, failures = 0;

  lwdem_rotation_select dut (.code, .mode, .ext_rot, .rot);

  function automatic bit b(int n);  // input bit B_n
    return code[n-1];
  endfunction

  task automatic expect_rot(string what, seg_code_t e_msb, seg_code_t e_ulsb, seg_code_t e_lsb);
    checks++;
    if (rot[SEG_MSB] !== e_msb || rot[SEG_ULSB] !== e_ulsb || rot[SEG_LSB] !== e_lsb) begin
      failures++;
      $display("FAIL %s: code=%h rot msb/ulsb/lsb=%0d/%0d/%0d expected %0d/%0d/%0d", what, code,
               rot[SEG_MSB], rot[SEG_ULSB], rot[SEG_LSB], e_msb, e_ulsb, e_lsb);
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
    for (int t = 0; t < 500; t++) begin
      seg_code_t m, u, l;
      code = 12'($urandom);
      for (int c = 0; c < 3; c++) ext_rot[c] = 3'($urandom);
      m = 3'(4*b(1) + 2*b(4) + b(7));
      u = 3'(4*b(2) + 2*b(5) + b(8));
      l = 3'(4*b(3) + 2*b(6) + b(9));
      mode = DEM_LW;  #1; expect_rot("lw", m, u, l);
      code[11:9] = ~code[11:9]; #1; expect_rot("lw msb-independent", m, u, l);
      mode = DEM_OFF; #1; expect_rot("off", 3'd0, 3'd0, 3'd0);
      mode = DEM_EXT; #1; expect_rot("ext", ext_rot[SEG_MSB], ext_rot[SEG_ULSB], ext_rot[SEG_LSB]);
    end
    // one hand-worked case: B1 = B5 = B9 = 1 -> MSB 4, ULSB 2, LSB 1
    code = 12'b0001_0001_0001; mode = DEM_LW; #1;
    expect_rot("hand", 3'd4, 3'd2, 3'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
