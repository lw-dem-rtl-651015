// tb_lwdem_barrel_shifter: self-checking test of the 3-bit randomizer.
//
// 1. Exhaustive: all 8 codes x 8 rotation numbers against a reference that
//    places the group of B0 at element R mod 7, followed by B1 and B2.
// 2. The worked RRBS examples (codes 5,6,7,4,1,1 with R = 4,7,1,2,0,3),
//    written as the group label of each element I6..I0.
// 3. The 6-bit LW-DEM example, where the lower three bits of each 6-bit code
//    are the rotation number of the upper three.
// 4. The mid-code transition 011 (R=0) -> 100 (R=0..7): 7,5,3,1,1,3,5,7
//    elements switch, 4 on average.
module tb_lwdem_barrel_shifter;
  import lwdem_pkg::*;

  logic [2:0] code, rot;
  logic [6:0] sel;
  int checks = 0, failures = 0;

  lwdem_barrel_shifter dut (.code(code), .rot(rot), .sel(sel));

  function automatic logic [6:0] ref_sel(logic [2:0] c, logic [2:0] r);
    logic [6:0] s;
    int rr = int'(r) % 7;
    for (int i = 0; i < 7; i++) begin
      int k = (i - rr + 7) % 7;             // unrotated position
      int b = (k == 0) ? 0 : (k <= 2) ? 1 : 2;
      s[i] = c[b];
    end
    return s;
  endfunction

  // labels: group index of I6..I0, one decimal digit each (e.g. "1102222").
  function automatic logic [6:0] from_labels(logic [2:0] c, string labels);
    logic [6:0] s;
    for (int i = 0; i < 7; i++) s[6-i] = c[labels[i] - "0"];
    return s;
  endfunction

  task automatic check(string what, logic [6:0] exp);
    checks++;
    if (sel !== exp) begin
      failures++;
      $display("FAIL %s: code=%0d rot=%0d sel=%b expected %b", what, code, rot, sel, exp);
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
    // 1. exhaustive, plus the selected count equals the code value
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) begin
        code = 3'(c); rot = 3'(r); #1;
        check("exhaustive", ref_sel(code, rot));
        checks++;
        if ($countones(sel) != c) begin
          failures++;
          $display("FAIL count: code=%0d rot=%0d ones=%0d", c, r, $countones(sel));
        end
      end
    end

    // 2. RRBS examples
    begin
      int    c_l [6] = '{5, 6, 7, 4, 1, 1};
      int    r_l [6] = '{4, 7, 1, 2, 0, 3};
      string l_l [6] = '{"1102222", "2222110", "2221102", "2211022", "2222110", "2110222"};
      for (int t = 0; t < 6; t++) begin
        code = 3'(c_l[t]); rot = 3'(r_l[t]); #1;
        check("rrbs example", from_labels(code, l_l[t]));
      end
    end

    // 3. 6-bit LW-DEM example: D5..D0 rows; only I6..I1 are compared.
    begin
      logic [5:0] d_l [6] = '{6'b101101, 6'b110001, 6'b111100, 6'b100001, 6'b001000, 6'b001010};
      string      l_l [6] = '{"102222", "222110", "110222", "222110", "222211", "221102"};
      for (int t = 0; t < 6; t++) begin
        code = d_l[t][5:3]; rot = d_l[t][2:0]; #1;
        checks++;
        if (sel[6:1] !== from_labels(code, {l_l[t], "0"})[6:1]) begin
          failures++;
          $display("FAIL lw example %0d: sel=%b", t, sel);
        end
      end
    end

    // 4. mid-code transition
    begin
      logic [6:0] sel_old;
      int exp_sw [8] = '{7, 5, 3, 1, 1, 3, 5, 7};
      int total = 0;
      code = 3'd3; rot = 3'd0; #1;
      sel_old = sel;
      for (int r = 0; r < 8; r++) begin
        code = 3'd4; rot = 3'(r); #1;
        total += $countones(sel ^ sel_old);
        checks++;
        if ($countones(sel ^ sel_old) != exp_sw[r]) begin
          failures++;
          $display("FAIL transition R%0d: %0d switched, expected %0d", r, $countones(sel ^ sel_old), exp_sw[r]);
        end
      end
      checks++;
      if (total != 32) begin
        failures++;
        $display("FAIL transition average: total %0d, expected 32", total);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
