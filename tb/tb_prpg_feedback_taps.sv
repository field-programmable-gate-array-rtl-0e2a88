// tb_prpg_feedback_taps: self-checking test of the XNOR tap networks for
// every degree 3..15. One instance per degree is driven with random register
// contents; each of the four feedback bits is compared with the XNOR of the
// bits a reference polynomial list (kept in this testbench as exponent lists)
// taps: q[0] for x^n and q[n-k] for each middle term x^k.
module tb_prpg_feedback_taps;
  localparam int MIN_D = 3;
  localparam int MAX_D = 15;

  logic [14:0] q_all  [MIN_D:MAX_D];
  logic [3:0]  fb_all [MIN_D:MAX_D];
  int checks = 0, failures = 0;

  for (genvar d = MIN_D; d <= MAX_D; d++) begin : g_deg
    prpg_feedback_taps #(.DEGREE(d)) dut (.q(q_all[d][d-1:0]), .fb(fb_all[d]));
  end

  // Middle-term exponents of polynomial `sel` of degree `n`, 0-terminated.
  function automatic void ref_terms(input int n, input int sel, output int t[4]);
    int tab [MIN_D:MAX_D][4][4];
    tab[3]  = '{'{2,1,0,0}, '{2,0,0,0},  '{1,0,0,0},  '{2,0,0,0}};
    tab[4]  = '{'{2,0,0,0}, '{3,1,0,0},  '{3,0,0,0},  '{1,0,0,0}};
    tab[5]  = '{'{4,0,0,0}, '{3,0,0,0},  '{2,0,0,0},  '{1,0,0,0}};
    tab[6]  = '{'{4,0,0,0}, '{2,0,0,0},  '{5,0,0,0},  '{1,0,0,0}};
    tab[7]  = '{'{2,0,0,0}, '{3,0,0,0},  '{3,0,0,0},  '{1,0,0,0}};
    tab[8]  = '{'{4,0,0,0}, '{1,0,0,0},  '{7,0,0,0},  '{6,5,1,0}};
    tab[9]  = '{'{8,0,0,0}, '{1,0,0,0},  '{4,0,0,0},  '{5,0,0,0}};
    tab[10] = '{'{5,0,0,0}, '{9,0,0,0},  '{3,0,0,0},  '{7,0,0,0}};
    tab[11] = '{'{10,0,0,0},'{7,0,0,0},  '{4,0,0,0},  '{2,0,0,0}};
    tab[12] = '{'{8,0,0,0}, '{5,0,0,0},  '{11,0,0,0}, '{7,4,3,0}};
    tab[13] = '{'{9,0,0,0}, '{6,0,0,0},  '{12,0,0,0}, '{4,3,1,0}};
    tab[14] = '{'{2,0,0,0}, '{5,0,0,0},  '{1,0,0,0},  '{12,11,1,0}};
    tab[15] = '{'{5,0,0,0}, '{9,0,0,0},  '{11,0,0,0}, '{4,0,0,0}};
    t = tab[n][sel];
  endfunction

  function automatic logic ref_fb(input int n, input int sel, input logic [14:0] q);
    int t[4];
    logic x;
    ref_terms(n, sel, t);
    x = q[0];
    foreach (t[i]) if (t[i] != 0) x ^= q[n - t[i]];
    return ~x;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iter = 0; iter < 300; iter++) begin
      for (int d = MIN_D; d <= MAX_D; d++) begin
        logic [14:0] v;
        v = 15'($urandom);
        // walk single bits and the two constant patterns as well
        if (iter < 15)       v = 15'(1) << iter;
        else if (iter == 15) v = '0;
        else if (iter == 16) v = '1;
        q_all[d] = v & ((15'(1) << d) - 15'(1));
      end
      #1;
      for (int d = MIN_D; d <= MAX_D; d++) begin
        for (int s = 0; s < 4; s++) begin
          checks++;
          if (fb_all[d][s] !== ref_fb(d, s, q_all[d])) begin
            failures++;
            $display("FAIL degree %0d sel %0d q=%h got %b", d, s, q_all[d], fb_all[d][s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
