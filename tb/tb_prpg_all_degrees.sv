// tb_prpg_all_degrees: runs the generator at every degree from 3 to 15 with
// all four pattern selector values, the full set of configurations the
// design was evaluated with.
//
// One prpg instance per degree shares clock, clear and selector. For each
// selector value the instances are cleared and clocked until every one has
// come back to the all-zero start; each pattern is compared with a reference
// LFSR model built from this testbench's own polynomial exponent lists, and
// the number of distinct patterns (cycles until the return to zero) is
// compared with the published pattern count of that polynomial.
module tb_prpg_all_degrees;
  localparam int MIN_D = 3;
  localparam int MAX_D = 15;

  logic        clk = 1'b0;
  logic        clear;
  logic [1:0]  sel;
  logic [14:0] pat   [MIN_D:MAX_D];
  logic [14:0] model [MIN_D:MAX_D];
  int          period[MIN_D:MAX_D];
  int checks = 0, failures = 0;
  int cycles = 0;

  // Published number of output patterns per degree and selector.
  int expected [MIN_D:MAX_D][4] = '{
    '{4, 7, 7, 7},
    '{6, 12, 15, 15},
    '{21, 31, 31, 21},
    '{14, 14, 63, 63},
    '{93, 127, 127, 127},
    '{12, 63, 63, 255},
    '{73, 73, 511, 511},
    '{15, 889, 1023, 1023},
    '{1533, 1533, 1533, 2047},
    '{28, 819, 3255, 4095},
    '{7161, 7665, 7905, 8191},
    '{254, 5461, 11811, 16383},
    '{35, 93, 32767, 32767}
  };

  // Middle-term exponents per degree and selector, 0-terminated.
  int terms [MIN_D:MAX_D][4][4] = '{
    '{'{2,1,0,0}, '{2,0,0,0},  '{1,0,0,0},  '{2,0,0,0}},
    '{'{2,0,0,0}, '{3,1,0,0},  '{3,0,0,0},  '{1,0,0,0}},
    '{'{4,0,0,0}, '{3,0,0,0},  '{2,0,0,0},  '{1,0,0,0}},
    '{'{4,0,0,0}, '{2,0,0,0},  '{5,0,0,0},  '{1,0,0,0}},
    '{'{2,0,0,0}, '{3,0,0,0},  '{3,0,0,0},  '{1,0,0,0}},
    '{'{4,0,0,0}, '{1,0,0,0},  '{7,0,0,0},  '{6,5,1,0}},
    '{'{8,0,0,0}, '{1,0,0,0},  '{4,0,0,0},  '{5,0,0,0}},
    '{'{5,0,0,0}, '{9,0,0,0},  '{3,0,0,0},  '{7,0,0,0}},
    '{'{10,0,0,0},'{7,0,0,0},  '{4,0,0,0},  '{2,0,0,0}},
    '{'{8,0,0,0}, '{5,0,0,0},  '{11,0,0,0}, '{7,4,3,0}},
    '{'{9,0,0,0}, '{6,0,0,0},  '{12,0,0,0}, '{4,3,1,0}},
    '{'{2,0,0,0}, '{5,0,0,0},  '{1,0,0,0},  '{12,11,1,0}},
    '{'{5,0,0,0}, '{9,0,0,0},  '{11,0,0,0}, '{4,0,0,0}}
  };

  for (genvar d = MIN_D; d <= MAX_D; d++) begin : g_deg
    prpg #(.DEGREE(d)) dut (.clk(clk), .clear(clear), .pattern_sel(sel), .pattern(pat[d][d-1:0]));
    if (d < MAX_D) begin : g_pad
      assign pat[d][14:d] = '0;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 140000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] next_of(input int n, input int s, input logic [14:0] q);
    logic x = q[0];
    for (int i = 0; i < 4; i++)
      if (terms[n][s][i] != 0) x ^= q[n - terms[n][s][i]];
    x = ~x;
    return (q >> 1) | (15'(x) << (n - 1));
  endfunction

  initial begin
    clear = 1'b1;
    sel   = '0;
    for (int s = 0; s < 4; s++) begin
      int open_count;
      sel = 2'(s);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int d = MIN_D; d <= MAX_D; d++) begin
        model[d]  = '0;
        period[d] = 0;
      end
      open_count = MAX_D - MIN_D + 1;
      for (int c = 1; open_count > 0; c++) begin
        @(negedge clk);
        for (int d = MIN_D; d <= MAX_D; d++) begin
          if (period[d] == 0) begin
            model[d] = next_of(d, s, model[d]);
            checks++;
            if (pat[d] !== model[d]) begin
              failures++;
              if (failures < 20)
                $display("FAIL degree %0d sel %0d cycle %0d: %h expected %h", d, s, c, pat[d], model[d]);
            end
            if (pat[d] == '0) begin
              period[d] = c;
              open_count--;
            end
          end
        end
        if (c > 40000) begin
          failures++;
          $display("FAIL sel %0d: some degree never returned to zero", s);
          break;
        end
      end
      for (int d = MIN_D; d <= MAX_D; d++) begin
        checks++;
        if (period[d] != expected[d][s]) begin
          failures++;
          $display("FAIL degree %0d sel %0d: %0d patterns, expected %0d", d, s, period[d], expected[d][s]);
        end
        $display("degree %0d sel %0d: %0d patterns", d, s, period[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
