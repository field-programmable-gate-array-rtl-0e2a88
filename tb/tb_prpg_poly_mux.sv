// tb_prpg_poly_mux: exhaustive self-checking test of the polynomial
// multiplexer. Every combination of the four feedback inputs and the 2-bit
// selector is applied and the output is compared with the selected input.
module tb_prpg_poly_mux;
  localparam int unsigned NUM_POLY = 4;

  logic [NUM_POLY-1:0] fb;
  logic [1:0]          sel;
  logic                fb_sel;
  int checks = 0, failures = 0;

  prpg_poly_mux #(.NUM_POLY(NUM_POLY)) dut (.fb(fb), .pattern_sel(sel), .fb_sel(fb_sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) begin
      for (int s = 0; s < 4; s++) begin
        fb  = 4'(f);
        sel = 2'(s);
        #1;
        checks++;
        if (fb_sel !== 1'((f >> s) & 1)) begin
          failures++;
          $display("FAIL fb=%b sel=%0d got %b", fb, sel, fb_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
