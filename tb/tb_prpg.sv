// tb_prpg: end-to-end self-checking test of the pattern generator at its
// default size (DEGREE = 5).
//
// For each pattern selector value the generator is cleared and its output is
// compared, clock by clock, with the published degree-5 sequences (21, 31, 31
// and 21 patterns from the all-zero start); the cycle on which the sequence
// returns to all zero must equal the sequence length (one pattern per clock).
// Then random runs switch the selector on the fly and pulse the asynchronous
// clear at random moments; there the output is compared with a next-state
// model written from the polynomial list x^5+x^4+1, x^5+x^3+1, x^5+x^2+1,
// x^5+x+1. Every mechanism (clear, each selector's full period, selector
// switch, wrap-around to the start) is counted and must occur.
module tb_prpg;
  localparam int N = 5;

  logic         clk = 1'b0;
  logic         clear;
  logic [1:0]   sel;
  logic [N-1:0] pattern;
  logic [N-1:0] model;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_clear = 0, n_switch = 0, n_wrap = 0;
  int n_full [4] = '{default: 0};

  // Published degree-5 sequences, selector 0..3.
  byte seq0 [21] = '{8'h00,8'h10,8'h18,8'h1c,8'h1e,8'h0f,8'h17,8'h1b,8'h1d,8'h0e,8'h07,8'h13,8'h19,8'h0c,
                     8'h16,8'h0b,8'h15,8'h0a,8'h05,8'h02,8'h01};
  byte seq1 [31] = '{8'h00,8'h10,8'h18,8'h1c,8'h0e,8'h07,8'h13,8'h09,8'h04,8'h02,8'h11,8'h08,8'h14,8'h0a,
                     8'h15,8'h1a,8'h1d,8'h1e,8'h0f,8'h17,8'h1b,8'h0d,8'h16,8'h0b,8'h05,8'h12,8'h19,8'h0c,
                     8'h06,8'h03,8'h01};
  byte seq2 [31] = '{8'h00,8'h10,8'h18,8'h0c,8'h06,8'h13,8'h09,8'h14,8'h1a,8'h0d,8'h16,8'h1b,8'h1d,8'h1e,
                     8'h0f,8'h17,8'h0b,8'h15,8'h0a,8'h05,8'h02,8'h11,8'h08,8'h04,8'h12,8'h19,8'h1c,8'h0e,
                     8'h07,8'h03,8'h01};
  byte seq3 [21] = '{8'h00,8'h10,8'h08,8'h14,8'h0a,8'h15,8'h1a,8'h0d,8'h06,8'h13,8'h19,8'h1c,8'h0e,8'h17,
                     8'h1b,8'h1d,8'h1e,8'h0f,8'h07,8'h03,8'h01};

  function automatic logic [N-1:0] seq_at(input int s, input int i);
    case (s)
      0:       return N'(seq0[i]);
      1:       return N'(seq1[i]);
      2:       return N'(seq2[i]);
      default: return N'(seq3[i]);
    endcase
  endfunction
  int seq_len [4] = '{21, 31, 31, 21};

  prpg dut (.clk(clk), .clear(clear), .pattern_sel(sel), .pattern(pattern));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Next pattern of the degree-5 generator for selector s: the XNOR of q[0]
  // and q[5-k] (middle term x^k, k = 4, 3, 2, 1 for s = 0..3) enters q[4].
  function automatic logic [N-1:0] next_of(input logic [N-1:0] q, input int s);
    int k = 4 - s;
    return {~(q[0] ^ q[N-k]), q[N-1:1]};
  endfunction

  task automatic check(input string what, input logic [N-1:0] exp);
    checks++;
    if (pattern !== exp) begin
      failures++;
      $display("FAIL %s: cycle %0d sel %0d pattern %h expected %h", what, cycles, sel, pattern, exp);
    end
  endtask

  task automatic pulse_clear();
    #2 clear = 1'b1;
    #1 clear = 1'b0;
    n_clear++;
  endtask

  initial begin
    clear = 1'b1;
    sel   = '0;
    @(negedge clk);
    @(negedge clk);
    clear = 1'b0;

    // 1. Published sequences and their periods.
    for (int s = 0; s < 4; s++) begin
      int start, len;
      sel = 2'(s);
      pulse_clear();
      check("after clear", '0);
      start = cycles;
      len   = 0;
      for (int i = 1; i <= seq_len[s]; i++) begin
        @(negedge clk);
        if (i < seq_len[s]) check("table sequence", seq_at(s, i));
        if (pattern == '0 && len == 0) len = cycles - start;
      end
      checks++;
      if (len != seq_len[s]) begin
        failures++;
        $display("FAIL sel %0d: returned to 00 after %0d cycles, expected %0d", s, len, seq_len[s]);
      end else begin
        n_full[s]++;
        n_wrap++;
      end
    end

    // 2. Random selector switches and clears against the next-state model.
    model = pattern;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 15) == 0) begin
        logic [1:0] ns;
        ns = 2'($urandom);
        if (ns != sel) n_switch++;
        sel = ns;
      end
      if ($urandom_range(0, 199) == 0) begin
        pulse_clear();
        model = '0;
        check("async clear", model);
      end
      @(posedge clk);
      model = next_of(model, int'(sel));
      @(negedge clk);
      check("model", model);
      if (pattern == '0) n_wrap++;
    end

    $display("mechanisms: clear=%0d switch=%0d wrap=%0d full_period sel0..3=%0d,%0d,%0d,%0d",
             n_clear, n_switch, n_wrap, n_full[0], n_full[1], n_full[2], n_full[3]);
    checks++;
    if (n_clear == 0 || n_switch == 0 || n_wrap == 0 ||
        n_full[0] == 0 || n_full[1] == 0 || n_full[2] == 0 || n_full[3] == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
