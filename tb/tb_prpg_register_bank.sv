// tb_prpg_register_bank: self-checking test of the LFSR flip-flop chain.
// Two instances (5 and 15 stages) are fed random feedback bits; after each
// clock edge their contents are compared with a shift model kept in the
// testbench (new bit in the MSB). The asynchronous clear is checked both
// between edges (the chain must read zero at once) and held across edges.
module tb_prpg_register_bank;
  logic        clk = 1'b0;
  logic        clear;
  logic        fb5, fb15;
  logic [4:0]  q5;
  logic [14:0] q15;
  logic [4:0]  m5;
  logic [14:0] m15;
  int checks = 0, failures = 0;
  int cycles = 0;

  prpg_register_bank #(.DEGREE(5))  dut5  (.clk(clk), .clear(clear), .fb_in(fb5),  .q(q5));
  prpg_register_bank #(.DEGREE(15)) dut15 (.clk(clk), .clear(clear), .fb_in(fb15), .q(q15));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q5 !== m5 || q15 !== m15) begin
      failures++;
      $display("FAIL %s: q5=%h exp %h, q15=%h exp %h", what, q5, m5, q15, m15);
    end
  endtask

  initial begin
    clear = 1'b1; fb5 = 1'b0; fb15 = 1'b0;
    m5 = '0; m15 = '0;
    repeat (2) @(negedge clk);
    check("held clear");
    clear = 1'b0;
    for (int i = 0; i < 400; i++) begin
      fb5  = 1'($urandom);
      fb15 = 1'($urandom);
      @(posedge clk);
      m5  = {fb5,  m5[4:1]};
      m15 = {fb15, m15[14:1]};
      @(negedge clk);
      check("shift");
      if (i % 97 == 50) begin
        #2 clear = 1'b1;
        #1 m5 = '0; m15 = '0;
        check("async clear");
        #1 clear = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
