// tb_pdpg_word_counter: checks the word detector, word counter and interrupt.
// The PN register input is driven directly.  After each 1PPS strobe the word
// is presented after a random delay; WS must equal that delay in clocks, the
// counter must then stay frozen (also when the word comes again) until the
// next 1PPS, the flag must rise, irpt must follow the mask, clr_irq must clear
// the flag, and a word already present at 1PPS must not count until it is
// reached again.
module tb_pdpg_word_counter;
  logic        clk = 0, rst_n = 0, sec = 0, valid = 1, clr_irq = 0, irq_en = 0;
  logic [23:0] sr, pattern;
  logic [31:0] ws;
  logic        running, hit, irq, irpt;
  int checks = 0, failures = 0;

  pdpg_word_counter dut (.clk, .rst_n, .sec, .sr, .pattern, .valid, .clr_irq, .irq_en,
                         .ws, .running, .hit, .irq, .irpt);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (ws=%0d irq=%b irpt=%b)", what, ws, irq, irpt); end
  endtask

  task automatic one_second(input int delay, input bit mask);
    irq_en = mask;
    sr = 24'h000001;
    @(negedge clk) sec = 1;
    @(negedge clk) sec = 0;
    repeat (delay - 1) @(negedge clk);
    sr = pattern;           // detect in the cycle `delay` after the strobe
    @(negedge clk);
    sr = 24'h000002;
    repeat (5) @(negedge clk);
    check(ws == 32'(delay), "ws equals delay");
    check(irq && !running, "flag set and counter stopped");
    check(irpt == mask, "irpt follows mask");
    sr = pattern;           // a second match must not restart anything
    repeat (10) @(negedge clk);
    sr = 24'h000003;
    check(ws == 32'(delay), "counter frozen until next 1PPS");
    clr_irq = 1;
    @(negedge clk) clr_irq = 0;
    check(!irq && !irpt, "flag cleared");
  endtask

  initial begin
    pattern = 24'h00FFFF;
    sr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one_second(1, 1);
    one_second(17, 0);
    one_second(1000, 1);
    for (int i = 0; i < 20; i++) one_second($urandom_range(2, 3000), 1'($urandom_range(0, 1)));
    // word already present at 1PPS
    irq_en = 1;
    sr = pattern;
    @(negedge clk) sec = 1;
    @(negedge clk) sec = 0;
    repeat (20) @(negedge clk);
    check(running && !irq, "no detect for a word held across 1PPS");
    sr = 24'h000004;
    repeat (3) @(negedge clk);
    sr = pattern;
    @(negedge clk);
    check(ws == 32'd24 && irq, "detect when the word is reached again");
    // invalid code never detects
    clr_irq = 1;
    @(negedge clk) clr_irq = 0;
    valid = 0;
    sr = 24'h000004;
    @(negedge clk) sec = 1;
    @(negedge clk) sec = 0;
    sr = pattern;
    repeat (10) @(negedge clk);
    check(running && !irq, "no detect for an invalid code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
