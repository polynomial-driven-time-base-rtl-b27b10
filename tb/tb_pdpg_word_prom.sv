// tb_pdpg_word_prom: checks the word length PROM.
// For every code degree n it runs a 24-stage parity feedback register with
// the code's taps from the all-ones state for one full period plus 24 shifts,
// then stops at the next state whose n low stages are all ones, and compares
// the whole register with the PROM word.  Invalid addresses must give valid=0.
module tb_pdpg_word_prom;
  import pdpg_pkg::lfsr_taps;
  logic [4:0]  addr;
  logic [23:0] pattern;
  logic        valid;
  int checks = 0, failures = 0;

  pdpg_word_prom dut (.addr, .pattern, .valid);

  function automatic logic [23:0] image(input logic [23:0] t, input int n);
    logic [23:0] s, low;
    longint steps;
    low = (24'h1 << n) - 1;
    s = '1;
    steps = 0;
    while (steps < 24 + (longint'(1) << n) || (s & low) != low) begin
      s = (s << 1) | 24'(^(s & t));
      steps++;
    end
    return s;
  endfunction

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #1;
      checks++;
      if (valid !== (a >= 2 && a <= 24)) begin
        failures++; $display("FAIL addr %0d valid=%b", a, valid);
      end
      if (a >= 2 && a <= 24) begin
        logic [23:0] exp_w;
        exp_w = image(lfsr_taps(5'(a)), a);
        checks++;
        if (pattern !== exp_w) begin
          failures++; $display("FAIL addr %0d pattern %h expected %h", a, pattern, exp_w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
