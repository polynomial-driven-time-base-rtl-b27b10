// tb_pdpg_tap_prom: checks the feedback tap PROM.
// For every address it checks valid, that the taps stay inside the code's n
// stages with stage n tapped, and, by running a parity feedback register of n
// stages from the all-ones state, that the code period is exactly 2^n - 1
// (the code is maximal length).
module tb_pdpg_tap_prom;
  logic [4:0]  addr;
  logic [23:0] taps;
  logic        valid;
  int checks = 0, failures = 0;

  pdpg_tap_prom dut (.addr, .taps, .valid);

  function automatic longint period(input logic [23:0] t, input int n);
    logic [23:0] s, mask;
    longint p;
    mask = (24'h1 << n) - 1;
    s = mask;
    p = 0;
    do begin
      s = ((s << 1) | 24'(^(s & t))) & mask;
      p++;
    end while (s != mask && p <= (longint'(1) << n));
    return p;
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
        longint p;
        checks++;
        if (!taps[a-1] || (taps >> a) != 0) begin
          failures++; $display("FAIL addr %0d taps %h outside code", a, taps);
        end
        p = period(taps, a);
        checks++;
        if (p != (longint'(1) << a) - 1) begin
          failures++; $display("FAIL addr %0d period %0d", a, p);
        end
      end else begin
        checks++;
        if (taps != 0) begin failures++; $display("FAIL addr %0d taps %h", a, taps); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
