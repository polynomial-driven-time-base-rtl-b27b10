// tb_pdpg_nco: checks the number controlled oscillator.
// A reduced oscillator (W = 11, B = 1500) is run with tick10 in every cycle.
// Its slew strobe is compared tick by tick with a model in unbounded integer
// arithmetic: the accumulator starts from the PRNC value as loaded, adds PRN,
// and after any sum above B adds PRN - B.  New PRN/PRNC values must wait for
// the next 1PPS.  A second instance with the default size (W = 24, B = 10^7)
// runs one whole second and must give PRN or PRN+1 slew events.
module tb_pdpg_nco;
  localparam int W = 11;
  localparam int B = 1500;
  logic clk = 0, rst_n = 0, tick10 = 0, sec = 0;
  logic [W-1:0] prn, prnc, acc;
  logic slew, nmal;
  int checks = 0, failures = 0;

  pdpg_nco #(.W(W), .SET_B(B)) dut (.clk, .rst_n, .tick10, .sec, .prn, .prnc, .slew, .nmal, .acc);

  logic [23:0] prn_f, prnc_f, acc_f;
  logic        slew_f, nmal_f, tick_f = 0, sec_f = 0;
  pdpg_nco dut_full (.clk, .rst_n, .tick10(tick_f), .sec(sec_f), .prn(prn_f), .prnc(prnc_f),
                     .slew(slew_f), .nmal(nmal_f), .acc(acc_f));

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one "second" of `ticks` ticks with increment inc; the loaded PRN/PRNC are
  // changed in mid-second to check that they wait for the next 1PPS.
  task automatic run_second(input int inc, input int ticks);
    longint a, s;
    bit     use_c, first;
    int     events, exp_events;
    prn  = W'(inc);
    prnc = W'(inc - B);
    @(negedge clk) begin sec = 1; tick10 = 1; end
    @(negedge clk) sec = 0;
    a = 0; use_c = 1; first = 1;
    events = 0; exp_events = 0;
    for (int t = 0; t < ticks; t++) begin
      tick10 = 1;
      if (t == ticks / 2) begin prn = W'(inc + 7); prnc = W'(inc + 7 - B); end
      s = a + (use_c ? (first ? longint'((1 << W) - B + inc) : longint'(inc - B)) : longint'(inc));
      #1;
      checks++;
      if (slew !== (s > B)) begin
        failures++; $display("FAIL inc %0d tick %0d slew=%b model sum %0d", inc, t, slew, s);
      end
      if (slew) events++;
      if (s > B) exp_events++;
      first = 0;
      a = s;
      use_c = (s > B);
      @(negedge clk);
    end
    tick10 = 0;
    checks++;
    if (events != exp_events || events < inc - 1) begin
      failures++; $display("FAIL inc %0d events %0d expected %0d", inc, events, exp_events);
    end
  endtask

  initial begin
    prn = '0; prnc = '0; prn_f = '0; prnc_f = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_second(1, B);
    run_second(37, B);
    run_second(400, 3 * B);
    // full size: one second of 10^7 ticks
    begin
      int inc, events;
      inc = 12345;
      prn_f  = 24'(inc);
      prnc_f = 24'(inc - 10_000_000);
      @(negedge clk) begin sec_f = 1; tick_f = 1; end
      @(negedge clk) sec_f = 0;
      events = 0;
      for (int t = 0; t < 10_000_000; t++) begin
        #1;
        if (slew_f) events++;
        @(negedge clk);
      end
      tick_f = 0;
      checks++;
      if (events != inc && events != inc + 1) begin
        failures++; $display("FAIL full size events %0d for PRN %0d", events, inc);
      end
      $display("full size: %0d slew events in one second for PRN %0d", events, inc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
