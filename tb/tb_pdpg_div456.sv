// tb_pdpg_div456: checks the divide by 4,5,6 counter.
// Slew events come at random times, at least 12 cycles apart (the oscillator
// can issue at most one per two 10 MHz ticks).  Every 10 MCK interval must be 5
// cycles, or 6 (pcnt6=1) / 4 (pcnt6=0) once per slew, the slewed interval must
// start within one count of the event, and the number of slewed intervals must
// equal the number of events.  clr must stop the strobe.
module tb_pdpg_div456;
  logic clk = 0, rst_n = 0, clr = 0, slew = 0, pcnt6 = 0, mck;
  int checks = 0, failures = 0;

  pdpg_div456 dut (.clk, .rst_n, .clr, .slew, .pcnt6, .mck);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(input logic mode6, input int cycles);
    int since_mck, since_slew, events, slewed, normal, gap, owed;
    pcnt6 = mode6;
    since_mck = -1; since_slew = 100; events = 0; slewed = 0; normal = 0; owed = 0;
    for (int c = 0; c < cycles; c++) begin
      slew = (since_slew >= 12) && ($urandom_range(0, 9) == 0) && (c < cycles - 20);
      #1;
      if (slew) begin events++; since_slew = 0; owed++; end
      else since_slew++;
      if (mck) begin
        if (since_mck >= 0) begin
          gap = since_mck + 1;
          checks++;
          if (gap == 5) normal++;
          else if (gap == (mode6 ? 6 : 4)) begin slewed++; owed--; end
          else begin failures++; $display("FAIL interval %0d", gap); end
          checks++;
          if (owed > 1 || owed < 0) begin
            failures++; $display("FAIL slew not applied in time, owed %0d", owed);
          end
        end
        since_mck = 0;
      end else if (since_mck >= 0) since_mck++;
      @(negedge clk);
    end
    slew = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (slewed != events || events < 10) begin
      failures++; $display("FAIL events %0d slewed intervals %0d", events, slewed);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_mode(1'b1, 3000);
    run_mode(1'b0, 3000);
    // clear holds the counter
    clr = 1;
    for (int c = 0; c < 20; c++) begin
      @(posedge clk); #1;
      checks++;
      if (mck) begin failures++; $display("FAIL mck during clr"); end
    end
    @(negedge clk) clr = 0;
    #1;
    checks++;
    if (!mck) begin failures++; $display("FAIL no mck right after clr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
