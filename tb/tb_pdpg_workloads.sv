// tb_pdpg_workloads: runs the operating points of a coder at its default size.
//  1. Code length sweep: every code degree from 2 to 16 is programmed in turn
//     (with the counters cleared in between) at the full 10 MHz chip rate
//     (SPL = SPB = 0); after a 1PPS the word detect must come, and the word
//     counter read through the port must equal the checking monitor's count.
//  2. One whole second at 50 MHz with PRN = 1,000,000 deletions: between two
//     1PPS edges there must be PRN or PRN+1 slew events, each 10 MCK count must
//     be 5 or 6 cycles, and 5 x (10 MCK counts) + (6-cycle counts) must equal
//     the 50,000,000 clocks of the second: the time base slips by exactly one
//     20 ns clock per event.
module tb_pdpg_workloads;
  localparam int B = 10_000_000;
  logic        clk = 0, rst_n = 0, ref10_en = 0, pps = 0, ndrdy = 0, dtrans = 0;
  logic [1:0]  csr = 0;
  logic [15:0] dout = 0, din;
  logic        irpt, smpl, shift, pn;
  logic [23:0] pn_state;
  int checks = 0, failures = 0;

  pdpg_coder #(.CODER_ID(1)) dut (.clk, .rst_n, .ref10_en, .pps, .csr, .dout, .ndrdy, .dtrans,
    .din, .irpt, .smpl, .shift, .pn, .pn_state);

  logic on = 0;
  int   prn_i = 0, n = 2;
  int   m_checks, m_failures, detects, slews, slewed;
  logic [31:0] exp_ws;

  pdpg_coder_monitor mon (.clk, .on, .pps, .ref10_en, .prn_i, .n, .spl(0), .spb(0), .pcnt6(1'b1),
    .slew(dut.slew), .mck(dut.mck), .smpl, .shift, .pn_state, .prom_wr(dut.prom_wr),
    .clr(dut.clr_ctrs), .checks(m_checks), .failures(m_failures), .exp_ws, .detects,
    .slews, .slewed_counts(slewed));

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 4) ? 0 : phase + 1;
    ref10_en <= (phase == 2);
  end

  // light counters for the one-second run
  logic count_on = 0;
  longint cyc = 0, mcks = 0, ev = 0, long_counts = 0, since = -1;
  always @(posedge clk) if (count_on) begin
    cyc++;
    if (dut.slew) ev++;
    if (dut.mck) begin
      mcks++;
      if (since == 5) long_counts++;
      else if (since >= 0 && since != 4) begin
        failures++; $display("FAIL 10 MCK count of %0d cycles", since + 1);
      end
      since = 0;
    end else if (since >= 0) since++;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [1:0] mode, input logic [15:0] data);
    @(negedge clk) begin csr = mode; dout = data; end
    @(negedge clk) ndrdy = 1;
    repeat (4) @(negedge clk);
    ndrdy = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic rd(input logic [1:0] mode, output logic [15:0] data);
    @(negedge clk) csr = mode;
    @(negedge clk) data = din;
    dtrans = 1;
    repeat (4) @(negedge clk);
    dtrans = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic set_rate(input int inc);
    logic [23:0] c;
    c = 24'(inc - B);
    wr(2'b00, 16'h0460);               // pointer 0, increment on write, coder 1, mask on
    wr(2'b01, 16'(inc));
    wr(2'b01, 16'(inc >> 16));
    wr(2'b01, c[15:0]);
    wr(2'b01, {8'h00, c[23:16]});
    wr(2'b01, 16'h0000);               // SPL = SPB = 0: 10 MHz chips
  endtask

  task automatic pulse_pps;
    @(negedge clk) pps = 1;
    repeat (20) @(negedge clk);
    pps = 0;
  endtask

  logic [15:0] lo, hi;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_rate(0);
    // 1. code length sweep
    for (int deg = 2; deg <= 16; deg++) begin
      int t;
      on = 0;
      wr(2'b00, 16'h0445);             // pointer 5, no increment
      wr(2'b01, 16'(32'h60 | deg));    // clear counters, divide by 6, code deg
      n = deg;
      wr(2'b01, 16'(32'h20 | deg));    // release
      repeat (5) @(negedge clk);
      on = 1;
      pulse_pps();
      t = 0;
      while (!irpt && t < 6 * (1 << deg) + 2000) begin @(negedge clk); t++; end
      check(irpt, $sformatf("degree %0d word detect", deg));
      wr(2'b00, 16'h0456);             // pointer 6, increment on read
      rd(2'b01, lo);
      rd(2'b01, hi);
      check({hi, lo} == exp_ws && exp_ws != 0,
            $sformatf("degree %0d word counter %0d expected %0d", deg, {hi, lo}, exp_ws));
      wr(2'b00, 16'h0540);             // clear interrupt of coder 1
      check(!irpt, "interrupt cleared");
    end
    check(detects == 15, $sformatf("%0d detects in the sweep", detects));
    on = 0;

    // 2. one whole second of slewing
    set_rate(1_000_000);
    pulse_pps();                       // loads the new rate
    repeat (100) @(negedge clk);
    // second 1PPS starts the measured second
    @(negedge clk) pps = 1;
    @(posedge clk) count_on = 1;
    repeat (19) @(negedge clk);
    pps = 0;
    repeat (50_000_000 - 20) @(negedge clk);
    @(posedge clk) count_on <= 0;
    @(negedge clk);
    $display("one second: %0d cycles, %0d slew events, %0d 10 MCK counts, %0d of 6 cycles",
             cyc, ev, mcks, long_counts);
    check(ev == 1_000_000 || ev == 1_000_001, $sformatf("slew events %0d", ev));
    check(long_counts >= ev - 1 && long_counts <= ev, "each event lengthens one count");
    check(5 * mcks + long_counts >= cyc - 6 && 5 * mcks + long_counts <= cyc,
          "clocks of the second accounted for");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
