// tb_pdpg_system: end-to-end test of the four-coder system at its default
// size (B = 10^7, 24-bit oscillator and code register, 32-bit word counter).
// The host programs each coder with its own rate, code, dividers and slew
// direction through the shared port, then 1PPS intervals run.  A checking
// monitor per coder follows its slew events, strobes and PN register and
// works out its word count.  After each 1PPS the host waits for the shared
// request, reads the ORed ICSR to see the mask bits of all coders, reads each
// coder's word counter and clears that coder's interrupt.  The test counts how
// often each mechanism happened and fails if one never did.
module tb_pdpg_system;
  import pdpg_pkg::*;
  localparam int B = 10_000_000;
  localparam int NC = 4;
  logic        clk = 0, rst_n = 0, ref10_en = 0, pps = 0, ndrdy = 0, dtrans = 0;
  logic [1:0]  csr = 0;
  logic [15:0] out_data = 0, in_data;
  logic        irpt;
  logic [NC-1:0] smpl, shift, pn;
  logic [23:0] pn_state [NC];
  int checks = 0, failures = 0;

  pdpg_system dut (.clk, .rst_n, .ref10_en, .pps, .csr, .out_data, .ndrdy, .dtrans,
    .in_data, .irpt, .smpl, .shift, .pn, .pn_state);

  // per-coder configuration, chosen so the coders differ in every setting
  int   cfg_prn [NC] = '{250_000, 125_000, 400_000, 40_000};
  int   cfg_n   [NC] = '{5, 7, 10, 4};
  int   cfg_spl [NC] = '{0, 1, 0, 2};
  int   cfg_spb [NC] = '{0, 0, 1, 1};
  logic cfg_six [NC] = '{1'b1, 1'b0, 1'b1, 1'b0};

  logic on = 0;
  int   m_checks [NC], m_failures [NC], detects [NC], slews [NC], slewed [NC];
  logic [31:0] exp_ws [NC];

  logic [NC-1:0] coder_irq;
  for (genvar k = 0; k < NC; k++) begin : g_mon
    assign coder_irq[k] = dut.g_coder[k].u_coder.irq;
    pdpg_coder_monitor mon (.clk, .on, .pps, .ref10_en, .prn_i(cfg_prn[k]), .n(cfg_n[k]),
      .spl(cfg_spl[k]), .spb(cfg_spb[k]), .pcnt6(cfg_six[k]),
      .slew(dut.g_coder[k].u_coder.slew), .mck(dut.g_coder[k].u_coder.mck),
      .smpl(smpl[k]), .shift(shift[k]), .pn_state(pn_state[k]),
      .prom_wr(dut.g_coder[k].u_coder.prom_wr), .clr(dut.g_coder[k].u_coder.clr_ctrs),
      .checks(m_checks[k]), .failures(m_failures[k]), .exp_ws(exp_ws[k]),
      .detects(detects[k]), .slews(slews[k]), .slewed_counts(slewed[k]));
  end

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 4) ? 0 : phase + 1;
    ref10_en <= (phase == 1);
  end

  // the shared request is the OR of the coders' requests (all masks are on)
  always @(posedge clk) if (on) begin
    checks++;
    if (irpt !== |coder_irq) begin
      failures++; $display("FAIL shared request %b, coder flags %b at %0t", irpt, coder_irq, $time);
    end
  end

  // mechanism counters
  int n_icsr_wr = 0, n_func_wr = 0, n_inc_wr = 0, n_inc_rd = 0, n_rd = 0;
  int n_irq = 0, n_irq_clr = 0, n_clr_ctrs = 0, n_unselected = 0;

  function automatic int total_checks();
    int t = checks;
    for (int k = 0; k < NC; k++) t += m_checks[k];
    return t;
  endfunction
  function automatic int total_failures();
    int t = failures;
    for (int k = 0; k < NC; k++) t += m_failures[k];
    return t;
  endfunction

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [1:0] mode, input logic [15:0] data);
    @(negedge clk) begin csr = mode; out_data = data; end
    @(negedge clk) ndrdy = 1;
    repeat (4) @(negedge clk);
    ndrdy = 0;
    repeat (4) @(negedge clk);
    if (mode == 2'b00) n_icsr_wr++;
    else if (mode == 2'b01) n_func_wr++;
  endtask

  task automatic rd(input logic [1:0] mode, output logic [15:0] data);
    @(negedge clk) csr = mode;
    @(negedge clk) data = in_data;
    dtrans = 1;
    repeat (4) @(negedge clk);
    dtrans = 0;
    repeat (4) @(negedge clk);
    n_rd++;
  endtask

  function automatic logic [15:0] icsr(input int ptr, input bit ir, input bit iw,
                                       input int sel, input bit clr, input int mask);
    return 16'((mask << 9) | (int'(clr) << 8) | (sel << 6) | (int'(iw) << 5) | (int'(ir) << 4) | ptr);
  endfunction

  // write PRN, PRNC, SPL/SPB and PROM of coder k with increment on write
  task automatic program_coder(input int k, input bit clr);
    logic [23:0] c;
    c = 24'(cfg_prn[k] - B);
    wr(2'b00, icsr(0, 0, 1, k, 0, 4'hF));
    wr(2'b01, 16'(cfg_prn[k]));
    wr(2'b01, 16'(cfg_prn[k] >> 16));
    wr(2'b01, c[15:0]);
    wr(2'b01, {8'h00, c[23:16]});
    wr(2'b01, 16'((cfg_spb[k] << 12) | cfg_spl[k]));
    wr(2'b01, 16'((int'(clr) << 6) | (int'(cfg_six[k]) << 5) | cfg_n[k]));
    n_inc_wr += 6;
    if (clr) n_clr_ctrs++;
  endtask

  task automatic one_second(input int len);
    logic [15:0] lo, hi, r;
    int t;
    bit served [NC];
    @(negedge clk) pps = 1;
    repeat (20) @(negedge clk);
    pps = 0;
    t = 0;
    for (int k = 0; k < NC; k++) served[k] = 0;
    while (t < len) begin
      if (irpt) begin
        n_irq++;
        rd(2'b00, r);
        check(r[12:9] == 4'hF, $sformatf("ORed ICSR mask bits %b", r[12:9]));
        for (int k = 0; k < NC; k++) begin
          if (!served[k] && coder_irq[k]) begin
            wr(2'b00, icsr(6, 1, 0, k, 0, 4'hF));
            rd(2'b01, lo);
            rd(2'b01, hi);
            n_inc_rd += 2;
            check({hi, lo} == exp_ws[k] && exp_ws[k] != 0,
                  $sformatf("coder %0d word counter %0d expected %0d", k, {hi, lo}, exp_ws[k]));
            wr(2'b00, icsr(6, 0, 0, k, 1, 4'hF));
            n_irq_clr++;
            check(!coder_irq[k], $sformatf("coder %0d interrupt cleared", k));
            served[k] = 1;
          end
        end
        t += 200;
      end else begin
        @(negedge clk);
        t++;
      end
    end
    for (int k = 0; k < NC; k++) check(served[k], $sformatf("coder %0d detected its word", k));
    check(!irpt, "no request left at the end of the second");
  endtask

  logic [15:0] r;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NC; k++) program_coder(k, 1'b1);
    // release the clears: pointer 5, increment on write off
    for (int k = 0; k < NC; k++) begin
      wr(2'b00, icsr(5, 0, 0, k, 0, 4'hF));
      wr(2'b01, 16'((int'(cfg_six[k]) << 5) | cfg_n[k]));
    end
    // read-back of another coder's PRN through the shared bus
    wr(2'b00, icsr(0, 1, 0, 2, 0, 4'hF));
    rd(2'b01, r); check(r == 16'(cfg_prn[2]), $sformatf("coder 2 PRN lo %h", r));
    rd(2'b01, r); check(r == 16'(cfg_prn[2] >> 16), $sformatf("coder 2 PRN hi %h", r));
    n_inc_rd += 2;
    // a write with coder 1 selected must leave coder 3 untouched
    wr(2'b00, icsr(0, 0, 0, 1, 0, 4'hF));
    wr(2'b01, 16'(cfg_prn[1]));
    check(dut.g_coder[3].u_coder.prn == 24'(cfg_prn[3]), "unselected coder keeps PRN");
    n_unselected++;
    repeat (5) @(negedge clk);
    on = 1;
    one_second(40_000);
    one_second(40_000);
    one_second(40_000);

    // mechanisms seen
    begin
      int s6 = 0, s4 = 0, det = 0;
      for (int k = 0; k < NC; k++) begin
        det += detects[k];
        if (cfg_six[k]) s6 += slewed[k]; else s4 += slewed[k];
      end
      $display("ICSR writes %0d, function writes %0d (auto increment %0d), reads %0d (auto increment %0d)",
               n_icsr_wr, n_func_wr, n_inc_wr, n_rd, n_inc_rd);
      $display("counter clears %0d, unselected writes %0d, slews delete(6) %0d add(4) %0d",
               n_clr_ctrs, n_unselected, s6, s4);
      $display("word detects %0d, interrupts served %0d, interrupt clears %0d", det, n_irq, n_irq_clr);
      check(n_icsr_wr > 0 && n_func_wr > 0 && n_inc_wr > 0 && n_inc_rd > 0, "port mechanisms");
      check(n_clr_ctrs > 0 && n_unselected > 0, "clear and unselected write");
      check(s6 > 0 && s4 > 0, "both slew directions");
      check(det == 3 * NC && n_irq > 0 && n_irq_clr == 3 * NC, "detects and interrupts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
