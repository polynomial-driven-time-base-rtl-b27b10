// tb_pdpg_coder: end-to-end test of one coder at its default size.
// The host side programs PRN/PRNC, SPL/SPB and the code through the port, then
// several short 1PPS intervals run.  A checking monitor follows the slew
// events, the 10 MCK, SMPL and SHIFT strobes and the PN register and works out
// the word count; after each word detect the test waits for the interrupt,
// reads the word counter through the port and compares it, then clears the
// interrupt.  The second programmed second uses a new PRN and divide by 4.
module tb_pdpg_coder;
  localparam int B = 10_000_000;
  logic        clk = 0, rst_n = 0, ref10_en = 0, pps = 0, ndrdy = 0, dtrans = 0;
  logic [1:0]  csr = 0;
  logic [15:0] dout = 0, din;
  logic        irpt, smpl, shift, pn;
  logic [23:0] pn_state;
  int checks = 0, failures = 0;

  pdpg_coder #(.CODER_ID(0)) dut (.clk, .rst_n, .ref10_en, .pps, .csr, .dout, .ndrdy, .dtrans,
    .din, .irpt, .smpl, .shift, .pn, .pn_state);

  // configuration the monitor checks against
  logic on = 0;
  int   prn_i = 0, n = 0, spl = 0, spb = 0;
  logic pcnt6 = 0;
  int   m_checks, m_failures, detects, slews, slewed;
  logic [31:0] exp_ws;

  pdpg_coder_monitor mon (.clk, .on, .pps, .ref10_en, .prn_i, .n, .spl, .spb, .pcnt6,
    .slew(dut.slew), .mck(dut.mck), .smpl, .shift, .pn_state, .prom_wr(dut.prom_wr), .clr(dut.clr_ctrs),
    .checks(m_checks), .failures(m_failures), .exp_ws, .detects, .slews, .slewed_counts(slewed));

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 4) ? 0 : phase + 1;
    ref10_en <= (phase == 3);
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  // PRN, PRNC, SPL/SPB, PROM with increment on write, coder 0, mask on
  task automatic program_coder(input int inc, input int deg, input int l, input int b, input bit six,
                         input bit clr);
    logic [23:0] c;
    c = 24'(inc - B);
    wr(2'b00, 16'h0220);
    wr(2'b01, 16'(inc));
    wr(2'b01, 16'(inc >> 16));
    wr(2'b01, c[15:0]);
    wr(2'b01, {8'h00, c[23:16]});
    wr(2'b01, 16'((b << 12) | l));
    wr(2'b01, 16'((int'(clr) << 6) | (int'(six) << 5) | deg));
  endtask

  task automatic pulse_pps;
    @(negedge clk) pps = 1;
    repeat (20) @(negedge clk);
    pps = 0;
  endtask

  task automatic second(input int len);
    logic [15:0] lo, hi;
    int t;
    pulse_pps();
    t = 0;
    while (!irpt && t < len) begin @(negedge clk); t++; end
    check(irpt, "interrupt after word detect");
    wr(2'b00, 16'h0216);               // pointer 6, increment on read
    rd(2'b01, lo);
    rd(2'b01, hi);
    check({hi, lo} == exp_ws && exp_ws != 0,
          $sformatf("word counter %0d expected %0d", {hi, lo}, exp_ws));
    wr(2'b00, 16'h0300);               // clear interrupt of coder 0, mask on
    check(!irpt, "interrupt cleared");
    while (t < len) begin @(negedge clk); t++; end
  endtask

  logic [15:0] r;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // hold the counters clear while programming
    program_coder(200_000, 6, 1, 2, 1'b1, 1'b1);
    rd(2'b01, r);                      // pointer wrapped to 6: WS lo reads 0
    check(r == 16'h0000, "word counter zero after reset");
    wr(2'b00, 16'h0225);               // pointer 5, increment on write
    prn_i = 200_000; n = 6; spl = 1; spb = 2; pcnt6 = 1;
    wr(2'b01, 16'h0026);               // release clear
    repeat (5) @(negedge clk);
    on = 1;
    second(30_000);
    second(30_000);
    // new rate and divide by 4 take effect at the next 1PPS
    on = 0;
    program_coder(333_333, 9, 0, 1, 1'b0, 1'b1);
    prn_i = 333_333; n = 9; spl = 0; spb = 1; pcnt6 = 0;
    wr(2'b00, 16'h0225);
    wr(2'b01, 16'h0009);               // release clear
    repeat (40) @(negedge clk);
    on = 1;
    second(60_000);
    second(60_000);
    check(detects == 4, $sformatf("%0d word detects", detects));
    check(slews > 100 && slewed > 100, $sformatf("slews %0d slewed counts %0d", slews, slewed));
    $display("detects %0d slew events %0d slewed counts %0d", detects, slews, slewed);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
