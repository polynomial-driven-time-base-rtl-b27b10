// tb_pdpg_regs: checks the register interface of coder 2.
// Drives the parallel port as the host would: a write sets csr and dout and
// pulses ndrdy; a read samples din and then pulses dtrans.  Checks ICSR
// write/read-back (only this coder's mask bit), writes to every function
// register through the auto-incrementing pointer, read-only word counter
// words, reads with increment on read, accesses addressed to another coder,
// clear-interrupt decoding, the PROM-write strobe and the reserved modes.
module tb_pdpg_regs;
  import pdpg_pkg::*;
  logic        clk = 0, rst_n = 0, ndrdy = 0, dtrans = 0;
  logic [1:0]  csr = 0;
  logic [15:0] dout = 0, din;
  logic [31:0] ws;
  logic [23:0] prn, prnc;
  logic [11:0] spl;
  logic [3:0]  spb;
  logic [4:0]  prom_addr;
  logic        pcnt6, clr_ctrs, clr_irq, irq_en, prom_wr;
  int checks = 0, failures = 0, n_clr = 0, n_promwr = 0;

  pdpg_regs #(.CODER_ID(2)) dut (.clk, .rst_n, .csr, .dout, .ndrdy, .dtrans, .ws, .din,
    .prn, .prnc, .spl, .spb, .prom_addr, .pcnt6, .clr_ctrs, .clr_irq, .irq_en, .prom_wr);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (clr_irq) n_clr++;
    if (prom_wr) n_promwr++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
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

  // ICSR word: pointer, increment on read/write, coder select, clear, mask
  function automatic logic [15:0] icsr(input int ptr, input bit ir, input bit iw,
                                       input int sel, input bit clr, input int mask);
    return 16'((mask << 9) | (int'(clr) << 8) | (sel << 6) | (int'(iw) << 5) | (int'(ir) << 4) | ptr);
  endfunction

  logic [15:0] r;

  initial begin
    ws = 32'hDEAD_BEEF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(2'b00, r);
    check(r == 16'h0000, "ICSR reset value");

    // ICSR write, read back: only mask bit 11 is this coder's
    wr(2'b00, icsr(0, 0, 1, 2, 0, 4'b1111));
    rd(2'b00, r);
    check(r == icsr(0, 0, 1, 2, 0, 4'b0100), $sformatf("ICSR read-back %h", r));
    check(irq_en, "mask bit taken");

    // function registers through auto increment on write
    wr(2'b01, 16'h1234);   // PRN lo
    wr(2'b01, 16'hAB56);   // PRN hi (8 bits)
    wr(2'b01, 16'h9876);   // PRNC lo
    wr(2'b01, 16'hFF68);   // PRNC hi
    wr(2'b01, 16'h5ABC);   // SPB=5, SPL=ABC
    wr(2'b01, 16'h0065);   // PROM=5, PCNT6=1, clear=1
    check(prn == 24'h561234, $sformatf("PRN %h", prn));
    check(prnc == 24'h689876, $sformatf("PRNC %h", prnc));
    check(spl == 12'hABC && spb == 4'h5, "SPL/SPB");
    check(prom_addr == 5'd5 && pcnt6 && clr_ctrs, "PROM and control");
    check(n_promwr == 1, "one PROM write strobe");
    wr(2'b01, 16'h1111);   // WS lo: read only
    wr(2'b01, 16'h2222);   // WS hi: read only
    wr(2'b01, 16'h0042);   // wrapped to PRN lo
    check(prn == 24'h560042, "pointer wrapped after register 7");
    check(ws == 32'hDEAD_BEEF, "ws untouched");

    // read back with increment on read, starting at PRN hi
    wr(2'b00, icsr(1, 1, 0, 2, 0, 4'b0100));
    rd(2'b01, r); check(r == 16'h0056, $sformatf("read PRN hi %h", r));
    rd(2'b01, r); check(r == 16'h9876, "read PRNC lo");
    rd(2'b01, r); check(r == 16'h0068, "read PRNC hi");
    rd(2'b01, r); check(r == 16'h5ABC, "read SPL/SPB");
    rd(2'b01, r); check(r == 16'h0065, "read PROM");
    rd(2'b01, r); check(r == 16'hBEEF, "read WS lo");
    rd(2'b01, r); check(r == 16'hDEAD, "read WS hi");
    rd(2'b01, r); check(r == 16'h0042, "read wrapped to PRN lo");

    // no increment: pointer stays
    wr(2'b00, icsr(6, 0, 0, 2, 0, 4'b0100));
    rd(2'b01, r); rd(2'b01, r);
    check(r == 16'hBEEF, "pointer holds without increment");

    // another coder selected: no write, no read-back, pointer still steps
    wr(2'b00, icsr(0, 0, 1, 1, 0, 4'b0000));
    check(!irq_en, "mask bit cleared");
    wr(2'b01, 16'h7777);
    check(prn == 24'h560042, "write to other coder ignored");
    rd(2'b01, r); check(r == 16'h0000, "no read-back for other coder");
    rd(2'b00, r); check(r == icsr(1, 0, 1, 1, 0, 0), $sformatf("pointer stepped in unselected coder %h", r));

    // clear interrupt decoding
    n_clr = 0;
    wr(2'b00, icsr(0, 0, 0, 1, 1, 0));
    check(n_clr == 0, "clear for coder 1 ignored");
    wr(2'b00, icsr(0, 0, 0, 2, 1, 0));
    check(n_clr == 1, "clear for coder 2 decoded once");
    rd(2'b00, r); check(r == icsr(0, 0, 0, 2, 0, 0), "clear bit not stored");

    // reserved modes
    wr(2'b10, 16'hFFFF);
    wr(2'b11, 16'hFFFF);
    rd(2'b10, r); check(r == 16'h0000, "reserved mode reads 0");
    rd(2'b00, r); check(r == icsr(0, 0, 0, 2, 0, 0), "reserved mode writes ignored");
    check(prn == 24'h560042, "PRN kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
