// pdpg_regs: computer interface of one coder.
//
// The host reaches the coders through a DR11C-style 16-bit parallel port: a
// write puts a word on dout and pulses ndrdy (new data ready); a read takes
// din, and dtrans pulses when the word has been taken.  The two CSR mode bits
// select what the port reaches.  csr = 00 reaches the ICSR, which every coder
// holds a copy of and every coder loads on a write.  csr = 01 reaches the
// function register named by the ICSR word pointer in the coder named by
// coder select: PRN (24 bits, two words), PRNC (24 bits, two words), SPL/SPB,
// PROM address and control, and the read-only word counter WS (two words).
// The pointer can step after each write or read; every coder steps its own
// copy so the copies stay equal.  Writing the ICSR with bit 8 set clears the
// interrupt of the coder named by coder select.  Each coder keeps only its own
// interrupt mask bit (9 + CODER_ID) and drives only that bit on read-back, so
// the four din buses can be ORed (open collector on the real bus).
// The register map, modes, auto increment and interrupt clear follow the
// published description.  The dtrans input, the bit positions of PCNT6 and Clear in
// register 101, mask polarity (1 = enabled) and the strobe synchroniser
// (the INITIAL block) are this design's choices.
// Timing: ndrdy and dtrans may be asynchronous; each passes two flip-flops and
// an edge detector, so a register changes on the third 50 MHz edge after the
// strobe rises.  csr and dout must be stable by then.  din is combinational.
module pdpg_regs
  import pdpg_pkg::*;
#(
  parameter int unsigned CODER_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         csr,
  input  logic [DATA_W-1:0]  dout,
  input  logic               ndrdy,
  input  logic               dtrans,
  input  logic [WC_W-1:0]    ws,
  output logic [DATA_W-1:0]  din,
  output logic [NCO_W-1:0]   prn,
  output logic [NCO_W-1:0]   prnc,
  output logic [SPL_W-1:0]   spl,
  output logic [SPB_W-1:0]   spb,
  output logic [PROM_AW-1:0] prom_addr,
  output logic               pcnt6,
  output logic               clr_ctrs,
  output logic               clr_irq,
  output logic               irq_en,
  output logic               prom_wr
);
  localparam logic [1:0] ID = 2'(CODER_ID);

  // INITIAL: synchronise the port strobes and take their rising edges
  logic [2:0] ndrdy_s, dtrans_s;
  logic       wr, rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ndrdy_s  <= '0;
      dtrans_s <= '0;
    end else begin
      ndrdy_s  <= {ndrdy_s[1:0], ndrdy};
      dtrans_s <= {dtrans_s[1:0], dtrans};
    end
  end

  csr_mode_e mode;
  icsr_t     wicsr;
  word_ptr_e ptr;
  logic      inc_read, inc_write;
  logic [1:0] coder_sel;
  logic       selected;

  always_comb begin
    wr       = ndrdy_s[1] && !ndrdy_s[2];
    rd       = dtrans_s[1] && !dtrans_s[2];
    mode     = csr_mode_e'(csr);
    wicsr    = icsr_t'(dout);
    selected = coder_sel == ID;
    clr_irq  = wr && mode == MODE_ICSR && wicsr.clr_int && wicsr.coder_sel == ID;
    prom_wr  = wr && mode == MODE_FUNC && selected && ptr == PTR_PROM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= PTR_PRN_LO;
      inc_read  <= 1'b0;
      inc_write <= 1'b0;
      coder_sel <= 2'b00;
      irq_en    <= 1'b0;
      prn       <= '0;
      prnc      <= '0;
      spl       <= '0;
      spb       <= '0;
      prom_addr <= '0;
      pcnt6     <= 1'b0;
      clr_ctrs  <= 1'b0;
    end else begin
      if (wr && mode == MODE_ICSR) begin
        ptr       <= wicsr.ptr;
        inc_read  <= wicsr.inc_read;
        inc_write <= wicsr.inc_write;
        coder_sel <= wicsr.coder_sel;
        irq_en    <= wicsr.int_mask[CODER_ID];
      end else if (wr && mode == MODE_FUNC) begin
        if (selected) begin
          unique case (ptr)
            PTR_PRN_LO:  prn[15:0]   <= dout;
            PTR_PRN_HI:  prn[23:16]  <= dout[7:0];
            PTR_PRNC_LO: prnc[15:0]  <= dout;
            PTR_PRNC_HI: prnc[23:16] <= dout[7:0];
            PTR_SPL_SPB: begin
              spl <= dout[SPL_W-1:0];
              spb <= dout[15:12];
            end
            PTR_PROM: begin
              prom_addr <= dout[PROM_AW-1:0];
              pcnt6     <= dout[PROM_PCNT6_BIT];
              clr_ctrs  <= dout[PROM_CLR_BIT];
            end
            PTR_WS_LO, PTR_WS_HI: ;  // read only
          endcase
        end
        if (inc_write) ptr <= word_ptr_e'(ptr + 3'd1);
      end else if (rd && mode == MODE_FUNC && inc_read) begin
        ptr <= word_ptr_e'(ptr + 3'd1);
      end
    end
  end

  // read-back
  always_comb begin
    icsr_t r;
    r           = '0;
    r.ptr       = ptr;
    r.inc_read  = inc_read;
    r.inc_write = inc_write;
    r.coder_sel = coder_sel;
    r.int_mask[CODER_ID] = irq_en;
    din = '0;
    if (mode == MODE_ICSR) begin
      din = r;
    end else if (mode == MODE_FUNC && selected) begin
      unique case (ptr)
        PTR_PRN_LO:  din = prn[15:0];
        PTR_PRN_HI:  din = {8'h00, prn[23:16]};
        PTR_PRNC_LO: din = prnc[15:0];
        PTR_PRNC_HI: din = {8'h00, prnc[23:16]};
        PTR_SPL_SPB: din = {spb, spl};
        PTR_PROM:    din = {9'h000, clr_ctrs, pcnt6, prom_addr};
        PTR_WS_LO:   din = ws[15:0];
        PTR_WS_HI:   din = ws[31:16];
      endcase
    end
  end
endmodule
