// pdpg_coder: one polynomial driven time base and PN generator (PDPG) coder.
//
// The coder makes a PN chip stream whose timing can be slewed against the
// station clock so that it follows the Doppler time stretch of a radar echo,
// and it measures the phase of that stream against the 1PPS pulse.
//   * Time base: the 50 MHz clock is divided by 5 to a 10 MHz clock (10 MCK).
//     A number controlled oscillator running at the 10 MHz reference issues
//     PRN slew events per second; each makes one count of the divider 6 (or 4)
//     cycles long, moving the time base by 20 ns.  PRN/PRNC are taken at 1PPS.
//   * Divide by SPL+1 gives the SMPL strobe, a further divide by SPB+1 gives
//     SHIFT, the chip clock of the PN generator.
//   * The PN generator is a 24-bit parity feedback shift register whose taps
//     come from the feedback tap PROM (PROM address = code degree 2..24).
//   * The word detector compares the register with the word length PROM; the
//     word counter counts 50 MHz clocks from 1PPS to the detect, then stops and
//     raises an interrupt.  The host reads the count through the register
//     interface and corrects PRN/PRNC for the next second.
// The block structure follows the published description.  Internal choices are given in
// each submodule.  Here 1PPS is used as a level whose rising edge is the
// second; it is coherent with clk, so no synchroniser is used.
// The internal nets acc, nmal, running, hit and irq drive no output; they
// are kept named so that simulations can observe the oscillator and the
// word counter state.
// Timing: one 50 MHz clock; ref10_en is a one-cycle strobe every fifth cycle
// (the coherent 10 MHz input); smpl and shift are one-cycle strobes.
module pdpg_coder
  import pdpg_pkg::*;
#(
  parameter int unsigned CODER_ID = 0,
  parameter int unsigned SET_B    = SET_B_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref10_en,
  input  logic              pps,
  input  logic [1:0]        csr,
  input  logic [DATA_W-1:0] dout,
  input  logic              ndrdy,
  input  logic              dtrans,
  output logic [DATA_W-1:0] din,
  output logic              irpt,
  output logic              smpl,
  output logic              shift,
  output logic              pn,
  output logic [PN_W-1:0]   pn_state
);
  logic [NCO_W-1:0]   prn, prnc, acc;
  logic [SPL_W-1:0]   spl;
  logic [SPB_W-1:0]   spb;
  logic [PROM_AW-1:0] prom_addr;
  logic               pcnt6, clr_ctrs, clr_irq, irq_en, prom_wr;
  logic [WC_W-1:0]    ws;
  logic               pps_q, sec, slew, nmal, mck;
  logic [PN_W-1:0]    taps, pattern;
  logic               taps_valid, word_valid, running, hit, irq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pps_q <= 1'b0;
    else        pps_q <= pps;
  end
  always_comb sec = pps && !pps_q;

  pdpg_regs #(.CODER_ID(CODER_ID)) u_regs (
    .clk, .rst_n, .csr, .dout, .ndrdy, .dtrans, .ws, .din,
    .prn, .prnc, .spl, .spb, .prom_addr, .pcnt6, .clr_ctrs,
    .clr_irq, .irq_en, .prom_wr
  );

  pdpg_nco #(.W(NCO_W), .SET_B(SET_B)) u_nco (
    .clk, .rst_n, .tick10(ref10_en), .sec, .prn, .prnc, .slew, .nmal, .acc
  );

  pdpg_div456 u_div456 (
    .clk, .rst_n, .clr(clr_ctrs), .slew, .pcnt6, .mck
  );

  pdpg_divn #(.W(SPL_W)) u_div_n (
    .clk, .rst_n, .clr(clr_ctrs), .en(mck), .div(spl), .q(smpl)
  );

  pdpg_divn #(.W(SPB_W)) u_div_m (
    .clk, .rst_n, .clr(clr_ctrs), .en(smpl), .div(spb), .q(shift)
  );

  pdpg_tap_prom u_tap_prom (.addr(prom_addr), .taps, .valid(taps_valid));

  pdpg_word_prom u_word_prom (.addr(prom_addr), .pattern, .valid(word_valid));

  pdpg_pn_gen #(.W(PN_W)) u_pn (
    .clk, .rst_n, .shift_en(shift), .load_ones(prom_wr), .taps,
    .sr(pn_state), .pn
  );

  pdpg_word_counter #(.WC_W(WC_W), .PN_W(PN_W)) u_wc (
    .clk, .rst_n, .sec, .sr(pn_state), .pattern,
    .valid(word_valid && taps_valid), .clr_irq, .irq_en,
    .ws, .running, .hit, .irq, .irpt
  );
endmodule
