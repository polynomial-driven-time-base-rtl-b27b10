// pdpg_nco: number controlled oscillator of the baud rate control.
//
// A W-bit accumulator (the feedback register) is advanced at the 10 MHz
// reference.  Each tick it adds either PRN, the increment, or PRNC, which holds
// the increment minus SET_B modulo 2^W.  The adder output SUM is compared with
// SET_B (the switch-set B side, the reference frequency); when SUM > SET_B a
// slew event is emitted and the next tick adds PRNC, bringing the
// accumulator back below SET_B.  Over one second of SET_B ticks this gives
// PRN slew events, each of which makes the divide by 4,5,6 counter add or
// delete one 50 MHz clock.
// At 1PPS the feedback register is zeroed, new PRN and PRNC values are taken
// from the program registers and PRNC is selected, so the first tick after the
// second loads 0 + PRNC.  All of this follows the published description.  Holding the 1PPS
// strobe until the next 10 MHz tick and registering the comparator as the
// select are this design's choices.
// Timing: 50 MHz clock, tick10 a one-cycle enable every 5 cycles, sec a
// one-cycle 1PPS strobe.  slew is high in the tick10 cycle whose SUM exceeds
// SET_B.
module pdpg_nco #(
  parameter int unsigned W     = 24,
  parameter int unsigned SET_B = 10_000_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick10,
  input  logic         sec,
  input  logic [W-1:0] prn,
  input  logic [W-1:0] prnc,
  output logic         slew,
  output logic         nmal,   // 1: PRNC is presented to the adder this tick
  output logic [W-1:0] acc
);
  logic [W-1:0] prn_q, prnc_q, sum;
  logic         sec_pend, load, agb;

  always_comb begin
    sum  = acc + (nmal ? prnc_q : prn_q);
    agb  = sum > W'(SET_B);
    load = tick10 && (sec_pend || sec);
    slew = tick10 && !load && agb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      prn_q    <= '0;
      prnc_q   <= '0;
      nmal     <= 1'b0;
      sec_pend <= 1'b0;
    end else begin
      if (load) begin
        acc      <= '0;
        prn_q    <= prn;
        prnc_q   <= prnc;
        nmal     <= 1'b1;
        sec_pend <= 1'b0;
      end else begin
        if (sec) sec_pend <= 1'b1;
        if (tick10) begin
          acc  <= sum;
          nmal <= agb;
        end
      end
    end
  end
endmodule
