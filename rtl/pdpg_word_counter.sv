// pdpg_word_counter: word detector, word counter and interrupt of one coder.
//
// The A=B comparator matches the whole PN register against the word length
// PROM.  At each 1PPS the counter clears and starts counting 50 MHz clocks;
// the first cycle in which the register becomes equal to the PROM word stops
// it and raises the interrupt flag.  The counter then holds WS, the number of
// 50 MHz clock edges from the 1PPS strobe to the detect, and stays stopped
// until the next 1PPS.  irpt is the flag gated by this coder's interrupt mask
// bit; clr_irq clears the flag.  This behaviour follows the published description; counting
// only a new match (a register already equal at 1PPS must be reached again)
// and letting a 1PPS restart the counter with the flag still set are this
// design's choices.
// Timing: 50 MHz clock.  A detect in the cycle after the 1PPS strobe gives
// WS = 1.  A detect and a clear in the same cycle leave the flag set.
module pdpg_word_counter #(
  parameter int unsigned WC_W = 32,
  parameter int unsigned PN_W = 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sec,
  input  logic [PN_W-1:0] sr,
  input  logic [PN_W-1:0] pattern,
  input  logic            valid,
  input  logic            clr_irq,
  input  logic            irq_en,
  output logic [WC_W-1:0] ws,
  output logic            running,
  output logic            hit,
  output logic            irq,
  output logic            irpt
);
  logic match, match_q;

  always_comb begin
    match = valid && (sr == pattern);
    hit   = running && !sec && match && !match_q;
    irpt  = irq && irq_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= '0;
      running <= 1'b0;
      irq     <= 1'b0;
      match_q <= 1'b0;
    end else begin
      match_q <= match;
      if (sec) begin
        ws      <= '0;
        running <= 1'b1;
      end else if (running) begin
        ws <= ws + 1'b1;
        if (hit) running <= 1'b0;
      end
      if (hit)          irq <= 1'b1;
      else if (clr_irq) irq <= 1'b0;
    end
  end
endmodule
