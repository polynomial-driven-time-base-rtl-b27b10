// pdpg_div456: divide by 4, 5, 6 counter with its slew delay.
//
// Normally divides the 50 MHz clock by 5 and emits the 10 MCK strobe once
// every 5 cycles.  Each slew event from the number controlled oscillator is
// held pending (the DELAY stage) until the counter next reloads; that one
// count then lasts 6 cycles when pcnt6 = 1, deleting one 50 MHz clock (20 ns)
// from the time base, or 4 cycles when pcnt6 = 0, adding one.  The 4/5/6
// division driven by the oscillator follows the published description; the pending flag
// and the polarity of pcnt6 are this design's choices.
// Timing: mck is a one-cycle strobe in the 50 MHz domain, high in the last
// cycle of each count.  clr holds the counter at its reload point with mck low
// and drops any pending event; the first mck follows one cycle after clr falls.
module pdpg_div456 (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic slew,
  input  logic pcnt6,
  output logic mck
);
  logic [2:0] cnt;      // cycles left in this count, minus one
  logic       pend;     // slew event waiting for the next reload
  logic       reload;
  logic       slewed;

  always_comb begin
    reload = cnt == 3'd0;
    slewed = pend || slew;
    mck    = reload && !clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= 3'd4;
      pend <= 1'b0;
    end else if (clr) begin
      cnt  <= 3'd0;
      pend <= 1'b0;
    end else if (reload) begin
      cnt  <= !slewed ? 3'd4 : (pcnt6 ? 3'd5 : 3'd3);
      pend <= 1'b0;
    end else begin
      cnt  <= cnt - 3'd1;
      pend <= slewed;
    end
  end
endmodule
