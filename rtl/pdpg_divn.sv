// pdpg_divn: programmable pulse divider (the divide by N and divide by M
// counters of the baud rate control).
//
// Counts input strobes and emits one output strobe for every div+1 input
// strobes, in the same cycle as the input strobe that completes the count.
// With div = 0 every input strobe passes.  Used twice: divide by N (W = 12,
// SPL) turns 10 MCK into SMPL, divide by M (W = 4, SPB) turns SMPL into SHIFT.
// That N and M are program registers of 12 and 4 bits follows the published description;
// the ratio div+1 is this design's choice.  clr holds the count at zero.
// A new div takes effect at once; a count already past it ends on the next
// input strobe.
module pdpg_divn #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] div,
  output logic         q
);
  logic [W-1:0] cnt;
  logic         last;

  always_comb begin
    last = cnt >= div;
    q    = en && last && !clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (clr) cnt <= '0;
    else if (en)  cnt <= last ? '0 : cnt + 1'b1;
  end
endmodule
