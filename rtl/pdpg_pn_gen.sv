// pdpg_pn_gen: PN code shift register with parity feedback.
//
// A W-bit shift register advanced by the SHIFT strobe.  On each shift the
// parity (XOR) of the stages selected by the tap mask enters stage 0 and all
// stages move up by one, so with the tap mask of a degree-n primitive
// polynomial the low n stages run through all 2^n - 1 non-zero states and the
// upper stages keep the most recent chips.  pn is stage 0, the newest chip.
// The register and parity feedback follow the published description; the Fibonacci form,
// the choice of output stage and loading all ones on reset or on load_ones
// (issued when the code is reprogrammed) are this design's choices.
// Timing: one 50 MHz clock domain, shift_en is a one-cycle enable; sr changes
// on the clock edge that samples shift_en.  load_ones wins over shift_en.
module pdpg_pn_gen #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         load_ones,
  input  logic [W-1:0] taps,
  output logic [W-1:0] sr,
  output logic         pn
);
  logic fb;
  always_comb fb = ^(sr & taps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sr <= '1;
    else if (load_ones) sr <= '1;
    else if (shift_en)  sr <= {sr[W-2:0], fb};
  end

  always_comb pn = sr[0];
endmodule
