// pdpg_word_prom: word length PROM of the word detector.
//
// For the code selected by the PROM address it returns the 24-bit image the PN
// register holds when the code reaches its all-ones state: the n low stages are
// ones and the stages above them hold the chips shifted in just before.  The
// word detector compares the whole register with this word, so one detection
// happens per code period whatever the code length.  What the PROM stores
// follows the published description; the contents are computed from the tap table by
// pdpg_pkg::word_pattern() rather than listed.
// Timing: purely combinational.
module pdpg_word_prom
  import pdpg_pkg::*;
(
  input  logic [PROM_AW-1:0] addr,
  output logic [PN_W-1:0]    pattern,
  output logic               valid
);
  localparam prom_t ROM = word_rom();

  always_comb begin
    pattern = ROM[addr];
    valid   = code_valid(addr);
  end
endmodule
