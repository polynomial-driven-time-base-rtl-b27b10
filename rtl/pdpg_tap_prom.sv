// pdpg_tap_prom: feedback tap PROM of the PN code generator.
//
// A combinational lookup from the 5-bit PROM address register to the 24-bit
// tap mask of the parity feedback network.  Address n (2..24) selects a
// maximal-length code of period 2^n - 1; the other addresses return no taps and
// valid = 0.  That the taps come from a PROM addressed by a program register
// follows the published description; the address-to-degree mapping and the polynomials
// themselves (pdpg_pkg::lfsr_taps) are this design's choice.
// The table is built at elaboration from pdpg_pkg::tap_rom().
// Timing: purely combinational, it follows the address in the same cycle.
module pdpg_tap_prom
  import pdpg_pkg::*;
(
  input  logic [PROM_AW-1:0] addr,
  output logic [PN_W-1:0]    taps,
  output logic               valid
);
  localparam prom_t ROM = tap_rom();

  always_comb begin
    taps  = ROM[addr];
    valid = code_valid(addr);
  end
endmodule
