// pdpg_system: four PDPG coders on one host port.
//
// In the radar system one coder drives the transmitter and three drive the
// receiver correlators; all four hang on the same DR11C-style parallel port.
// Every coder sees every write, holds its own copy of the ICSR and answers
// function-register accesses only when coder select names it.  The read-back
// buses and the interrupt requests are combined by OR, standing for the open
// collector wiring of the real bus (active-high here).  Sharing the port and
// the request line follows the published description; the OR model is this design's.
// Timing: one 50 MHz clock for all coders; ref10_en is the coherent 10 MHz
// reference as a one-cycle strobe every fifth cycle; pps is the 1PPS level.
// Per-coder outputs are indexed by coder number (coder select value).
module pdpg_system
  import pdpg_pkg::*;
#(
  parameter int unsigned NUM_CODERS = 4,
  parameter int unsigned SET_B      = SET_B_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ref10_en,
  input  logic                      pps,
  input  logic [1:0]                csr,
  input  logic [DATA_W-1:0]         out_data,
  input  logic                      ndrdy,
  input  logic                      dtrans,
  output logic [DATA_W-1:0]         in_data,
  output logic                      irpt,
  output logic [NUM_CODERS-1:0]     smpl,
  output logic [NUM_CODERS-1:0]     shift,
  output logic [NUM_CODERS-1:0]     pn,
  output logic [PN_W-1:0]           pn_state [NUM_CODERS]
);
  logic [DATA_W-1:0] din [NUM_CODERS];
  logic [NUM_CODERS-1:0] req;

  for (genvar k = 0; k < NUM_CODERS; k++) begin : g_coder
    pdpg_coder #(.CODER_ID(k), .SET_B(SET_B)) u_coder (
      .clk, .rst_n, .ref10_en, .pps, .csr, .dout(out_data), .ndrdy, .dtrans,
      .din(din[k]), .irpt(req[k]), .smpl(smpl[k]), .shift(shift[k]),
      .pn(pn[k]), .pn_state(pn_state[k])
    );
  end

  always_comb begin
    in_data = '0;
    for (int k = 0; k < NUM_CODERS; k++) in_data |= din[k];
    irpt = |req;
  end
endmodule
