// pdpg_pkg: types, constants and table functions shared by the PDPG coder.
//
// The coder is programmed through a 16-bit parallel port.  A control word (the
// ICSR) selects one of four coders and one of eight 16-bit function registers;
// its bit map and the register map follow the published register formats.
// The two PROM tables of the code generator (feedback taps and the word to
// detect) are built here at elaboration: lfsr_taps() lists one primitive
// polynomial per code degree 2..24 (standard maximal-length polynomials, the
// published description does not give them), and word_pattern() derives the word-length
// PROM image from them by running the code backwards from its all-ones state.
// tap_rom() and word_rom() turn them into the two 32-word PROM images.
package pdpg_pkg;

  localparam int unsigned DATA_W  = 16;  // DR11C data path
  localparam int unsigned NCO_W   = 24;  // PRN / PRNC / feedback register
  localparam int unsigned SPL_W   = 12;  // divide by N value
  localparam int unsigned SPB_W   = 4;   // divide by M value
  localparam int unsigned PN_W    = 24;  // PN shift register
  localparam int unsigned WC_W    = 32;  // word counter
  localparam int unsigned PROM_AW = 5;   // PROM address register
  localparam int unsigned SET_B_DEFAULT = 10_000_000;  // comparator B side

  // DR11C CSR1/CSR0 mode
  typedef enum logic [1:0] {
    MODE_ICSR  = 2'b00,   // read/write the ICSR
    MODE_FUNC  = 2'b01,   // read/write the function register at the pointer
    MODE_RSV10 = 2'b10,
    MODE_RSV11 = 2'b11
  } csr_mode_e;

  // ICSR word pointer
  typedef enum logic [2:0] {
    PTR_PRN_LO  = 3'b000,  // PRN 0-15
    PTR_PRN_HI  = 3'b001,  // PRN 16-23
    PTR_PRNC_LO = 3'b010,  // PRNC 0-15
    PTR_PRNC_HI = 3'b011,  // PRNC 16-23
    PTR_SPL_SPB = 3'b100,  // SPL 0-11, SPB 0-3
    PTR_PROM    = 3'b101,  // PROM 0-4 and control
    PTR_WS_LO   = 3'b110,  // word counter 0-15 (read only)
    PTR_WS_HI   = 3'b111   // word counter 16-31 (read only)
  } word_ptr_e;

  // ICSR bit map, MSB first
  typedef struct packed {
    logic [2:0] unused15_13;
    logic [3:0] int_mask;    // bit 9 + k enables coder k
    logic       clr_int;     // strobe: clear interrupt of the selected coder
    logic [1:0] coder_sel;
    logic       inc_write;
    logic       inc_read;
    logic       unused3;
    word_ptr_e  ptr;
  } icsr_t;

  // Register 101 bit positions
  localparam int unsigned PROM_PCNT6_BIT = 5;
  localparam int unsigned PROM_CLR_BIT   = 6;

  // Feedback tap mask of the maximal-length code of degree addr (2..24).
  // Bit k-1 set means stage k feeds the parity network; bit addr-1 is always set.
  // Other addresses give no taps.
  function automatic logic [PN_W-1:0] lfsr_taps(input logic [PROM_AW-1:0] addr);
    case (addr)
      5'd2:    return 24'h000003;  // x^2+x+1
      5'd3:    return 24'h000006;  // taps 3,2
      5'd4:    return 24'h00000C;  // 4,3
      5'd5:    return 24'h000014;  // 5,3
      5'd6:    return 24'h000030;  // 6,5
      5'd7:    return 24'h000060;  // 7,6
      5'd8:    return 24'h0000B8;  // 8,6,5,4
      5'd9:    return 24'h000110;  // 9,5
      5'd10:   return 24'h000240;  // 10,7
      5'd11:   return 24'h000500;  // 11,9
      5'd12:   return 24'h000829;  // 12,6,4,1
      5'd13:   return 24'h00100D;  // 13,4,3,1
      5'd14:   return 24'h002015;  // 14,5,3,1
      5'd15:   return 24'h006000;  // 15,14
      5'd16:   return 24'h00D008;  // 16,15,13,4
      5'd17:   return 24'h012000;  // 17,14
      5'd18:   return 24'h020400;  // 18,11
      5'd19:   return 24'h040023;  // 19,6,2,1
      5'd20:   return 24'h090000;  // 20,17
      5'd21:   return 24'h140000;  // 21,19
      5'd22:   return 24'h300000;  // 22,21
      5'd23:   return 24'h420000;  // 23,18
      5'd24:   return 24'hE10000;  // 24,23,22,17
      default: return '0;
    endcase
  endfunction

  function automatic logic code_valid(input logic [PROM_AW-1:0] addr);
    return addr >= 5'd2 && addr <= 5'd24;
  endfunction

  // 24-bit register image at the moment the n low stages are all ones.
  // Stage k holds the chip shifted in k shifts earlier, so stages n..23 are the
  // chips just before the all-ones state.  With p[k] that chip, the recursion
  // p[m-n+n] = parity of the taps gives
  //   p[m] = p[m-n] ^ XOR over taps j<n of p[m-n+j].
  function automatic logic [PN_W-1:0] word_pattern(input logic [PROM_AW-1:0] addr);
    logic [PN_W-1:0] taps, p;
    int unsigned n;
    taps = lfsr_taps(addr);
    if (!code_valid(addr)) return '0;
    n = int'(addr);
    p = '0;
    for (int unsigned k = 0; k < PN_W; k++)
      if (k < n) p[k] = 1'b1;
    for (int unsigned m = 0; m < PN_W; m++) begin
      if (m >= n) begin
        logic b;
        b = p[m-n];
        for (int unsigned j = 1; j < n; j++)
          if (taps[j-1]) b ^= p[m-n+j];
        p[m] = b;
      end
    end
    return p;
  endfunction

  // Whole PROM images, built at elaboration so the hardware is a 32-word table.
  typedef logic [PN_W-1:0] prom_t [2**PROM_AW];

  function automatic prom_t tap_rom();
    prom_t r;
    for (int a = 0; a < 2**PROM_AW; a++) r[a] = lfsr_taps(PROM_AW'(a));
    return r;
  endfunction

  function automatic prom_t word_rom();
    prom_t r;
    for (int a = 0; a < 2**PROM_AW; a++) r[a] = word_pattern(PROM_AW'(a));
    return r;
  endfunction

endpackage
