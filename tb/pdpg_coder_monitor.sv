// pdpg_coder_monitor: checking model of one coder's time base and PN output,
// shared by the coder and system testbenches.
//
// It watches a coder's internal strobes and checks, each 50 MHz cycle:
//   * slew events against an oscillator model in unbounded integers (PRN and
//     PRNC as programmed are taken at 1PPS; after a sum above B the increment
//     is PRN - B), compared tick by tick;
//   * every 10 MCK interval is 5 cycles, or 6 (pcnt6=1) / 4 (pcnt6=0) once per
//     slew event, applied within one count;
//   * SMPL comes every spl+1 MCK and SHIFT every spb+1 SMPL;
//   * the PN register equals a parity-feedback model advanced on SHIFT;
//   * and it works out the word counter value the coder must report: the
//     clocks from the 1PPS edge to the first cycle in which the model register
//     shows the all-ones state of the code with the chips before it.
// Checking starts when `on` is set; the configuration must be stable by then,
// and the divider counts must have been cleared (clr) since it last changed.
module pdpg_coder_monitor #(
  parameter longint B = 10_000_000
) (
  input  logic        clk,
  input  logic        on,
  input  logic        pps,
  input  logic        ref10_en,
  input  int          prn_i,
  input  int          n,
  input  int          spl,
  input  int          spb,
  input  logic        pcnt6,
  input  logic        slew,
  input  logic        mck,
  input  logic        smpl,
  input  logic        shift,
  input  logic [23:0] pn_state,
  input  logic        prom_wr,
  input  logic        clr,
  output int          checks,
  output int          failures,
  output logic [31:0] exp_ws,
  output int          detects,
  output int          slews,
  output int          slewed_counts
);
  // oscillator model
  longint a, s, prn_l;
  bit     pend, use_c, first;
  logic   pps_q = 0;
  // divider model
  int     since_mck = -1, owed = 0, mck_since_smpl = 0, smpl_since_shift = 0;
  // PN and word counter model
  logic [23:0] msr = '1, image;
  bit     mmatch_q = 0, run = 0;
  int     cnt = 0;

  initial begin
    checks = 0; failures = 0; detects = 0; slews = 0; slewed_counts = 0; exp_ws = 0;
    a = 0; prn_l = 0; pend = 0; use_c = 0; first = 0;
  end

  function automatic logic [23:0] taps_of(input int deg);
    case (deg)
      2: return 24'h3;      3: return 24'h6;      4: return 24'hC;      5: return 24'h14;
      6: return 24'h30;     7: return 24'h60;     8: return 24'hB8;     9: return 24'h110;
      10: return 24'h240;   11: return 24'h500;   12: return 24'h829;   13: return 24'h100D;
      14: return 24'h2015;  15: return 24'h6000;  16: return 24'hD008;  17: return 24'h12000;
      18: return 24'h20400; 19: return 24'h40023; 20: return 24'h90000; 21: return 24'h140000;
      22: return 24'h300000; 23: return 24'h420000; 24: return 24'hE10000;
      default: return 24'h0;
    endcase
  endfunction

  // register image at the all-ones state, found by running the code forward
  function automatic logic [23:0] image_of(input int deg);
    logic [23:0] r, low, t;
    longint k;
    t = taps_of(deg);
    low = (24'h1 << deg) - 1;
    r = '1;
    k = 0;
    while (k < 24 + (longint'(1) << deg) || (r & low) != low) begin
      r = (r << 1) | 24'(^(r & t));
      k++;
    end
    return r;
  endfunction

  int n_img = -1;  // degree the cached image belongs to

  task automatic fail(input string what);
    failures++;
    $display("FAIL %m %s at %0t", what, $time);
  endtask

  always @(posedge clk) begin
    bit sec, load, agb, mmatch;
    sec = pps && !pps_q;
    if (n != n_img) begin image = image_of(n); n_img = n; end
    pps_q <= pps;

    // oscillator
    load = ref10_en && (pend || sec);
    if (load) begin
      a = 0; use_c = 1; first = 1; prn_l = prn_i; pend = 0;
    end else begin
      if (sec) pend = 1;
      if (ref10_en) begin
        s = a + (use_c ? (first ? ((longint'(1) << 24) - B + prn_l) : (prn_l - B)) : prn_l);
        agb = s > B;
        if (on) begin
          checks++;
          if (slew !== agb) fail($sformatf("slew=%b model sum %0d", slew, s));
        end
        a = s; use_c = agb; first = 0;
      end
    end
    if (slew) begin slews++; owed++; end

    // 4/5/6 divider
    if (mck) begin
      if (since_mck >= 0 && on) begin
        int gap;
        gap = since_mck + 1;
        checks++;
        if (gap == (pcnt6 ? 6 : 4)) begin slewed_counts++; owed--; end
        else if (gap != 5) fail($sformatf("10 MCK interval %0d", gap));
        checks++;
        if (owed < 0 || owed > 1) fail($sformatf("slew not applied in time, owed %0d", owed));
      end
      since_mck = 0;
    end else if (since_mck >= 0) since_mck++;
    if (!on) owed = 0;
    if (clr) begin
      since_mck = -1; owed = 0; mck_since_smpl = 0; smpl_since_shift = 0;
    end

    // N and M dividers
    if (mck) mck_since_smpl++;
    if (smpl) begin
      if (on) begin
        checks++;
        if (mck_since_smpl != spl + 1 || !mck) fail($sformatf("SMPL after %0d MCK", mck_since_smpl));
      end
      mck_since_smpl = 0;
      smpl_since_shift++;
    end
    if (shift) begin
      if (on) begin
        checks++;
        if (smpl_since_shift != spb + 1 || !smpl) fail($sformatf("SHIFT after %0d SMPL", smpl_since_shift));
      end
      smpl_since_shift = 0;
    end

    // PN register, compared before this edge's update
    if (on) begin
      checks++;
      if (pn_state !== msr) fail($sformatf("PN register %h model %h", pn_state, msr));
    end
    mmatch = (msr == image) && n >= 2 && n <= 24;
    if (sec) begin
      cnt = 0; run = 1;
    end else if (run) begin
      cnt++;
      if (mmatch && !mmatch_q) begin
        run = 0; exp_ws = 32'(cnt); detects++;
      end
    end
    mmatch_q = mmatch;
    if (prom_wr) msr = '1;
    else if (shift) msr = (msr << 1) | 24'(^(msr & taps_of(n)));
  end
endmodule
