// tb_pdpg_pn_gen: checks the PN shift register.
// Random shift strobes with a degree-5 and a degree-8 tap mask; the register is
// compared each cycle with a model, and the period of the low n stages is
// measured against 2^n - 1.  load_ones and reset must give all ones.
module tb_pdpg_pn_gen;
  logic        clk = 0, rst_n = 0;
  logic        shift_en = 0, load_ones = 0;
  logic [23:0] taps, sr, model;
  logic        pn;
  int checks = 0, failures = 0;

  pdpg_pn_gen #(.W(24)) dut (.clk, .rst_n, .shift_en, .load_ones, .taps, .sr, .pn);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input logic [23:0] t, input int n);
    logic [23:0] low;
    int shifts, first_back;
    low = (24'h1 << n) - 1;
    taps = t;
    @(negedge clk) load_ones = 1;
    @(negedge clk) load_ones = 0;
    model = '1;
    checks++;
    if (sr !== '1) begin failures++; $display("FAIL load_ones sr=%h", sr); end
    shifts = 0; first_back = 0;
    while (shifts < 3 * ((1 << n) - 1)) begin
      shift_en = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (shift_en) begin
        model = (model << 1) | 24'(^(model & t));
        shifts++;
        if ((model & low) == low && first_back == 0) first_back = shifts;
      end
      #1;
      checks++;
      if (sr !== model || pn !== model[0]) begin
        failures++; $display("FAIL sr=%h model=%h", sr, model);
      end
      @(negedge clk);
    end
    shift_en = 0;
    checks++;
    if (first_back != (1 << n) - 1) begin
      failures++; $display("FAIL degree %0d period %0d", n, first_back);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (sr !== '1) begin failures++; $display("FAIL reset sr=%h", sr); end
    rst_n = 1;
    run_code(24'h000014, 5);
    run_code(24'h0000B8, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
