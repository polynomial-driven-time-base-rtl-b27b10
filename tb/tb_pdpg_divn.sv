// tb_pdpg_divn: checks the programmable pulse divider.
// Random input strobes; for several ratios the output must come on every
// (div+1)-th input strobe, in the same cycle, and clr restarts the count.
module tb_pdpg_divn;
  logic       clk = 0, rst_n = 0, clr = 0, en = 0, q;
  logic [3:0] div;
  int checks = 0, failures = 0;
  int ins, outs;

  pdpg_divn #(.W(4)) dut (.clk, .rst_n, .clr, .en, .div, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_ratio(input int d);
    int since;
    div = 4'(d);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    since = 0; ins = 0; outs = 0;
    for (int c = 0; c < 40 * (d + 1); c++) begin
      en = ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (en) begin
        since++;
        ins++;
        if (q !== (since == d + 1)) begin
          failures++; $display("FAIL div %0d input %0d q=%b", d, since, q);
        end
        if (since == d + 1) begin since = 0; outs++; end
      end else if (q !== 1'b0) begin
        failures++; $display("FAIL q without input");
      end
      @(negedge clk);
    end
    en = 0;
    checks++;
    if (outs != ins / (d + 1)) begin
      failures++; $display("FAIL div %0d outs %0d ins %0d", d, outs, ins);
    end
  endtask

  initial begin
    div = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_ratio(0);
    run_ratio(1);
    run_ratio(4);
    run_ratio(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
