// tb_drrip_lfsr: self-checking test of drrip_lfsr.
//
// Over 15 x 20 cycles: the state is never zero, repeats with period 15
// (maximal length), visits 15 distinct states, and bit_o is 1 exactly once
// per period (1/15, about 6 %).
module tb_drrip_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic b; logic [3:0] st;
  int checks = 0, failures = 0, ones = 0;
  bit seen [16];
  logic [3:0] hist [$];

  drrip_lfsr dut (.clk, .rst_n, .bit_o(b), .state_o(st));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int distinct = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(st == 4'b0001, "reset seed");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      check(st != 0, "never zero");
      hist.push_back(st);
      if (i >= 15) check(st == hist[i - 15], "period 15");
      if (!seen[st]) begin seen[st] = 1; distinct++; end
      if (b) ones++;
    end
    check(distinct == 15, $sformatf("distinct states %0d", distinct));
    check(ones == 20, $sformatf("bit set %0d times in 300 cycles", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
