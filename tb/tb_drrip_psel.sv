// tb_drrip_psel: self-checking test of drrip_psel.
//
// Random increment/decrement pulses against an independent 0..3 saturating
// model; checks the count and that followers use SRRIP exactly when it is 2
// or 3, including saturation at both ends.
module tb_drrip_psel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inc, dec, srrip; logic [1:0] cnt;
  int checks = 0, failures = 0, model = 2, sat_hi = 0, sat_lo = 0;

  drrip_psel dut (.clk, .rst_n, .inc_i(inc), .dec_i(dec), .use_srrip_o(srrip), .count_o(cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    inc = 0; dec = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int r = $urandom_range(0, 9);
      if (i % 400 < 10)       begin inc = 1; dec = 0; end   // drive into saturation
      else if (i % 400 < 20)  begin inc = 0; dec = 1; end
      else begin inc = (r < 4); dec = (r >= 4 && r < 8); end
      @(negedge clk);
      if (inc && model == 3) sat_hi++;
      if (dec && model == 0) sat_lo++;
      if (inc && model < 3) model++;
      if (dec && model > 0) model--;
      check(cnt == 2'(model), $sformatf("count %0d exp %0d", cnt, model));
      check(srrip == (model >= 2), "policy bit");
    end
    check(sat_hi > 0 && sat_lo > 0, "saturation at both ends exercised");
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
