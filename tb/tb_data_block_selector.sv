// tb_data_block_selector: self-checking test of data_block_selector.
//
// Random whole-line writes and reads of a 16-set, 8-way, 256-bit-line array
// against a model. Reads return one cycle after rd_en_i and hold their value
// when rd_en_i is low; only written lines are compared.
module tb_data_block_selector;
  localparam int WAYS = 8, IW = 4, LB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en; logic [IW-1:0] rd_index, wr_index; logic [2:0] rd_way, wr_way;
  logic [LB-1:0] rdata, wdata, last;
  logic [LB-1:0] model [bit [6:0]];
  int checks = 0, failures = 0;

  data_block_selector #(.WAYS(WAYS), .INDEX_WIDTH(IW), .LINE_BITS(LB)) dut (
    .clk, .rst_n, .rd_en_i(rd_en), .rd_index_i(rd_index), .rd_way_i(rd_way), .rdata_o(rdata),
    .wr_en_i(wr_en), .wr_index_i(wr_index), .wr_way_i(wr_way), .wdata_i(wdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_index = 0; wr_index = 0; rd_way = 0; wr_way = 0; wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(rdata == '0, "read register cleared by reset");
    last = '0;
    for (int n = 0; n < 4000; n++) begin
      bit [6:0] ra; bit known; logic [LB-1:0] exp;
      rd_en = $urandom_range(0, 1); rd_index = IW'($urandom); rd_way = 3'($urandom);
      wr_en = $urandom_range(0, 1); wr_index = IW'($urandom); wr_way = 3'($urandom);
      for (int k = 0; k < LB / 32; k++) wdata[k*32 +: 32] = $urandom;
      ra = {rd_index, rd_way}; known = model.exists(ra); exp = known ? model[ra] : '0;
      @(negedge clk);
      if (wr_en) model[{wr_index, wr_way}] = wdata;
      if (rd_en && known) check(rdata == exp, $sformatf("line %0d", ra));
      if (!rd_en) check(rdata == last, "output held without read");
      last = rdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
