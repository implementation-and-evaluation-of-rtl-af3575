// tb_read_memory_interface: self-checking test of read_memory_interface.
//
// Starts line fetches for random sets, tags and ways. Memory accepts the
// request after random rd_ready stalls and answers after a random delay.
// Checks the request address {tag, index, 0} is held while waiting, exactly
// one request is made per fetch, and the fill pulse comes one cycle after the
// response with the returned line and the way given at the start.
module tb_read_memory_interface;
  localparam int WAYS = 8, IW = 4, TW = 48 - IW - 5, LB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [IW-1:0] index; logic [TW-1:0] tag; logic start; logic [2:0] way;
  logic rd_valid, rd_ready; logic [47:0] rd_addr; logic rsp_valid; logic [LB-1:0] rsp_data;
  logic fill; logic [2:0] fill_way; logic [LB-1:0] fill_line;
  int checks = 0, failures = 0, stalls = 0;

  read_memory_interface #(.WAYS(WAYS), .INDEX_WIDTH(IW)) dut (
    .clk, .rst_n, .index_i(index), .tag_i(tag), .start_i(start), .way_i(way),
    .rd_valid_o(rd_valid), .rd_ready_i(rd_ready), .rd_addr_o(rd_addr),
    .rd_rsp_valid_i(rsp_valid), .rd_rsp_data_i(rsp_data),
    .fill_o(fill), .fill_way_o(fill_way), .fill_line_o(fill_line));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    index = 0; tag = 0; start = 0; way = 0; rd_ready = 0; rsp_valid = 0; rsp_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [2:0] w; logic [LB-1:0] data; int reqs, fills, lat;
      index = IW'($urandom); tag = TW'({$urandom, $urandom}); w = 3'($urandom);
      for (int k = 0; k < LB / 32; k++) data[k*32 +: 32] = $urandom;
      start = 1; way = w;
      @(negedge clk);
      start = 0; way = ~w;
      reqs = 0; fills = 0;
      // request phase
      for (int c = 0; c < 20 && reqs == 0; c++) begin
        rd_ready = ($urandom_range(0, 2) == 0);
        #1;
        check(rd_valid, "request held until accepted");
        check(rd_addr == {tag, index, 5'b0}, "request address");
        if (rd_ready) reqs++; else stalls++;
        @(negedge clk);
      end
      rd_ready = 0;
      check(reqs == 1, "one request");
      lat = $urandom_range(0, 4);
      repeat (lat) begin
        check(!rd_valid && !fill, "waiting for the response");
        @(negedge clk);
      end
      rsp_valid = 1; rsp_data = data;
      @(negedge clk);
      rsp_valid = 0; rsp_data = '0;
      check(fill && fill_way == w && fill_line == data, "fill with returned line and way");
      @(negedge clk);
      check(!fill && !rd_valid, "fill is a pulse and block idle");
    end
    check(stalls > 0, "memory stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
