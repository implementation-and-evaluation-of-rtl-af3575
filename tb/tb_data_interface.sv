// tb_data_interface: self-checking test of data_interface.
//
// The data interface is connected to a data_block_selector (the line array)
// and driven with the sequences the cache uses: a fill after a miss (with or
// without a write merged into the line), a read or write hit, and the read of
// a line for eviction. A line model checks: read data (returned the cycle
// after a hit or fill starts), write merging of the selected 64-bit word,
// dirty marking only on writes, done/done_hit pulses, and the evicted line.
module tb_data_interface;
  localparam int WAYS = 8, IW = 3, LB = 256, WB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [IW-1:0] index; logic [1:0] word; logic write; logic [WB-1:0] wdata;
  logic hit; logic [2:0] hit_way; logic evict_rd; logic [2:0] evict_way;
  logic evict_line_valid; logic [LB-1:0] evict_line;
  logic fill; logic [2:0] fill_way; logic [LB-1:0] fill_line;
  logic done, done_hit; logic [WB-1:0] rdata;
  logic ram_rd_en, ram_wr_en; logic [IW-1:0] ram_rd_index, ram_wr_index; logic [2:0] ram_rd_way, ram_wr_way;
  logic [LB-1:0] ram_rdata, ram_wdata;
  logic dirty_en; logic [IW-1:0] dirty_index; logic [2:0] dirty_way;
  logic [LB-1:0] model [bit [5:0]];
  int checks = 0, failures = 0, n_fill = 0, n_hit = 0, n_evict = 0;

  data_interface #(.WAYS(WAYS), .INDEX_WIDTH(IW)) dut (
    .clk, .rst_n, .index_i(index), .word_i(word), .write_i(write), .wdata_i(wdata),
    .hit_i(hit), .hit_way_i(hit_way), .evict_rd_i(evict_rd), .evict_way_i(evict_way),
    .evict_line_valid_o(evict_line_valid), .evict_line_o(evict_line),
    .fill_i(fill), .fill_way_i(fill_way), .fill_line_i(fill_line),
    .done_o(done), .done_hit_o(done_hit), .rdata_o(rdata),
    .ram_rd_en_o(ram_rd_en), .ram_rd_index_o(ram_rd_index), .ram_rd_way_o(ram_rd_way), .ram_rdata_i(ram_rdata),
    .ram_wr_en_o(ram_wr_en), .ram_wr_index_o(ram_wr_index), .ram_wr_way_o(ram_wr_way), .ram_wdata_o(ram_wdata),
    .dirty_en_o(dirty_en), .dirty_index_o(dirty_index), .dirty_way_o(dirty_way));

  data_block_selector #(.WAYS(WAYS), .INDEX_WIDTH(IW)) ram (
    .clk, .rst_n, .rd_en_i(ram_rd_en), .rd_index_i(ram_rd_index), .rd_way_i(ram_rd_way), .rdata_o(ram_rdata),
    .wr_en_i(ram_wr_en), .wr_index_i(ram_wr_index), .wr_way_i(ram_wr_way), .wdata_i(ram_wdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [LB-1:0] rnd_line();
    logic [LB-1:0] l;
    for (int k = 0; k < LB / 32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    index = 0; word = 0; write = 0; wdata = 0; hit = 0; hit_way = 0; evict_rd = 0; evict_way = 0;
    fill = 0; fill_way = 0; fill_line = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit [5:0] key; int op;
      index = IW'($urandom); word = 2'($urandom); write = $urandom_range(0, 1);
      wdata = {$urandom, $urandom};
      op = $urandom_range(0, 2);
      if (op != 0 || model.size() == 0) begin
        // miss: (optionally) read the old line for eviction, then fill
        logic [2:0] w = 3'($urandom);
        key = {index, w};
        if (model.exists(key)) begin
          evict_rd = 1; evict_way = w;
          @(negedge clk);
          evict_rd = 0;
          check(evict_line_valid && evict_line == model[key], "evicted line");
          n_evict++;
        end
        fill = 1; fill_way = w; fill_line = rnd_line();
        #1 check(dirty_en == write && (!write || (dirty_index == index && dirty_way == w)), "dirty on write fill");
        model[key] = fill_line;
        if (write) model[key][word*WB +: WB] = wdata;
        @(negedge clk);
        fill = 0;
        check(done && !done_hit, "fill done");
        check(rdata == (write ? wdata : fill_line[word*WB +: WB]), "fill response data");
        @(negedge clk);
        n_fill++;
      end else begin
        // hit on a line already present
        int pick = $urandom_range(0, model.size() - 1);
        foreach (model[k]) begin if (pick == 0) key = k; pick--; end
        index = key[5:3];
        hit = 1; hit_way = key[2:0];
        @(negedge clk);
        hit = 0;
        #1 check(done && done_hit, "hit done one cycle later");
        check(rdata == (write ? wdata : model[key][word*WB +: WB]), "hit response data");
        check(dirty_en == write && (!write || (dirty_index == index && dirty_way == key[2:0])), "dirty on write hit");
        if (write) model[key][word*WB +: WB] = wdata;
        @(negedge clk);
        n_hit++;
      end
      check(!done, "done is a pulse");
    end
    check(n_fill > 0 && n_hit > 0 && n_evict > 0, "fills, hits and evictions exercised");
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
