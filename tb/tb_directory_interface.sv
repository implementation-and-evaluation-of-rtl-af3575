// tb_directory_interface: self-checking test of directory_interface.
//
// Plays the directory side with random set contents. Checks that a lookup
// reads the request's set, that lookup_done_o follows lookup_i by one cycle
// and passes the set through, and that a victim installs the request's tag in
// the victim way while the evicted way, its old tag and its dirty state
// (dirty only if also valid) are registered and shown one cycle later.
module tb_directory_interface;
  localparam int WAYS = 8, IW = 4, TW = 39;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [IW-1:0] index; logic [TW-1:0] tag; logic lookup, lookup_done;
  logic [WAYS-1:0][TW-1:0] set_tags, dir_tags; logic [WAYS-1:0] set_valid, set_dirty, dir_valid, dir_dirty;
  logic victim_valid; logic [2:0] victim_way;
  logic evict_valid; logic [2:0] evict_way; logic [TW-1:0] evict_tag; logic evict_dirty;
  logic dir_rd_en; logic [IW-1:0] dir_rd_index;
  logic dir_inst_en; logic [IW-1:0] dir_inst_index; logic [2:0] dir_inst_way; logic [TW-1:0] dir_inst_tag;
  int checks = 0, failures = 0, dirty_evicts = 0, clean_evicts = 0;

  directory_interface #(.WAYS(WAYS), .INDEX_WIDTH(IW), .TAG_WIDTH(TW)) dut (
    .clk, .rst_n, .index_i(index), .tag_i(tag), .lookup_i(lookup), .lookup_done_o(lookup_done),
    .set_tags_o(set_tags), .set_valid_o(set_valid), .set_dirty_o(set_dirty),
    .victim_valid_i(victim_valid), .victim_way_i(victim_way),
    .evict_valid_o(evict_valid), .evict_way_o(evict_way), .evict_tag_o(evict_tag), .evict_dirty_o(evict_dirty),
    .dir_rd_en_o(dir_rd_en), .dir_rd_index_o(dir_rd_index), .dir_tags_i(dir_tags),
    .dir_valid_i(dir_valid), .dir_dirty_i(dir_dirty), .dir_inst_en_o(dir_inst_en),
    .dir_inst_index_o(dir_inst_index), .dir_inst_way_o(dir_inst_way), .dir_inst_tag_o(dir_inst_tag));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    index = 0; tag = 0; lookup = 0; victim_valid = 0; victim_way = 0;
    dir_tags = '0; dir_valid = '0; dir_dirty = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!lookup_done && !evict_valid, "idle after reset");
    for (int n = 0; n < 2000; n++) begin
      logic [TW-1:0] old_tag; bit old_dirty; logic [2:0] vw;
      index = IW'($urandom); tag = {7'($urandom), 32'($urandom)};
      lookup = 1;
      #1 check(dir_rd_en && dir_rd_index == index, "lookup reads the request's set");
      @(negedge clk);
      lookup = 0;
      for (int w = 0; w < WAYS; w++) dir_tags[w] = {7'($urandom), 32'($urandom)};
      dir_valid = 8'($urandom); dir_dirty = 8'($urandom);
      #1 check(lookup_done, "lookup_done one cycle after lookup");
      check(set_tags == dir_tags && set_valid == dir_valid && set_dirty == dir_dirty, "set passed through");
      check(!dir_inst_en, "no install without a victim");
      @(negedge clk);
      check(!lookup_done, "lookup_done is a pulse");
      if ($urandom_range(0, 3) != 0) begin
        vw = 3'($urandom); victim_valid = 1; victim_way = vw;
        old_tag = dir_tags[vw]; old_dirty = dir_valid[vw] && dir_dirty[vw];
        #1 check(dir_inst_en && dir_inst_index == index && dir_inst_way == vw && dir_inst_tag == tag,
                 "install of the new tag in the victim way");
        @(negedge clk);
        victim_valid = 0;
        dir_tags = '0; dir_dirty = '0;   // directory now changed; evict info must be registered
        check(evict_valid && evict_way == vw && evict_tag == old_tag && evict_dirty == old_dirty,
              $sformatf("evict way %0d tag %h dirty %0d", evict_way, evict_tag, evict_dirty));
        if (old_dirty) dirty_evicts++; else clean_evicts++;
        @(negedge clk);
        check(!evict_valid, "evict_valid is a pulse");
      end
    end
    check(dirty_evicts > 0 && clean_evicts > 0, "dirty and clean evictions exercised");
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
