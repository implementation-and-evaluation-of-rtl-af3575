// tb_tag_comparator: self-checking test of tag_comparator (combinational).
//
// Random sets in which the requested tag is planted in 0..3 ways, with random
// valid bits and partition masks. A hit needs a valid line with the same tag
// inside the mask; the reported way is the lowest matching one. Includes the
// partition case where the tag is present only outside the mask (a miss).
module tb_tag_comparator;
  localparam int WAYS = 8, TW = 35;
  logic [TW-1:0] tag; logic [WAYS-1:0][TW-1:0] tags; logic [WAYS-1:0] valid, mask;
  logic hit, miss; logic [2:0] hit_way;
  int checks = 0, failures = 0, outside = 0;

  tag_comparator #(.WAYS(WAYS), .TAG_WIDTH(TW)) dut (
    .tag_i(tag), .tags_i(tags), .valid_i(valid), .mask_i(mask), .hit_o(hit), .miss_o(miss),
    .hit_way_o(hit_way));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int exp_way; bit any_present;
      tag = {3'($urandom), 32'($urandom)};
      for (int w = 0; w < WAYS; w++) tags[w] = {3'($urandom), 32'($urandom)};
      for (int k = $urandom_range(0, 3); k > 0; k--) tags[$urandom_range(0, WAYS - 1)] = tag;
      valid = 8'($urandom) | 8'($urandom);
      mask = (n % 3 == 0) ? 8'hFF : 8'($urandom);
      #1;
      exp_way = -1; any_present = 0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid[w] && tags[w] == tag) any_present = 1;
        if (exp_way < 0 && valid[w] && mask[w] && tags[w] == tag) exp_way = w;
      end
      if (any_present && exp_way < 0) outside++;
      check(hit == (exp_way >= 0), $sformatf("hit %0d exp %0d", hit, exp_way >= 0));
      check(miss == !hit, "miss is the inverse of hit");
      if (exp_way >= 0) check(hit_way == 3'(exp_way), $sformatf("way %0d exp %0d", hit_way, exp_way));
    end
    check(outside > 0, "tag present only outside the partition exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
