// tb_cache_full: end-to-end test of the cache at its default size.
//
// cache_top is built with all its default parameters: 8 ways, 256 sets of
// 32-byte lines (64 KiB), two classes of service, true LRU replacement. The
// same driver as the small end-to-end test runs two CLOSes in 50-request
// bursts over a working set of 1.5 times the cache, with masks going from
// disjoint to overlapping to shared, against a memory model with random
// back-pressure. Every read is checked against a golden memory, every hit's
// latency is checked, and a partitioned true-LRU reference model predicts
// every hit, miss and write-back. Mechanism counts are printed and any that
// never occurred fails the test.
module tb_cache_full;
  localparam int N = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic req_valid, req_ready, req_write, resp_valid, resp_hit, done;
  logic [47:0] req_addr, wb_addr, rd_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0] req_mask; logic [0:0] req_clos;
  logic wb_valid, wb_ready, rd_valid, rd_ready, rd_rsp_valid;
  logic [255:0] wb_data, rd_rsp_data;

  cache_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_mask, .req_clos,
    .resp_valid, .resp_rdata, .resp_hit, .wb_valid, .wb_ready, .wb_addr, .wb_data,
    .rd_valid, .rd_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_data);

  mem_model mem (
    .clk, .rst_n, .wb_valid, .wb_ready, .wb_addr, .wb_data, .rd_valid, .rd_ready, .rd_addr,
    .rd_rsp_valid, .rd_rsp_data);

  cache_driver #(.INDEX_WIDTH(8), .N_REQ(N), .LRU_REF(1)) drv (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_mask, .req_clos,
    .resp_valid, .resp_rdata, .resp_hit, .wb_fire(wb_valid && wb_ready), .done);

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    checks   += drv.checks;
    failures += drv.failures;
    $display("mechanisms:");
    need("read hit", drv.read_hits);
    need("read miss", drv.read_misses);
    need("write hit", drv.write_hits);
    need("write miss", drv.write_misses);
    need("dirty write-back", mem.writebacks);
    need("write-back stall", mem.wb_stalls);
    need("line-read stall", mem.rd_stalls);
    need("partition isolation miss", drv.isolation_misses);
    need("mask reconfiguration", drv.mask_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
