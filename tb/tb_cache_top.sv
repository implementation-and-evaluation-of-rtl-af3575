// tb_cache_top: end-to-end test of the partitioned cache with every
// replacement algorithm.
//
// Six caches of 8 sets x 8 ways (2 KiB), one per algorithm, each run the same
// kind of traffic from cache_driver against its own mem_model: two classes of
// service in alternating bursts, masks going from disjoint to overlapping to
// fully shared, random memory back-pressure. All check data integrity and
// hit latency; the true-LRU cache is also checked hit-for-hit and
// write-back-for-write-back against a reference model. The test counts how
// often each mechanism occurred (read/write hit and miss, dirty write-back,
// memory stalls, partition isolation, mask reconfiguration, DRRIP ageing,
// NRU partition reset, forced tree traversal) and fails any that never did.
module tb_cache_top;
  import cache_pkg::*;
  localparam int IW = 3;
  localparam int N  = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int drrip_age = 0, nru_reset = 0, bt_forced = 0;

`define CACHE_INST(NAME, ALG, REF) \
  logic NAME``_req_valid, NAME``_req_ready, NAME``_req_write, NAME``_resp_valid, NAME``_resp_hit; \
  logic [47:0] NAME``_req_addr, NAME``_wb_addr, NAME``_rd_addr; \
  logic [63:0] NAME``_req_wdata, NAME``_resp_rdata; \
  logic [7:0] NAME``_req_mask; logic [0:0] NAME``_req_clos; \
  logic NAME``_wb_valid, NAME``_wb_ready, NAME``_rd_valid, NAME``_rd_ready, NAME``_rd_rsp_valid, NAME``_done; \
  logic [255:0] NAME``_wb_data, NAME``_rd_rsp_data; \
  cache_top #(.INDEX_WIDTH(IW), .REPL(ALG)) NAME``_dut ( \
    .clk, .rst_n, .req_valid(NAME``_req_valid), .req_ready(NAME``_req_ready), \
    .req_write(NAME``_req_write), .req_addr(NAME``_req_addr), .req_wdata(NAME``_req_wdata), \
    .req_mask(NAME``_req_mask), .req_clos(NAME``_req_clos), .resp_valid(NAME``_resp_valid), \
    .resp_rdata(NAME``_resp_rdata), .resp_hit(NAME``_resp_hit), \
    .wb_valid(NAME``_wb_valid), .wb_ready(NAME``_wb_ready), .wb_addr(NAME``_wb_addr), .wb_data(NAME``_wb_data), \
    .rd_valid(NAME``_rd_valid), .rd_ready(NAME``_rd_ready), .rd_addr(NAME``_rd_addr), \
    .rd_rsp_valid(NAME``_rd_rsp_valid), .rd_rsp_data(NAME``_rd_rsp_data)); \
  mem_model NAME``_mem ( \
    .clk, .rst_n, .wb_valid(NAME``_wb_valid), .wb_ready(NAME``_wb_ready), .wb_addr(NAME``_wb_addr), \
    .wb_data(NAME``_wb_data), .rd_valid(NAME``_rd_valid), .rd_ready(NAME``_rd_ready), .rd_addr(NAME``_rd_addr), \
    .rd_rsp_valid(NAME``_rd_rsp_valid), .rd_rsp_data(NAME``_rd_rsp_data)); \
  cache_driver #(.INDEX_WIDTH(IW), .N_REQ(N), .LRU_REF(REF)) NAME``_drv ( \
    .clk, .rst_n, .req_valid(NAME``_req_valid), .req_ready(NAME``_req_ready), .req_write(NAME``_req_write), \
    .req_addr(NAME``_req_addr), .req_wdata(NAME``_req_wdata), .req_mask(NAME``_req_mask), \
    .req_clos(NAME``_req_clos), .resp_valid(NAME``_resp_valid), .resp_rdata(NAME``_resp_rdata), \
    .resp_hit(NAME``_resp_hit), .wb_fire(NAME``_wb_valid && NAME``_wb_ready), .done(NAME``_done));

  `CACHE_INST(c_rand,  REPL_RANDOM, 0)
  `CACHE_INST(c_lru,   REPL_TRUE_LRU, 1)
  `CACHE_INST(c_nru,   REPL_NRU, 0)
  `CACHE_INST(c_bt,    REPL_BINARY_TREE, 0)
  `CACHE_INST(c_btp,   REPL_BINARY_TREE_PRIVATE, 0)
  `CACHE_INST(c_drrip, REPL_DRRIP, 0)

  // Mechanisms inside the replacement algorithms.
  always @(posedge clk) if (rst_n) begin
    if (c_drrip_dut.u_repl.g_drrip.u_alg.state_q == 3'd4 && !c_drrip_dut.u_repl.g_drrip.u_alg.found)
      drrip_age++;
    if (c_nru_dut.u_repl.g_nru.u_alg.victim_valid_o &&
        ((c_nru_dut.u_repl.g_nru.u_alg.row_q & c_nru_dut.u_repl.g_nru.u_alg.mask_q)
          == c_nru_dut.u_repl.g_nru.u_alg.mask_q))
      nru_reset++;
    if (c_bt_dut.u_repl.g_bt.u_alg.victim_valid_o &&
        (c_bt_dut.u_repl.g_bt.u_alg.up | c_bt_dut.u_repl.g_bt.u_alg.down) != '0)
      bt_forced++;
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (c_rand_done && c_lru_done && c_nru_done && c_bt_done && c_btp_done && c_drrip_done);
    repeat (5) @(posedge clk);
    checks   = checks + c_rand_drv.checks + c_lru_drv.checks + c_nru_drv.checks
             + c_bt_drv.checks + c_btp_drv.checks + c_drrip_drv.checks;
    failures = failures + c_rand_drv.failures + c_lru_drv.failures + c_nru_drv.failures
             + c_bt_drv.failures + c_btp_drv.failures + c_drrip_drv.failures;
    $display("mechanisms (true-LRU cache unless noted):");
    need("read hit", c_lru_drv.read_hits);
    need("read miss", c_lru_drv.read_misses);
    need("write hit", c_lru_drv.write_hits);
    need("write miss", c_lru_drv.write_misses);
    need("dirty write-back", c_lru_mem.writebacks);
    need("write-back stall", c_lru_mem.wb_stalls);
    need("line-read stall", c_lru_mem.rd_stalls);
    need("partition isolation miss", c_rand_drv.isolation_misses + c_lru_drv.isolation_misses
         + c_nru_drv.isolation_misses + c_bt_drv.isolation_misses + c_btp_drv.isolation_misses
         + c_drrip_drv.isolation_misses);
    need("mask reconfiguration", c_lru_drv.mask_switches);
    need("DRRIP ageing round", drrip_age);
    need("NRU partition reset", nru_reset);
    need("tree forced traversal", bt_forced);
    need("random write-back", c_rand_mem.writebacks);
    need("btp write-back", c_btp_mem.writebacks);
    need("drrip write-back", c_drrip_mem.writebacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
