// workload_runner: replays a two-application workload on one cache and
// counts each application's hits and misses.
//
// Not synthesizable. It builds a cache_top (algorithm REPL, INDEX_WIDTH IW)
// with its own mem_model and plays two synthetic applications, each a fixed
// pseudo-random trace computed from the request number, so every runner sees
// exactly the same addresses in the same order:
//   application 0: 80 % of requests to a hot set of HOT0 lines, the rest a
//                  stream over 4096 lines (a scan);
//   application 1: 70 % to a hot set of HOT1 lines, the rest spread over
//                  1024 lines.
// A quarter of the requests are writes. Application 1's addresses are shifted
// above application 0's by the size of application 0's address range plus
// 2048 bytes, so the two never share a line. mode_i selects the run:
//   0 both applications, taking turns of 50 requests (CLOS 0 and CLOS 1);
//   1 application 0 alone;  2 application 1 alone.
// Each application uses its own mask (mask0_i, mask1_i). The first WARM
// requests of each application warm the cache and are not counted. Every read
// is checked against a golden copy of memory. hits/misses/checks/failures and
// done are read by the enclosing testbench.
// Follows the document: two applications taking turns of 50 requests, one
// CLOS and mask each, and the second trace shifted by its range plus 2048.
// Design choices: the synthetic traces replace the SPEC CPU2006 traces, and
// the trace lengths, hot-set sizes and write share are this testbench's.
module workload_runner
  import cache_pkg::*;
#(
  parameter repl_e REPL  = REPL_TRUE_LRU,
  parameter int    IW    = 5,
  parameter int    N_APP = 2000,
  parameter int    WARM  = 400,
  parameter int    HOT0  = 160,
  parameter int    HOT1  = 224
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] mask0_i,
  input  logic [7:0] mask1_i,
  input  logic [1:0] mode_i,
  output logic       done
);
  localparam logic [47:0] SHIFT = 48'(4096 * 32 + 2048);

  logic req_valid, req_ready, req_write, resp_valid, resp_hit;
  logic [47:0] req_addr, wb_addr, rd_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0] req_mask; logic [0:0] req_clos;
  logic wb_valid, wb_ready, rd_valid, rd_ready, rd_rsp_valid;
  logic [255:0] wb_data, rd_rsp_data;

  int hits [2], misses [2];
  int checks = 0, failures = 0;
  logic [63:0] golden [logic [44:0]];

  cache_top #(.INDEX_WIDTH(IW), .REPL(REPL)) u_cache (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_mask, .req_clos,
    .resp_valid, .resp_rdata, .resp_hit, .wb_valid, .wb_ready, .wb_addr, .wb_data,
    .rd_valid, .rd_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_data);

  mem_model u_mem (
    .clk, .rst_n, .wb_valid, .wb_ready, .wb_addr, .wb_data, .rd_valid, .rd_ready, .rd_addr,
    .rd_rsp_valid, .rd_rsp_data);

  function automatic logic [31:0] mix(input logic [31:0] x);
    x ^= x >> 16; x *= 32'h7feb352d;
    x ^= x >> 15; x *= 32'h846ca68b;
    x ^= x >> 16;
    return x;
  endfunction

  function automatic logic [31:0] hash(input int app, input int i);
    return mix(32'(i) * 32'h9E3779B9 + 32'(app) * 32'h85EBCA6B + 32'h1234567);
  endfunction

  function automatic logic [47:0] addr_of(input int app, input int i);
    logic [31:0] h = hash(app, i);
    int line;
    if (app == 0) line = (h[15:8] < 8'd205) ? int'(h[31:16] % HOT0) : 4096 - 1 - (i % 4096);
    else          line = (h[15:8] < 8'd179) ? int'(h[31:16] % HOT1) : int'(h[31:16] % 1024);
    return (app == 1 ? SHIFT : 48'h0) + 48'(line * 32) + 48'({h[1:0], 3'b000});
  endfunction

  function automatic logic [63:0] mem_word(input logic [47:0] a);
    return golden.exists(a[47:3]) ? golden[a[47:3]] : {16'hC0DE, a[47:5], 1'b0, a[4:3], 2'b00};
  endfunction

  task automatic access(input int app, input int i);
    logic [31:0] h = hash(app, i);
    logic [47:0] a = addr_of(app, i);
    bit wr = (h[7:6] == 2'b00);
    logic [63:0] d = {h, ~h};
    logic [63:0] exp = wr ? d : mem_word(a);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = d;
    req_mask = (app == 0) ? mask0_i : mask1_i; req_clos = 1'(app);
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
    do @(posedge clk); while (!resp_valid);
    checks++;
    if (resp_rdata != exp) begin
      failures++;
      if (failures < 5) $display("FAIL %m: app %0d req %0d addr %h data %h exp %h", app, i, a, resp_rdata, exp);
    end
    if (wr) golden[a[47:3]] = d;
    if (i >= WARM) begin
      if (resp_hit) hits[app]++; else misses[app]++;
    end
    #1;
  endtask

  initial begin
    int n [2];
    hits = '{0, 0}; misses = '{0, 0}; n = '{0, 0};
    req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0; req_mask = '1; req_clos = '0;
    done = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    while ((mode_i != 2 && n[0] < N_APP) || (mode_i != 1 && n[1] < N_APP)) begin
      for (int app = 0; app < 2; app++) begin
        if ((mode_i == 1 && app == 1) || (mode_i == 2 && app == 0)) continue;
        for (int k = 0; k < 50 && n[app] < N_APP; k++) begin
          access(app, n[app]);
          n[app]++;
        end
      end
    end
    done = 1;
  end
endmodule
