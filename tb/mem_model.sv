// mem_model: behavioural model of main memory for the cache testbenches.
//
// Not synthesizable. Holds written lines in an associative array; a line
// never written reads as init_line(address), a pattern that makes every
// 64-bit word unique: {16'hC0DE, line address bits [47:5], word number, 2'b0}.
// Both channels apply random back-pressure (ready low about one cycle in
// four, when STALLS is set). A read answers LATENCY cycles after it is
// accepted with a one-cycle rd_rsp_valid pulse. Stall cycles and transfers
// are counted for the testbench.
module mem_model #(
  parameter int LATENCY = 3,
  parameter bit STALLS  = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wb_valid,
  output logic         wb_ready,
  input  logic [47:0]  wb_addr,
  input  logic [255:0] wb_data,
  input  logic         rd_valid,
  output logic         rd_ready,
  input  logic [47:0]  rd_addr,
  output logic         rd_rsp_valid,
  output logic [255:0] rd_rsp_data
);
  logic [255:0] store [logic [47:0]];
  int wb_stalls = 0, rd_stalls = 0, writebacks = 0, reads = 0;
  int countdown = -1;
  logic [47:0] pend_addr;

  function automatic logic [255:0] init_line(input logic [47:0] a);
    logic [255:0] l;
    for (int i = 0; i < 4; i++) l[i*64 +: 64] = {16'hC0DE, a[47:5], 3'(i), 2'b00};
    return l;
  endfunction

  function automatic logic [255:0] line_at(input logic [47:0] a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_ready     <= 1'b0;
      rd_ready     <= 1'b0;
      rd_rsp_valid <= 1'b0;
      rd_rsp_data  <= '0;
      countdown    = -1;
    end else begin
      rd_rsp_valid <= 1'b0;
      if (wb_valid && wb_ready) begin
        store[wb_addr] = wb_data;
        writebacks++;
      end
      if (wb_valid && !wb_ready) wb_stalls++;
      if (rd_valid && !rd_ready) rd_stalls++;
      if (rd_valid && rd_ready) begin
        pend_addr = rd_addr;
        countdown = LATENCY;
        reads++;
      end else if (countdown > 0) begin
        countdown--;
        if (countdown == 0) begin
          rd_rsp_valid <= 1'b1;
          rd_rsp_data  <= line_at(pend_addr);
          countdown    = -1;
        end
      end
      wb_ready <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
      rd_ready <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
endmodule
