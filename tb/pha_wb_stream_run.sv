// pha_wb_stream_run: one run of streaming traffic through a PHA-WB of
// ENTRIES entries, used by tb_pha_wb_sizes (not a testbench on its own).
//
// Four cores each stream reads through one array and writes through another
// (line by line, 64 bytes at a time, like the copy loops of the
// memory-intensive benchmarks); the arrays start on different rows of the
// same bank pair, so in plain open-page operation reads and writes keep
// closing each other's rows. The run counts the page hits the DRAM model
// sees with the buffer, and the page hits the same request stream would get
// without it (an open-row tracker on the requests themselves). Every read
// response is checked against a scoreboard. When the run is over, `done`
// rises with the counts on the outputs.
module pha_wb_stream_run
  import pha_wb_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned N_OPS   = 4000,
  parameter int unsigned SEED    = 1
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned hits_with,
  output int unsigned hits_without,
  output int unsigned accesses
);
  localparam int DW = LINE_BITS;

  logic clk = 1'b0, rst_n;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  logic [1:0] req_op;
  logic [ADDR_W-1:0] req_addr;
  logic [DW-1:0] req_wdata, rsp_data;
  logic dram_cmd_valid, dram_cmd_ready, dram_rd_valid;
  logic [1:0] dram_cmd_op;
  logic [ADDR_W-1:0] dram_cmd_addr;
  logic [DW-1:0] dram_cmd_wdata, dram_rd_data;
  logic [$clog2(ENTRIES):0] wb_count;

  always #5 clk = ~clk;

  pha_wb #(.WB_ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .rsp_valid, .rsp_ready, .rsp_data,
    .dram_cmd_valid, .dram_cmd_ready, .dram_cmd_op, .dram_cmd_addr, .dram_cmd_wdata,
    .dram_rd_valid, .dram_rd_data,
    .ev_direct (), .ev_buffer (), .ev_coalesce (), .ev_evict (), .ev_drain (),
    .ev_forward (), .ev_bad_cmd (), .wb_count
  );

  ddr2_dram_model #(.DATA_W(DW), .RD_LAT(6), .READY_PCT(80)) u_dram (
    .clk, .rst_n, .cmd_valid (dram_cmd_valid), .cmd_ready (dram_cmd_ready),
    .cmd_op (dram_cmd_op), .cmd_addr (dram_cmd_addr), .cmd_wdata (dram_cmd_wdata),
    .rd_valid (dram_rd_valid), .rd_data (dram_rd_data)
  );

  logic [DW-1:0] ref_mem [int];
  logic [DW-1:0] exp_q [$];
  int base_open [NUM_BANKS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d entries): %s", ENTRIES, what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      int line;
      line_addr_t la;
      line = int'(req_addr[ADDR_W-1:LINE_OFF_W]);
      la   = line_addr_t'(req_addr[ADDR_W-1:LINE_OFF_W]);
      if (op_e'(req_op) == OP_WRITE) ref_mem[line] = req_wdata;
      else exp_q.push_back(ref_mem.exists(line) ? ref_mem[line] : u_dram.init_data(line));
      accesses++;
      if (base_open[la.bank] == int'(la.row)) hits_without++;
      base_open[la.bank] = int'(la.row);
    end
    if (rst_n && rsp_valid && rsp_ready) begin
      if (exp_q.size() == 0) check(1'b0, "response without a read");
      else check(rsp_data == exp_q.pop_front(), "read data mismatch");
    end
  end

  assign rsp_ready = 1'b1;

  task automatic send(op_e op, logic [ADDR_W-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_addr = a; req_wdata = d;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    req_valid <= 1'b0;
  endtask

  initial begin
    int rd_ptr [4], wr_ptr [4];
    automatic int s = SEED;
    done = 0; checks = 0; failures = 0; hits_with = 0; hits_without = 0; accesses = 0;
    req_valid = 0; req_op = 0; req_addr = 0; req_wdata = 0;
    for (int b = 0; b < NUM_BANKS; b++) base_open[b] = -1;
    // array c: reads start at row 100*c+1, writes at row 100*c+51, both on bank pair 0
    for (int c = 0; c < 4; c++) begin
      rd_ptr[c] = (100 * c + 1)  << (BANK_W + COL_W);
      wr_ptr[c] = (100 * c + 51) << (BANK_W + COL_W);
    end
    void'($urandom(s));
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < int'(N_OPS); n++) begin
      automatic int c = $urandom_range(3);
      logic [DW-1:0] d;
      for (int i = 0; i < DW / 32; i++) d[i*32 +: 32] = $urandom;
      if ($urandom_range(1) == 0) begin
        send(OP_READ, ADDR_W'(rd_ptr[c]) << LINE_OFF_W, '0);
        rd_ptr[c]++;
      end else begin
        send(OP_WRITE, ADDR_W'(wr_ptr[c]) << LINE_OFF_W, d);
        wr_ptr[c]++;
      end
    end
    // read back part of what was written, so buffered data is replaced too
    for (int c = 0; c < 4; c++) send(OP_READ, ADDR_W'(wr_ptr[c] - 1) << LINE_OFF_W, '0);
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "reads without a response");
    hits_with = u_dram.rd_hits + u_dram.wr_hits;
    done = 1;
  end
endmodule
