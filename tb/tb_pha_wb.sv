// tb_pha_wb: end-to-end test of the Page Hit Aware Write Buffer at its full
// default size (64 entries of 64 bytes, 32 bank pairs), driving it from a
// memory-controller model and connecting it to a behavioural DDR2 model.
//
// A scoreboard keeps the latest data written to every line in request order;
// every read response must equal it, whether the data came from the DRAM or
// was replaced by buffered data. Traffic is concentrated on 4 banks x 8 rows
// x 4 sections so that writes to closed rows are common, the buffer fills and
// evicts, and reads re-open rows and drain buffered writes.
//
// Phases: (1) latency probes on an idle design: a read, plain or replaced by
// buffered data, must reach the DRAM port 2 cycles after it is accepted;
// (2) a write-heavy burst that fills the buffer; (3) a long random mix with
// refreshes, reserved opcodes and response backpressure; (4) a read sweep of
// every line. At the end, every write the DRAM saw as a page miss must be an
// evicted one: direct and drained writes are always page hits. Each mechanism
// (direct, buffered, coalesced, evicted, drained, replaced read, refresh,
// reserved opcode, input stall, response backpressure, full buffer) must have
// happened at least once.
module tb_pha_wb;
  import pha_wb_pkg::*;

  localparam int DW      = LINE_BITS;
  localparam int E       = 64;
  localparam int NB      = 4;
  localparam int NR      = 8;
  localparam int NC      = 4;
  localparam int N_MIX   = 6000;
  localparam longint WATCHDOG = 400000;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              req_valid, req_ready;
  logic [1:0]        req_op;
  logic [ADDR_W-1:0] req_addr;
  logic [DW-1:0]     req_wdata;
  logic              rsp_valid, rsp_ready;
  logic [DW-1:0]     rsp_data;
  logic              dram_cmd_valid, dram_cmd_ready;
  logic [1:0]        dram_cmd_op;
  logic [ADDR_W-1:0] dram_cmd_addr;
  logic [DW-1:0]     dram_cmd_wdata;
  logic              dram_rd_valid;
  logic [DW-1:0]     dram_rd_data;
  logic              ev_direct, ev_buffer, ev_coalesce, ev_evict, ev_drain, ev_forward, ev_bad_cmd;
  logic [$clog2(E):0] wb_count;

  always #5 clk = ~clk;

  pha_wb dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .rsp_valid, .rsp_ready, .rsp_data,
    .dram_cmd_valid, .dram_cmd_ready, .dram_cmd_op, .dram_cmd_addr, .dram_cmd_wdata,
    .dram_rd_valid, .dram_rd_data,
    .ev_direct, .ev_buffer, .ev_coalesce, .ev_evict, .ev_drain, .ev_forward, .ev_bad_cmd,
    .wb_count
  );

  ddr2_dram_model #(.DATA_W(DW), .RD_LAT(6), .READY_PCT(70)) u_dram (
    .clk, .rst_n,
    .cmd_valid (dram_cmd_valid), .cmd_ready (dram_cmd_ready),
    .cmd_op (dram_cmd_op), .cmd_addr (dram_cmd_addr), .cmd_wdata (dram_cmd_wdata),
    .rd_valid (dram_rd_valid), .rd_data (dram_rd_data)
  );

  int unsigned checks = 0, failures = 0;
  longint      cycle = 0;

  // scoreboard
  logic [DW-1:0] ref_mem [int];
  logic [DW-1:0] exp_q [$];

  // mechanism counters
  int unsigned n_direct, n_buffer, n_coalesce, n_evict, n_drain, n_forward;
  int unsigned n_bad, n_refresh, n_stall, n_rsp_bp, n_full;
  int unsigned max_count;

  // latency probe
  logic [ADDR_W-1:0] probe_addr;
  bit                probe_on;
  longint            probe_acc, probe_seen;

  function automatic logic [ADDR_W-1:0] mk_addr(int b, int r, int c);
    line_addr_t la;
    la.row  = ROW_W'(r);
    la.bank = BANK_W'(b);
    la.col  = COL_W'(c);
    return {la, {LINE_OFF_W{1'b0}}};
  endfunction

  function automatic logic [DW-1:0] rnd_data();
    logic [DW-1:0] d;
    for (int i = 0; i < DW / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  function automatic logic [DW-1:0] expected(logic [ADDR_W-1:0] a);
    int line = int'(a[ADDR_W-1:LINE_OFF_W]);
    return ref_mem.exists(line) ? ref_mem[line] : u_dram.init_data(line);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // monitor
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        case (op_e'(req_op))
          OP_WRITE:   ref_mem[int'(req_addr[ADDR_W-1:LINE_OFF_W])] = req_wdata;
          OP_READ:    exp_q.push_back(expected(req_addr));
          OP_REFRESH: n_refresh++;
          default:    ;
        endcase
        if (probe_on && req_addr == probe_addr && op_e'(req_op) == OP_READ) probe_acc = cycle;
      end
      if (req_valid && !req_ready) n_stall++;
      if (rsp_valid && !rsp_ready) n_rsp_bp++;
      if (rsp_valid && rsp_ready) begin
        if (exp_q.size() == 0) check(1'b0, "response without a read");
        else check(rsp_data == exp_q.pop_front(), "read data mismatch");
      end
      if (probe_on && probe_seen < 0 && dram_cmd_valid && dram_cmd_addr == probe_addr &&
          op_e'(dram_cmd_op) == OP_READ)
        probe_seen = cycle;
      n_direct   += 32'(ev_direct);
      n_buffer   += 32'(ev_buffer);
      n_coalesce += 32'(ev_coalesce);
      n_evict    += 32'(ev_evict);
      n_drain    += 32'(ev_drain);
      n_forward  += 32'(ev_forward);
      n_bad      += 32'(ev_bad_cmd);
      if (int'(wb_count) == E) n_full++;
      if (int'(wb_count) > int'(max_count)) max_count = 32'(wb_count);
    end
  end

  // response backpressure
  always @(negedge clk) rsp_ready <= ($urandom_range(99) < 85);

  task automatic send(op_e op, logic [ADDR_W-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    req_valid = 1'b1;
    req_op    = op;
    req_addr  = a;
    req_wdata = d;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    req_valid <= 1'b0;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic wait_quiet();
    int q = 0;
    while (q < 20) begin
      @(posedge clk);
      if (dram_cmd_valid || u_dram.outstanding() != 0 || rsp_valid) q = 0;
      else q++;
    end
  endtask

  task automatic probe_read(logic [ADDR_W-1:0] a);
    wait_quiet();
    probe_addr = a;
    probe_seen = -1;
    probe_acc  = -1;
    probe_on   = 1'b1;
    send(OP_READ, a, '0);
    idle(4);
    probe_on = 1'b0;
    check(probe_seen - probe_acc == 2, $sformatf("read to DRAM port took %0d cycles, expected 2",
                                                  probe_seen - probe_acc));
  endtask

  task automatic rnd_op(int pct_wr, int pct_rd, int pct_ref, int pct_bad);
    int p = $urandom_range(99);
    logic [ADDR_W-1:0] a = mk_addr($urandom_range(NB-1), $urandom_range(NR-1), $urandom_range(NC-1));
    if (p < pct_wr)                            send(OP_WRITE, a, rnd_data());
    else if (p < pct_wr + pct_rd)              send(OP_READ, a, '0);
    else if (p < pct_wr + pct_rd + pct_ref)    send(OP_REFRESH, '0, '0);
    else if (p < pct_wr + pct_rd + pct_ref + pct_bad) send(OP_RSVD, a, rnd_data());
    else idle(1);
  endtask

  initial begin
    n_direct = 0; n_buffer = 0; n_coalesce = 0; n_evict = 0; n_drain = 0; n_forward = 0;
    n_bad = 0; n_refresh = 0; n_stall = 0; n_rsp_bp = 0; n_full = 0; max_count = 0;
    probe_on = 1'b0; probe_seen = -1; probe_acc = -1; probe_addr = '0;
    req_valid = 1'b0; req_op = '0; req_addr = '0; req_wdata = '0;
    rst_n = 1'b0;
    idle(3);
    @(negedge clk) rst_n = 1'b1;

    // (1) latency: plain read (opens row 0 of bank 0), then a write to a
    // closed row is buffered and a read of that line is replaced
    probe_read(mk_addr(0, 0, 0));
    send(OP_WRITE, mk_addr(0, 5, 1), rnd_data());
    idle(3);
    check(wb_count == 1, "write to a closed row was not buffered");
    send(OP_WRITE, mk_addr(0, 0, 2), rnd_data());
    idle(3);
    check(wb_count == 1, "write to the open row was buffered");
    probe_read(mk_addr(0, 5, 1));
    wait_quiet();
    check(wb_count == 0, "buffered write not drained after its row opened");

    // (2) write-heavy burst
    repeat (600) rnd_op(90, 8, 0, 0);

    // (3) random mix
    repeat (N_MIX) rnd_op(45, 45, 3, 2);

    // (4) sweep
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++) send(OP_READ, mk_addr(b, r, c), '0);

    wait_quiet();
    check(exp_q.size() == 0, "reads without a response");
    check(u_dram.wr_misses == n_evict,
          $sformatf("DRAM write misses %0d != evictions %0d", u_dram.wr_misses, n_evict));
    check(max_count <= E, "buffer occupancy above its size");

    check(n_direct   > 0, "no direct write");
    check(n_buffer   > 0, "no buffered write");
    check(n_coalesce > 0, "no coalesced write");
    check(n_evict    > 0, "no eviction");
    check(n_drain    > 0, "no drain");
    check(n_forward  > 0, "no replaced read");
    check(n_refresh  > 0, "no refresh");
    check(n_bad      > 0, "no reserved opcode");
    check(n_stall    > 0, "no input stall");
    check(n_rsp_bp   > 0, "no response backpressure");
    check(n_full     > 0, "buffer never full");

    $display("events: direct=%0d buffered=%0d coalesced=%0d evicted=%0d drained=%0d replaced=%0d",
             n_direct, n_buffer, n_coalesce, n_evict, n_drain, n_forward);
    $display("        refresh=%0d reserved=%0d input_stall_cycles=%0d rsp_backpressure_cycles=%0d full_cycles=%0d",
             n_refresh, n_bad, n_stall, n_rsp_bp, n_full);
    $display("DRAM: reads=%0d (hits %0d) writes=%0d (hits %0d) page hit rate %0.1f%%",
             u_dram.n_reads, u_dram.rd_hits, u_dram.n_writes, u_dram.wr_hits,
             100.0 * real'(u_dram.rd_hits + u_dram.wr_hits) /
             real'(u_dram.n_reads + u_dram.n_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cycle < WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
