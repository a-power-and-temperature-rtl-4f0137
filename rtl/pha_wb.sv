// pha_wb: Page Hit Aware Write Buffer, placed in the advanced memory buffer
// (AMB) of a fully buffered DIMM, between the command decoder and the DDR I/O
// port.
//
// Idea: reads limit performance, writes do not. Reads therefore go to the
// DRAM unchanged and at once, while a write whose target row is not the open
// row of its bank is parked in the Write Buffer instead of forcing a
// precharge/activate pair. Parked writes are sent to the DRAM right after
// some other operation has opened their row, so they become page hits, and
// fewer activations mean less DRAM power and heat. The buffer is invisible to
// the memory controller: a read of a line that is still parked gets the
// parked data in place of the outdated DRAM data.
//
// Per cycle at most one operation enters the operation queue; its row is
// written into the Activated Rows Table and broadcast to the CAM. Buffered
// writes in the same row become "pending" and are drained, one per cycle,
// before anything else enters the queue, so they follow the operation that
// opened their row. When no drain is pending, the decoded operation is
// handled as follows:
//   read     enters the queue; a Read FIFO slot is allocated and, on an
//            address match, loaded with the buffered data (replacement);
//   refresh  enters the queue and closes every row in the table;
//   write, row open    enters the queue (direct); a buffered write to the
//            same line is stale and is dropped;
//   write, row closed  is buffered: into the entry of the same line if one
//            exists (coalesce), else into a free entry, else a random entry
//            is evicted into the queue and the new write takes its place.
//
// Ports: req_* from the memory controller (op, 30-bit byte address, 64-byte
// write data, valid/ready), rsp_* read data back (valid/ready), dram_cmd_*
// towards the DDR I/O port (valid/ready, in DRAM order), dram_rd_* read data
// from the DDR I/O port in issue order (no backpressure), ev_* one-cycle
// event pulses and wb_count for monitoring.
//
// Timing: an operation accepted at edge t is decoded at t+1 and, if it goes
// to the DRAM and nothing is pending, enters the queue at that edge and is
// offered on dram_cmd_* from t+2 on. Searching the buffer adds no cycle to a
// read.
//
// The structure (command decoder, Activated Rows Table, CAM plus buffer
// array, operation queue, Read FIFO) and the policies above follow the
// described design. Own choices: draining pending writes ahead of new input,
// coalescing writes to a buffered line, dropping a buffered write overtaken
// by a direct write to the same line, one queue entry per cycle, the queue
// and FIFO depths, and the handshakes.
module pha_wb
  import pha_wb_pkg::*;
#(
  parameter int unsigned WB_ENTRIES = 64,
  parameter int unsigned DATA_W     = LINE_BITS,
  parameter int unsigned OPQ_DEPTH  = 8,
  parameter int unsigned RDQ_DEPTH  = 16,
  localparam int unsigned IDXW      = (WB_ENTRIES > 1) ? $clog2(WB_ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory controller side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [1:0]        req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [DATA_W-1:0] rsp_data,
  // DDR I/O side
  output logic              dram_cmd_valid,
  input  logic              dram_cmd_ready,
  output logic [1:0]        dram_cmd_op,
  output logic [ADDR_W-1:0] dram_cmd_addr,
  output logic [DATA_W-1:0] dram_cmd_wdata,
  input  logic              dram_rd_valid,
  input  logic [DATA_W-1:0] dram_rd_data,
  // monitoring
  output logic              ev_direct,
  output logic              ev_buffer,
  output logic              ev_coalesce,
  output logic              ev_evict,
  output logic              ev_drain,
  output logic              ev_forward,
  output logic              ev_bad_cmd,
  output logic [IDXW:0]     wb_count
);

  // ---------------------------------------------------------------- decoder
  logic              dec_valid, dec_ready;
  cmd_t              dec_cmd;
  logic [DATA_W-1:0] dec_data;

  cmd_decoder #(.DATA_W(DATA_W)) u_dec (
    .clk, .rst_n,
    .in_valid (req_valid), .in_ready (req_ready),
    .in_op    (req_op),    .in_addr  (req_addr), .in_data (req_wdata),
    .out_valid(dec_valid), .out_ready(dec_ready),
    .out_cmd  (dec_cmd),   .out_data (dec_data),
    .bad_cmd  (ev_bad_cmd)
  );

  // ------------------------------------------------- shared control signals
  logic                  push;        // an operation enters the queue
  cmd_t                  push_cmd;
  logic [DATA_W-1:0]     push_data;
  logic                  opq_ready;
  logic                  rdq_ready;
  logic                  art_hit;
  logic                  wr_en, inv_en;
  logic [IDXW-1:0]       wr_idx, inv_idx;
  logic [WB_ENTRIES-1:0] a_addr_match, b_row_match, valid;
  logic                  full;
  logic [IDXW-1:0]       free_idx, victim_idx, a_idx, drain_idx, b_idx;
  logic [DATA_W-1:0]     a_data, b_data;
  line_addr_t            b_tag;
  logic [WB_ENTRIES-1:0] pending, pending_nxt;
  logic                  any_pending, a_hit;

  // --------------------------------------------------- activated rows table
  activated_rows_table #(.BANKS(NUM_BANKS), .ROWW(ROW_W)) u_art (
    .clk, .rst_n,
    .lk_bank (dec_cmd.addr.bank), .lk_row (dec_cmd.addr.row), .lk_hit (art_hit),
    .upd_en  (push && push_cmd.op != OP_REFRESH),
    .upd_bank(push_cmd.addr.bank), .upd_row(push_cmd.addr.row),
    .clr_all (push && push_cmd.op == OP_REFRESH)
  );

  // ----------------------------------------------------------- write buffer
  wb_cam #(.ENTRIES(WB_ENTRIES)) u_cam (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_addr (dec_cmd.addr),
    .inv_en, .inv_idx,
    .a_addr (dec_cmd.addr), .a_addr_match,
    .b_addr (push_cmd.addr), .b_row_match,
    .rd_idx (b_idx), .rd_tag (b_tag),
    .valid, .full, .free_idx
  );

  wb_data_array #(.ENTRIES(WB_ENTRIES), .DATA_W(DATA_W)) u_data (
    .clk,
    .wr_en, .wr_idx, .wr_data (dec_data),
    .a_idx, .a_data,
    .b_idx, .b_data
  );

  victim_select #(.ENTRIES(WB_ENTRIES)) u_victim (
    .clk, .rst_n, .step (1'b1), .idx (victim_idx)
  );

  // one-hot to index; at most one entry holds a given line
  always_comb begin
    a_idx = '0;
    for (int i = 0; i < WB_ENTRIES; i++)
      if (a_addr_match[i]) a_idx = a_idx | IDXW'(i);
  end
  assign a_hit = |a_addr_match;

  // lowest-numbered pending entry drains first
  always_comb begin
    drain_idx = '0;
    for (int i = WB_ENTRIES - 1; i >= 0; i--)
      if (pending[i]) drain_idx = IDXW'(i);
  end
  assign any_pending = |pending;

  // ---------------------------------------------------------- decision logic
  logic is_rd, is_wr, is_ref;
  assign is_rd  = dec_cmd.op == OP_READ;
  assign is_wr  = dec_cmd.op == OP_WRITE;
  assign is_ref = dec_cmd.op == OP_REFRESH;

  logic take;  // the decoded operation is consumed this cycle
  logic evict;

  always_comb begin
    push      = 1'b0;
    push_cmd  = dec_cmd;
    push_data = dec_data;
    take      = 1'b0;
    wr_en     = 1'b0;
    wr_idx    = free_idx;
    inv_en    = 1'b0;
    inv_idx   = a_idx;
    b_idx     = drain_idx;
    evict     = 1'b0;
    ev_direct = 1'b0;
    ev_buffer = 1'b0;
    ev_coalesce = 1'b0;
    ev_drain  = 1'b0;
    ev_forward = 1'b0;

    if (any_pending) begin
      // a buffered write whose row was just opened follows at once
      if (opq_ready) begin
        push          = 1'b1;
        push_cmd.op   = OP_WRITE;
        push_data     = b_data;
        inv_en        = 1'b1;
        inv_idx       = drain_idx;
        ev_drain      = 1'b1;
      end
    end else if (dec_valid) begin
      if (is_rd) begin
        if (opq_ready && rdq_ready) begin
          push       = 1'b1;
          take       = 1'b1;
          ev_forward = a_hit;
        end
      end else if (is_ref) begin
        if (opq_ready) begin
          push = 1'b1;
          take = 1'b1;
        end
      end else if (is_wr && art_hit) begin
        if (opq_ready) begin
          push      = 1'b1;
          take      = 1'b1;
          inv_en    = a_hit;
          ev_direct = 1'b1;
        end
      end else if (is_wr && a_hit) begin
        take        = 1'b1;
        wr_en       = 1'b1;
        wr_idx      = a_idx;
        ev_coalesce = 1'b1;
      end else if (is_wr && !full) begin
        take      = 1'b1;
        wr_en     = 1'b1;
        wr_idx    = free_idx;
        ev_buffer = 1'b1;
      end else if (is_wr) begin
        if (opq_ready) begin
          push          = 1'b1;
          take          = 1'b1;
          evict         = 1'b1;
          b_idx         = victim_idx;
          push_cmd.op   = OP_WRITE;
            push_data     = b_data;
          wr_en         = 1'b1;
          wr_idx        = victim_idx;
          ev_buffer     = 1'b1;
        end
      end
    end
    // the address of a write leaving the buffer is its CAM tag
    if (ev_drain || evict) push_cmd.addr = b_tag;
  end

  assign dec_ready = take;
  assign ev_evict  = evict;

  // pending set: row matches of the operation entering the queue
  always_comb begin
    pending_nxt = pending;
    if (push && push_cmd.op != OP_REFRESH)
      pending_nxt = pending_nxt | (b_row_match & valid);
    if (inv_en) pending_nxt[inv_idx] = 1'b0;
    if (wr_en)  pending_nxt[wr_idx]  =
        push && push_cmd.op != OP_REFRESH && same_row(dec_cmd.addr, push_cmd.addr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= pending_nxt;
  end

  always_comb begin
    wb_count = '0;
    for (int i = 0; i < WB_ENTRIES; i++) wb_count = wb_count + (IDXW+1)'(valid[i]);
  end

  // ---------------------------------------------------------- operation queue
  cmd_t opq_cmd;

  op_queue #(.DEPTH(OPQ_DEPTH), .DATA_W(DATA_W)) u_opq (
    .clk, .rst_n,
    .push_valid (push), .push_ready (opq_ready),
    .push_cmd, .push_data,
    .pop_valid (dram_cmd_valid), .pop_ready (dram_cmd_ready),
    .pop_cmd (opq_cmd), .pop_data (dram_cmd_wdata),
    .count ()
  );

  assign dram_cmd_op   = opq_cmd.op;
  assign dram_cmd_addr = {opq_cmd.addr, {LINE_OFF_W{1'b0}}};

  // ---------------------------------------------------------------- read FIFO
  read_fifo #(.DEPTH(RDQ_DEPTH), .DATA_W(DATA_W)) u_rdq (
    .clk, .rst_n,
    .alloc_en (push && push_cmd.op == OP_READ), .alloc_ready (rdq_ready),
    .alloc_fwd (a_hit), .alloc_data (a_data),
    .fill_valid (dram_rd_valid), .fill_data (dram_rd_data),
    .fill_replaced (),
    .out_valid (rsp_valid), .out_ready (rsp_ready),
    .out_data (rsp_data), .out_fwd ()
  );

  // ---------------------------------------------------------------- checks
  a_no_input_while_pending: assert property (@(posedge clk) disable iff (!rst_n)
    any_pending |-> !take);
  a_single_line_match: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(a_addr_match));

endmodule
