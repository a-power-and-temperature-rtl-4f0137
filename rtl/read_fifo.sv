// read_fifo: the Read FIFO that returns read data towards the memory
// controller, with replacement of outdated DRAM data by buffered write data.
//
// A slot is allocated, in order, for every read that enters the operation
// queue. If the Write Buffer holds a write to the same line at that moment
// (an address match), the buffered data is stored in the slot together with a
// "replaced" flag (alloc_fwd). Read data returning from the DRAM, which comes
// back in the order the reads were issued, fills the oldest slot still
// waiting; in a replaced slot the DRAM data is outdated and is discarded. A
// slot leaves the FIFO, oldest first, once its DRAM data has arrived, so a
// replaced read is returned at exactly the time the unmodified read would
// have been: the replacement costs no cycle.
//
// Interface: alloc_* (alloc_ready = a free slot; the control only issues a
// read when there is one, so the DRAM can never return more data than there
// are slots), fill_* from the DDR I/O port (no backpressure), out_* towards
// the memory controller (valid/ready). out_fwd tells that the returned data
// came from the Write Buffer; fill_replaced pulses when DRAM data is dropped.
//
// Replacing outdated DRAM data in the Read FIFO follows the described design;
// the slot organisation, depth and handshakes are this implementation's
// choices.
module read_fifo #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 512,
  localparam int unsigned PTRW  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // slot allocation when a read enters the operation queue
  input  logic              alloc_en,
  output logic              alloc_ready,
  input  logic              alloc_fwd,
  input  logic [DATA_W-1:0] alloc_data,
  // read data from the DRAM, in issue order
  input  logic              fill_valid,
  input  logic [DATA_W-1:0] fill_data,
  output logic              fill_replaced,
  // read data to the memory controller
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_fwd
);

  logic [DATA_W-1:0] slot_data [DEPTH];
  logic [DEPTH-1:0]  slot_fwd, slot_done;
  logic [PTRW-1:0]   head, tail, fill_ptr;
  logic [PTRW:0]     count, unfilled;
  logic              do_alloc, do_fill, do_pop;

  function automatic logic [PTRW-1:0] next_ptr(logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign alloc_ready   = (count < (PTRW+1)'(DEPTH));
  assign do_alloc      = alloc_en && alloc_ready;
  assign do_fill       = fill_valid && (unfilled != '0);
  assign fill_replaced = do_fill && slot_fwd[fill_ptr];
  assign out_valid     = (count != '0) && slot_done[head];
  assign out_data      = slot_data[head];
  assign out_fwd       = slot_fwd[head];
  assign do_pop        = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      fill_ptr  <= '0;
      count     <= '0;
      unfilled  <= '0;
      slot_fwd  <= '0;
      slot_done <= '0;
    end else begin
      if (do_alloc) begin
        tail            <= next_ptr(tail);
        slot_fwd[tail]  <= alloc_fwd;
        slot_done[tail] <= 1'b0;
      end
      if (do_fill) begin
        fill_ptr            <= next_ptr(fill_ptr);
        slot_done[fill_ptr] <= 1'b1;
      end
      if (do_pop) head <= next_ptr(head);
      count    <= count + (PTRW+1)'(do_alloc) - (PTRW+1)'(do_pop);
      unfilled <= unfilled + (PTRW+1)'(do_alloc) - (PTRW+1)'(do_fill);
    end
  end

  always_ff @(posedge clk) begin
    if (do_alloc && alloc_fwd)                slot_data[tail]     <= alloc_data;
    if (do_fill && !slot_fwd[fill_ptr])       slot_data[fill_ptr] <= fill_data;
  end

  a_no_orphan_fill: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> unfilled != '0);
  a_alloc_has_room: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_en |-> alloc_ready);

endmodule
