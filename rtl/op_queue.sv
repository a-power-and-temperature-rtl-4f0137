// op_queue: the operation queue between the Page Hit Aware Write Buffer and
// the DDR I/O port of the AMB.
//
// A first-in first-out queue of DEPTH operations (decoded command plus 64
// bytes of write data). Everything that reaches the DRAM passes through it in
// order: reads, refreshes, writes to open rows and writes leaving the Write
// Buffer. The queue order is the DRAM order, which is what lets the Activated
// Rows Table be updated when an operation enters the queue.
//
// Interface: push side valid/ready (push_ready = not full), pop side
// valid/ready (pop_valid = not empty). A push and a pop may happen in the
// same cycle; push_ready depends on the fill level alone, so a full queue
// takes no push even while it is being popped. An entry pushed on a clock
// edge is visible on pop_* from the following cycle.
//
// The queue itself is part of the described design; its depth, handshake and
// register-based storage are this implementation's choices.
module op_queue
  import pha_wb_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned DATA_W = LINE_BITS,
  localparam int unsigned PTRW  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push_valid,
  output logic              push_ready,
  input  cmd_t              push_cmd,
  input  logic [DATA_W-1:0] push_data,
  output logic              pop_valid,
  input  logic              pop_ready,
  output cmd_t              pop_cmd,
  output logic [DATA_W-1:0] pop_data,
  output logic [PTRW:0]     count
);

  cmd_t              q_cmd  [DEPTH];
  logic [DATA_W-1:0] q_data [DEPTH];
  logic [PTRW-1:0]   wr_ptr, rd_ptr;
  logic              do_push, do_pop;

  assign push_ready = (count < (PTRW+1)'(DEPTH));
  assign pop_valid  = (count != '0);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign pop_cmd    = q_cmd[rd_ptr];
  assign pop_data   = q_data[rd_ptr];

  function automatic logic [PTRW-1:0] next_ptr(logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PTRW+1)'(do_push) - (PTRW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      q_cmd[wr_ptr]  <= push_cmd;
      q_data[wr_ptr] <= push_data;
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (PTRW+1)'(DEPTH));
  a_pop_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pop_valid && !pop_ready |=> pop_valid && $stable(pop_cmd));

endmodule
