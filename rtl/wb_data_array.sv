// wb_data_array: the buffer array of the Write Buffer, holding the 64 bytes
// of data of every buffered write.
//
// ENTRIES words of DATA_W bits with one write port and two asynchronous read
// ports: port A serves the read-data replacement (the entry whose address
// matches a read), port B serves writes leaving the buffer for the operation
// queue (drained or evicted entries). Entry i of the array belongs to entry i
// of the CAM. A read in the same cycle as a write to the same word returns the
// old contents; the new contents appear after the clock edge.
//
// The array and its 64-byte words follow the described design; the port
// count and the asynchronous reads are this implementation's choices, made so
// that a read finds its replacement data in the cycle it enters the queue.
module wb_data_array #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned DATA_W  = 512,
  localparam int unsigned IDXW   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [IDXW-1:0]   wr_idx,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [IDXW-1:0]   a_idx,
  output logic [DATA_W-1:0] a_data,
  input  logic [IDXW-1:0]   b_idx,
  output logic [DATA_W-1:0] b_data
);

  logic [DATA_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
  end

  assign a_data = mem[a_idx];
  assign b_data = mem[b_idx];

endmodule
