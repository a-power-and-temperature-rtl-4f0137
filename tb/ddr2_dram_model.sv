// ddr2_dram_model: behavioural model of the DDR2 devices of the DIMM behind
// the DDR I/O port, for testbenches only (not synthesizable).
//
// It takes line-sized operations (read, write, refresh) in order from a
// valid/ready port whose ready is high on READY_PCT percent of the cycles,
// stores written lines in a sparse array, and returns the data of every read
// RD_LAT cycles after accepting it, in order, with no backpressure. A line
// never written reads as init_data(line). Per bank it tracks the open row in
// open-page fashion (a refresh closes all rows) and counts activations and
// page hits for reads and writes separately.
module ddr2_dram_model
  import pha_wb_pkg::*;
#(
  parameter int unsigned DATA_W    = LINE_BITS,
  parameter int unsigned RD_LAT    = 6,
  parameter int unsigned READY_PCT = 70
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [1:0]        cmd_op,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [DATA_W-1:0] cmd_wdata,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [int];
  int                open_row [NUM_BANKS];
  longint            cycle;
  longint            due_q [$];
  logic [DATA_W-1:0] data_q [$];

  int unsigned n_reads, n_writes, n_refresh;
  int unsigned rd_hits, rd_misses, wr_hits, wr_misses;

  function automatic logic [DATA_W-1:0] init_data(int line);
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[i*32 +: 32] = 32'(line) * 32'h9E37_79B9 + 32'(i);
    return d;
  endfunction

  initial begin
    for (int b = 0; b < NUM_BANKS; b++) open_row[b] = -1;
    n_reads = 0; n_writes = 0; n_refresh = 0;
    rd_hits = 0; rd_misses = 0; wr_hits = 0; wr_misses = 0;
    cycle = 0;
    cmd_ready = 1'b0;
    rd_valid  = 1'b0;
    rd_data   = '0;
  end

  always @(posedge clk) begin
    line_addr_t la;
    int         line;
    bit         hit;
    cycle <= cycle + 1;
    rd_valid <= 1'b0;
    if (rst_n && cmd_valid && cmd_ready) begin
      la   = line_addr_t'(cmd_addr[ADDR_W-1:LINE_OFF_W]);
      line = int'(cmd_addr[ADDR_W-1:LINE_OFF_W]);
      hit  = (open_row[la.bank] == int'(la.row));
      case (op_e'(cmd_op))
        OP_READ: begin
          n_reads++;
          if (hit) rd_hits++; else rd_misses++;
          open_row[la.bank] = int'(la.row);
          due_q.push_back(cycle + longint'(RD_LAT));
          data_q.push_back(mem.exists(line) ? mem[line] : init_data(line));
        end
        OP_WRITE: begin
          n_writes++;
          if (hit) wr_hits++; else wr_misses++;
          open_row[la.bank] = int'(la.row);
          mem[line] = cmd_wdata;
        end
        OP_REFRESH: begin
          n_refresh++;
          for (int b = 0; b < NUM_BANKS; b++) open_row[b] = -1;
        end
        default: ;
      endcase
    end
    if (due_q.size() > 0 && due_q[0] <= cycle) begin
      void'(due_q.pop_front());
      rd_valid <= 1'b1;
      rd_data  <= data_q.pop_front();
    end
    cmd_ready <= ($urandom_range(99) < READY_PCT);
  end

  // number of reads accepted whose data has not been returned yet
  function automatic int outstanding();
    return due_q.size();
  endfunction

endmodule
