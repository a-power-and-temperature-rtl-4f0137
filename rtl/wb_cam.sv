// wb_cam: the content addressable memory of the Write Buffer, holding the
// target line address of every buffered write.
//
// Each of the ENTRIES entries has a valid bit and a line address. Two search
// ports compare against all entries at once:
//   port A (a_addr) reports, per entry, an address match (same line); the
//     control uses it for the operation coming from the command decoder;
//   port B (b_addr) reports row matches for the address broadcast when an
//     operation enters the operation queue.
// Address match is a special case of row match. The CAM also reports whether
// it is full and the lowest-numbered free entry, and returns the tag of one
// entry (rd_idx) for a write that leaves the buffer.
//
// One entry can be written (wr_*, which sets it valid) and one invalidated
// (inv_*) per cycle; a write to the entry being invalidated wins. Searches
// are combinational and see the contents before the clock edge.
//
// The CAM with its address and row matches follows the described design;
// the two-port split, the free-entry search and the one-write/one-invalidate
// per cycle are this implementation's choices.
module wb_cam
  import pha_wb_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDXW   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // write / invalidate
  input  logic               wr_en,
  input  logic [IDXW-1:0]    wr_idx,
  input  line_addr_t         wr_addr,
  input  logic               inv_en,
  input  logic [IDXW-1:0]    inv_idx,
  // search port A
  input  line_addr_t         a_addr,
  output logic [ENTRIES-1:0] a_addr_match,
  // search port B (broadcast)
  input  line_addr_t         b_addr,
  output logic [ENTRIES-1:0] b_row_match,
  // tag read
  input  logic [IDXW-1:0]    rd_idx,
  output line_addr_t         rd_tag,
  // status
  output logic [ENTRIES-1:0] valid,
  output logic               full,
  output logic [IDXW-1:0]    free_idx
);

  line_addr_t tag [ENTRIES];

  assign rd_tag = tag[rd_idx];

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      a_addr_match[i] = valid[i] && (tag[i] == a_addr);
      b_row_match[i]  = valid[i] && same_row(tag[i], b_addr);
    end
  end

  always_comb begin
    full     = &valid;
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid[i]) free_idx = IDXW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (inv_en) valid[inv_idx] <= 1'b0;
      if (wr_en)  valid[wr_idx]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) tag[wr_idx] <= wr_addr;
  end

endmodule
