// activated_rows_table: one entry per independent bank recording which row
// is open in it.
//
// In open-page operation a row stays open until another row of the same bank
// is accessed or a refresh closes every row. The table tracks this as seen by
// the operation queue: every operation that enters the queue writes its row
// into the entry of its bank (upd_*), and a refresh clears every entry
// (clr_all, which wins over an update in the same cycle). A lookup port
// (lk_*) tells, combinationally, whether a given row is the open row of its
// bank; the buffer control uses it to decide whether a write would be a page
// hit. Entries are invalid (no row open) after reset.
//
// The table and its m entries follow the described design; the separate
// valid bit per entry and the reset state are this implementation's choices.
module activated_rows_table
  import pha_wb_pkg::*;
#(
  parameter int unsigned BANKS  = NUM_BANKS,
  parameter int unsigned ROWW   = ROW_W,
  localparam int unsigned BANKW = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [BANKW-1:0] lk_bank,
  input  logic [ROWW-1:0]  lk_row,
  output logic             lk_hit,
  // update with the row of an operation entering the operation queue
  input  logic             upd_en,
  input  logic [BANKW-1:0] upd_bank,
  input  logic [ROWW-1:0]  upd_row,
  // close every row (refresh)
  input  logic             clr_all
);

  logic [ROWW-1:0] open_row   [BANKS];
  logic [BANKS-1:0] open_valid;

  assign lk_hit = open_valid[lk_bank] && (open_row[lk_bank] == lk_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_valid <= '0;
    end else if (clr_all) begin
      open_valid <= '0;
    end else if (upd_en) begin
      open_valid[upd_bank] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en && !clr_all) open_row[upd_bank] <= upd_row;
  end

endmodule
