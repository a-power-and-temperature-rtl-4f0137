// pha_wb_pkg: shared types and constants of the Page Hit Aware Write Buffer.
//
// The address map is the one of a 1 GB FB-DIMM built from DDR2 devices with
// 4 bytes per column and a burst length of 8. A 30-bit byte address splits as
//   [1:0]   byte within a column
//   [4:2]   column within a burst (8 columns, 32 bytes per bank)
//   [5]     bank within a bank pair (the two banks of a pair are accessed
//           together, so one burst moves 64 bytes)
//   [10:6]  64-byte section of a row
//   [15:11] bank pair (32 pairs of the 64 banks of the module)
//   [29:16] row within a bank (16384 rows)
// Every operation handled by the buffer moves one 64-byte line, so only bits
// [29:6] travel with it; the buffer treats each bank pair as one independent
// bank because both banks of a pair always hold the same open row.
package pha_wb_pkg;

  localparam int unsigned ADDR_W     = 30;  // byte address of the 1 GB module
  localparam int unsigned LINE_OFF_W = 6;   // 64-byte line
  localparam int unsigned COL_W      = 5;   // bits [10:6]
  localparam int unsigned BANK_W     = 5;   // bits [15:11]
  localparam int unsigned ROW_W      = 14;  // bits [29:16]
  localparam int unsigned LINE_W     = ROW_W + BANK_W + COL_W;  // 24
  localparam int unsigned NUM_BANKS  = 1 << BANK_W;             // 32 bank pairs
  localparam int unsigned LINE_BITS  = 8 << LINE_OFF_W;         // 512 data bits

  // Operation code as sent by the memory controller. Code 3 is reserved.
  typedef enum logic [1:0] {
    OP_READ    = 2'd0,
    OP_WRITE   = 2'd1,
    OP_REFRESH = 2'd2,
    OP_RSVD    = 2'd3
  } op_e;

  // Line address, ordered so that its packed value equals byte address [29:6].
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [BANK_W-1:0] bank;
    logic [COL_W-1:0]  col;
  } line_addr_t;

  // A decoded operation without its data.
  typedef struct packed {
    op_e        op;
    line_addr_t addr;
  } cmd_t;

  // True when two line addresses fall in the same row of the same bank.
  function automatic logic same_row(line_addr_t a, line_addr_t b);
    return (a.row == b.row) && (a.bank == b.bank);
  endfunction

endpackage
