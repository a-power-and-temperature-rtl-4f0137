// victim_select: random choice of the Write Buffer entry to vacate when the
// buffer is full and a new write to a closed row needs a place.
//
// A 16-bit maximal-length Fibonacci LFSR (taps 16, 15, 13, 4) steps once per
// cycle while `step` is high; `idx` is the LFSR value reduced modulo ENTRIES
// (its low bits when ENTRIES is a power of two). Because the choice is only
// made when every entry is valid, any index is a legal victim. The LFSR is
// reset to the non-zero value SEED.
//
// Choosing a random victim instead of the oldest entry follows the described
// design; the LFSR, its polynomial and its seed are this implementation's
// choices.
module victim_select #(
  parameter int unsigned  ENTRIES = 64,
  parameter logic [15:0]  SEED    = 16'hACE1,
  localparam int unsigned IDXW    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,
  output logic [IDXW-1:0] idx
);

  logic [15:0] lfsr;
  logic        fb;

  assign fb  = lfsr[15] ^ lfsr[14] ^ lfsr[12] ^ lfsr[3];
  assign idx = IDXW'(lfsr % 16'(ENTRIES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr <= (SEED == '0) ? 16'h1 : SEED;
    else if (step) lfsr <= {lfsr[14:0], fb};
  end

endmodule
