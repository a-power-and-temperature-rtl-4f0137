// cmd_decoder: the command decoder in front of the Page Hit Aware Write Buffer.
//
// It takes one operation per cycle from the memory-controller side of the AMB
// (opcode, 30-bit byte address, 64 bytes of write data), splits the address
// into row, bank pair and row section according to the module's address map
// (see pha_wb_pkg), and hands the decoded operation to the buffer control one
// cycle later through a single pipeline register with a valid/ready handshake.
// Reads, writes and refreshes are passed on; the reserved opcode is dropped
// and reported with a one-cycle pulse on bad_cmd.
//
// Timing: an operation accepted on a rising edge (in_valid && in_ready) is
// presented on out_* from the next cycle on and held until out_ready.
// in_ready is high whenever the register is empty or is being emptied, so the
// decoder sustains one operation per cycle.
//
// The decoder's role and the address map follow the described design; the
// handshake, the single register stage and the treatment of the reserved
// opcode are this implementation's own choices.
module cmd_decoder
  import pha_wb_pkg::*;
#(
  parameter int unsigned DATA_W = LINE_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the memory controller
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [1:0]        in_op,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [DATA_W-1:0] in_data,
  // to the buffer control
  output logic              out_valid,
  input  logic              out_ready,
  output cmd_t              out_cmd,
  output logic [DATA_W-1:0] out_data,
  // reserved opcode seen and dropped
  output logic              bad_cmd
);

  logic legal;
  cmd_t dec;

  always_comb begin
    dec.op   = op_e'(in_op);
    dec.addr = line_addr_t'(in_addr[ADDR_W-1:LINE_OFF_W]);
    legal    = (dec.op != OP_RSVD);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cmd   <= '0;
      out_data  <= '0;
      bad_cmd   <= 1'b0;
    end else begin
      bad_cmd <= in_valid && in_ready && !legal;
      if (in_ready) begin
        out_valid <= in_valid && legal;
        if (in_valid && legal) begin
          out_cmd  <= dec;
          // only writes carry data; keep the register still otherwise
          if (dec.op == OP_WRITE) out_data <= in_data;
        end
      end
    end
  end

endmodule
