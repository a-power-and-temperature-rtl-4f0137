// tb_cmd_decoder: self-checking test of the command decoder. Random
// operations with random output backpressure; every accepted legal operation
// must come out once, in order, one cycle later at the earliest, with its
// address split into row [29:16], bank pair [15:11] and section [10:6]
// (reference computed here with shifts and masks) and, for writes, its data.
// Reserved opcodes must be dropped and reported on bad_cmd the next cycle.
module tb_cmd_decoder;
  import pha_wb_pkg::*;

  localparam int DW = 64;

  logic              clk = 1'b0, rst_n;
  logic              in_valid, in_ready, out_valid, out_ready, bad_cmd;
  logic [1:0]        in_op;
  logic [ADDR_W-1:0] in_addr;
  logic [DW-1:0]     in_data, out_data;
  cmd_t              out_cmd;

  always #5 clk = ~clk;

  cmd_decoder #(.DATA_W(DW)) dut (.*);

  typedef struct { int op; int row; int bank; int col; logic [DW-1:0] d; longint t; } exp_t;
  exp_t q [$];
  int unsigned checks = 0, failures = 0, n_bad_sent = 0, n_bad_seen = 0, n_out = 0;
  longint cycle = 0;
  bit bad_pending = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      check(bad_cmd == bad_pending, "bad_cmd pulse wrong");
      bad_pending = 0;
      if (out_valid && out_ready) begin
        exp_t e;
        n_out++;
        if (q.size() == 0) check(0, "unexpected output");
        else begin
          e = q.pop_front();
          check(int'(out_cmd.op) == e.op, "op");
          check(int'(out_cmd.addr.row) == e.row && int'(out_cmd.addr.bank) == e.bank &&
                int'(out_cmd.addr.col) == e.col, "address split");
          if (e.op == 1) check(out_data == e.d, "write data");
          check(cycle > e.t, "output in the same cycle as input");
        end
      end
      if (in_valid && in_ready) begin
        if (in_op == 2'd3) begin n_bad_sent++; bad_pending = 1; end
        else q.push_back('{int'(in_op), int'({2'b0, in_addr} >> 16) & 32'h3fff,
                           int'({2'b0, in_addr} >> 11) & 32'd31,
                           int'({2'b0, in_addr} >> 6) & 32'd31, in_data, cycle});
      end
      n_bad_seen += 32'(bad_cmd);
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; in_op = 0; in_addr = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      if (!in_valid || in_ready_q) begin
        in_valid = ($urandom_range(4) != 0);
        in_op    = 2'($urandom_range(3));
        in_addr  = ADDR_W'($urandom);
        in_data  = {$urandom, $urandom};
      end
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (5) @(posedge clk);
    check(q.size() == 0, "operations lost");
    check(n_bad_sent > 0 && n_bad_seen == n_bad_sent, "reserved opcode count");
    check(n_out > 1000, "too few operations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ready as sampled at the last rising edge, to know whether the held input was taken
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
