// tb_op_queue: self-checking test of the operation queue (depth 8, 64-bit
// data). Random pushes and pops against a reference queue: order and
// contents must match, push_ready must be low exactly when 8 entries are
// held, count must equal the reference size, and an entry pushed on an edge
// must be poppable from the next cycle (checked on an empty queue).
module tb_op_queue;
  import pha_wb_pkg::*;

  localparam int D = 8, DW = 64;

  logic clk = 1'b0, rst_n;
  logic push_valid, push_ready, pop_valid, pop_ready;
  cmd_t push_cmd, pop_cmd;
  logic [DW-1:0] push_data, pop_data;
  logic [3:0] count;

  always #5 clk = ~clk;

  op_queue #(.DEPTH(D), .DATA_W(DW)) dut (.*);

  typedef struct packed { cmd_t c; logic [DW-1:0] d; } ent_t;
  ent_t q [$];
  int unsigned checks = 0, failures = 0, n_full = 0, n_pop = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; push_valid = 0; pop_ready = 0; push_cmd = '0; push_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: push into empty queue, visible next cycle
    push_valid = 1; push_cmd = cmd_t'({OP_READ, 24'h123456}); push_data = 64'hABCD;
    #1 check(!pop_valid, "empty queue shows an entry");
    @(negedge clk) push_valid = 0;
    #1 check(pop_valid && pop_cmd.addr == 24'h123456, "pushed entry not visible next cycle");
    pop_ready = 1;
    @(negedge clk) pop_ready = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      push_valid = ($urandom_range(99) < ((n / 300) % 2 == 0 ? 70 : 30));
      pop_ready  = ($urandom_range(99) < 50);
      push_cmd   = cmd_t'({2'($urandom_range(2)), 24'($urandom)});
      push_data  = {$urandom, $urandom};
      #1;
      check(int'(count) == q.size(), "count");
      check(push_ready == (q.size() < D), "push_ready");
      check(pop_valid == (q.size() > 0), "pop_valid");
      if (pop_valid && q.size() > 0) check(pop_cmd == q[0].c && pop_data == q[0].d, "head contents");
      n_full += 32'(!push_ready);
      @(posedge clk);
      if (pop_valid && pop_ready) begin void'(q.pop_front()); n_pop++; end
      if (push_valid && push_ready) q.push_back('{push_cmd, push_data});
    end
    check(n_full > 10 && n_pop > 1000, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
