// tb_victim_select: self-checking test of the random victim selector with
// 64 entries. A reference LFSR (x^16 + x^15 + x^13 + x^4 + 1, shifting left)
// predicts every index; the sequence must hold still while step is low, have
// the full period 65535, and spread over all 64 entries.
module tb_victim_select;
  localparam int E = 64;

  logic clk = 1'b0, rst_n, step;
  logic [5:0] idx;

  always #5 clk = ~clk;

  victim_select #(.ENTRIES(E)) dut (.*);

  int unsigned checks = 0, failures = 0, seen_cnt = 0, period = 0, steps = 0;
  logic [15:0] r;
  bit seen [E];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; step = 0;
    for (int i = 0; i < E; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    r = 16'hACE1;
    for (int n = 0; n < 70000; n++) begin
      @(negedge clk);
      check(int'(idx) == int'(r) % E, "index");
      if (!seen[idx]) begin seen[idx] = 1; seen_cnt++; end
      step = (n < 1000) ? ($urandom_range(1) == 0) : 1'b1;
      @(posedge clk);
      if (step) begin
        r = {r[14:0], r[15] ^ r[14] ^ r[12] ^ r[3]};
        steps++;
        if (r == 16'hACE1 && period == 0) period = steps;
      end
    end
    check(seen_cnt == E, "not every entry chosen");
    check(period == 65535, "LFSR period is not 65535");
    $display("period reached at step %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
