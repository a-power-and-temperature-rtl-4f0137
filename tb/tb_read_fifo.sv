// tb_read_fifo: self-checking test of the Read FIFO (8 slots, 64-bit data).
// Reads are allocated at random, some with replacement data; a DRAM stand-in
// returns data for allocated reads in order after a random delay. Every
// output must carry the replacement data when there was one and the DRAM
// data otherwise, in allocation order; fill_replaced must pulse exactly for
// replaced slots, and a replaced read must not come out before its DRAM data
// has returned (same timing as an unreplaced read).
module tb_read_fifo;
  localparam int D = 8, DW = 64;

  logic clk = 1'b0, rst_n;
  logic alloc_en, alloc_ready, alloc_fwd, fill_valid, fill_replaced, out_valid, out_ready, out_fwd;
  logic [DW-1:0] alloc_data, fill_data, out_data;

  always #5 clk = ~clk;

  read_fifo #(.DEPTH(D), .DATA_W(DW)) dut (.*);

  typedef struct { bit fwd; logic [DW-1:0] fd; logic [DW-1:0] dd; bit filled; } slot_t;
  slot_t q [$];
  int unfilled_idx = 0;
  int unsigned checks = 0, failures = 0, n_out = 0, n_rep = 0, n_full = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; alloc_en = 0; alloc_fwd = 0; alloc_data = '0; fill_valid = 0; fill_data = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      alloc_en   = ($urandom_range(99) < 45) && (q.size() < D);
      alloc_fwd  = ($urandom_range(2) == 0);
      alloc_data = {$urandom, $urandom};
      fill_valid = (unfilled_idx < q.size()) && ($urandom_range(99) < 40);
      fill_data  = {$urandom, $urandom};
      out_ready  = ($urandom_range(99) < ((n / 400) % 2 == 0 ? 80 : 20));
      #1;
      check(alloc_ready == (q.size() < D), "alloc_ready");
      check(fill_replaced == (fill_valid && q[unfilled_idx].fwd), "fill_replaced");
      check(out_valid == (q.size() > 0 && q[0].filled), "out_valid (replaced data must wait for DRAM)");
      if (out_valid && q.size() > 0) begin
        check(out_fwd == q[0].fwd, "out_fwd");
        check(out_data == (q[0].fwd ? q[0].fd : q[0].dd), "out_data");
      end
      n_full += 32'(!alloc_ready);
      @(posedge clk);
      if (fill_valid) begin
        q[unfilled_idx].dd = fill_data; q[unfilled_idx].filled = 1; unfilled_idx++;
      end
      if (out_valid && out_ready) begin
        n_rep += 32'(q[0].fwd); void'(q.pop_front()); unfilled_idx--; n_out++;
      end
      if (alloc_en) q.push_back('{alloc_fwd, alloc_data, '0, 0});
    end
    check(n_out > 500 && n_rep > 100 && n_full > 0, "coverage");
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
