// tb_activated_rows_table: self-checking test of the Activated Rows Table.
// A reference array of open rows (-1 = closed) is updated with the same
// random updates and refreshes; each cycle a random lookup, biased towards
// the open row of the bank, must report a hit exactly when the reference
// holds that row. After reset no row is open.
module tb_activated_rows_table;
  import pha_wb_pkg::*;

  logic clk = 1'b0, rst_n;
  logic [BANK_W-1:0] lk_bank, upd_bank;
  logic [ROW_W-1:0]  lk_row, upd_row;
  logic lk_hit, upd_en, clr_all;

  always #5 clk = ~clk;

  activated_rows_table dut (.*);

  int ref_row [NUM_BANKS];
  int unsigned checks = 0, failures = 0, hits = 0, misses = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; upd_en = 0; clr_all = 0; lk_bank = 0; lk_row = 0; upd_bank = 0; upd_row = 0;
    for (int b = 0; b < NUM_BANKS; b++) ref_row[b] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NUM_BANKS; b++) begin
      lk_bank = BANK_W'(b); lk_row = '0; #1;
      check(!lk_hit, "row open after reset");
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      upd_en   = ($urandom_range(2) == 0);
      clr_all  = ($urandom_range(60) == 0);
      upd_bank = BANK_W'($urandom_range(NUM_BANKS-1));
      upd_row  = ROW_W'($urandom_range(7));
      lk_bank  = BANK_W'($urandom_range(NUM_BANKS-1));
      lk_row   = (ref_row[lk_bank] >= 0 && $urandom_range(1) == 1) ? ROW_W'(ref_row[lk_bank])
                                                                : ROW_W'($urandom_range(7));
      #1;
      check(lk_hit == (ref_row[lk_bank] == int'(lk_row)), "lookup");
      if (lk_hit) hits++; else misses++;
      @(posedge clk);
      if (clr_all) for (int b = 0; b < NUM_BANKS; b++) ref_row[b] = -1;
      else if (upd_en) ref_row[upd_bank] = int'(upd_row);
    end
    check(hits > 500 && misses > 500, "lookup mix");
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
