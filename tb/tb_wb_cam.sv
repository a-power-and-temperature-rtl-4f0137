// tb_wb_cam: self-checking test of the Write Buffer CAM with 16 entries.
// A reference copy of valid bits and tags follows random writes and
// invalidations; each cycle the address-match vector of port A, the
// row-match vector of port B, the tag read port, the full flag and the
// lowest free entry are compared with values computed from the reference.
module tb_wb_cam;
  import pha_wb_pkg::*;

  localparam int E = 16;

  logic clk = 1'b0, rst_n;
  logic wr_en, inv_en, full;
  logic [3:0] wr_idx, inv_idx, free_idx, rd_idx;
  line_addr_t wr_addr, a_addr, b_addr, rd_tag;
  logic [E-1:0] a_addr_match, b_row_match, valid;

  always #5 clk = ~clk;

  wb_cam #(.ENTRIES(E)) dut (.*);

  bit         rv [E];
  line_addr_t rt [E];
  int unsigned checks = 0, failures = 0, n_amatch = 0, n_rmatch = 0, n_full = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic line_addr_t rnd_addr();
    line_addr_t a;
    a.row = ROW_W'($urandom_range(3)); a.bank = BANK_W'($urandom_range(1)); a.col = COL_W'($urandom_range(3));
    return a;
  endfunction

  initial begin
    logic [E-1:0] ea, eb;
    int ef, ecount;
    rst_n = 0; wr_en = 0; inv_en = 0; wr_idx = 0; inv_idx = 0; rd_idx = 0;
    wr_addr = '0; a_addr = '0; b_addr = '0;
    for (int i = 0; i < E; i++) rv[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      ecount = 0;
      for (int i = 0; i < E; i++) ecount += int'(rv[i]);
      wr_en   = ($urandom_range(99) < 60);
      inv_en  = ($urandom_range(99) < ((n / 500) % 2 == 0 ? 20 : 50));
      wr_idx  = 4'($urandom_range(E-1));
      inv_idx = 4'($urandom_range(E-1));
      wr_addr = rnd_addr();
      rd_idx  = 4'($urandom_range(E-1));
      a_addr  = ($urandom_range(1) == 1 && rv[rd_idx]) ? rt[rd_idx] : rnd_addr();
      b_addr  = rnd_addr();
      #1;
      ef = -1;
      for (int i = 0; i < E; i++) begin
        ea[i] = rv[i] && rt[i] == a_addr;
        eb[i] = rv[i] && rt[i].row == b_addr.row && rt[i].bank == b_addr.bank;
        if (!rv[i] && ef < 0) ef = i;
      end
      check(a_addr_match == ea, "address match");
      check(b_row_match == eb, "row match");
      check(full == (ef < 0), "full");
      if (ef >= 0) check(int'(free_idx) == ef, "free index");
      if (rv[rd_idx]) check(rd_tag == rt[rd_idx], "tag read");
      n_amatch += 32'(|ea); n_rmatch += 32'(|eb); n_full += 32'(ef < 0);
      @(posedge clk);
      if (inv_en) rv[inv_idx] = 0;
      if (wr_en) begin rv[wr_idx] = 1; rt[wr_idx] = wr_addr; end
    end
    check(n_amatch > 100 && n_rmatch > 100 && n_full > 0, "coverage");
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
