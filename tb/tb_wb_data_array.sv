// tb_wb_data_array: self-checking test of the Write Buffer data array
// (32 entries of 512 bits). Random writes are mirrored in a reference array;
// both asynchronous read ports are checked every cycle, including a read of
// the word being written, which must return the old contents.
module tb_wb_data_array;
  localparam int E = 32, DW = 512;

  logic clk = 1'b0;
  logic wr_en;
  logic [4:0] wr_idx, a_idx, b_idx;
  logic [DW-1:0] wr_data, a_data, b_data;

  always #5 clk = ~clk;

  wb_data_array #(.ENTRIES(E), .DATA_W(DW)) dut (.*);

  logic [DW-1:0] rm [E];
  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_en = 0; wr_idx = 0; a_idx = 0; b_idx = 0; wr_data = '0;
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(i);
      for (int w = 0; w < DW / 32; w++) wr_data[w*32 +: 32] = $urandom;
      rm[i] = wr_data;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(1) == 0);
      wr_idx = 5'($urandom_range(E-1));
      for (int w = 0; w < DW / 32; w++) wr_data[w*32 +: 32] = $urandom;
      a_idx = ($urandom_range(3) == 0) ? wr_idx : 5'($urandom_range(E-1));
      b_idx = 5'($urandom_range(E-1));
      #1;
      check(a_data == rm[a_idx], "port A");
      check(b_data == rm[b_idx], "port B");
      @(posedge clk);
      if (wr_en) rm[wr_idx] = wr_data;
    end
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
