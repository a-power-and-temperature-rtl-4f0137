// tb_pha_wb_sizes: runs the same streaming traffic through PHA-WBs of 16, 32
// and 64 entries (the three configurations evaluated for the design) and
// checks, for each, that all read data is correct and that the DRAM page hit
// rate with the buffer is higher than the page hit rate the same requests
// would have without it. The hit rates are printed for comparison.
module tb_pha_wb_sizes;
  localparam int NS = 3;
  localparam int SIZES [NS] = '{16, 32, 64};

  logic        done [NS];
  int unsigned c [NS], f [NS], hw [NS], hwo [NS], acc [NS];

  for (genvar i = 0; i < NS; i++) begin : g_run
    pha_wb_stream_run #(.ENTRIES(SIZES[i]), .N_OPS(4000), .SEED(7)) u_run (
      .done (done[i]), .checks (c[i]), .failures (f[i]),
      .hits_with (hw[i]), .hits_without (hwo[i]), .accesses (acc[i])
    );
  end

  int unsigned checks = 0, failures = 0;

  initial begin
    bit all;
    do begin
      #100;
      all = 1;
      for (int i = 0; i < NS; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NS; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (hw[i] <= hwo[i]) failures++;
      $display("%0d entries: page hit rate %0.1f%% with the buffer, %0.1f%% without (%0d requests)",
               SIZES[i], 100.0 * real'(hw[i]) / real'(acc[i]), 100.0 * real'(hwo[i]) / real'(acc[i]), acc[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
