// tb_shared_free_list: random allocations and releases on the 64-row shared
// pool free list, checked every clock against a flag-array model: the
// encoder must name the lowest free row, any_free must drop exactly when all
// 64 rows are in use, and n_used must count them. The run fills the pool
// completely at least once.
module tb_shared_free_list;
  localparam int N = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic       any_free, alloc, release_en;
  logic [5:0] free_idx, rel_idx;
  logic [6:0] n_used;
  bit   used_m [N];
  int   checks = 0, failures = 0, fulls = 0;

  shared_free_list #(.N(N)) dut (.clk, .rst_n, .any_free, .free_idx, .alloc,
                                 .release_en, .rel_idx, .n_used);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = 0; release_en = 0; rel_idx = 0;
    foreach (used_m[i]) used_m[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int lo, cnt;
      int relp;
      @(negedge clk);
      lo = -1; cnt = 0;
      for (int i = N - 1; i >= 0; i--) if (!used_m[i]) lo = i;
      foreach (used_m[i]) cnt += used_m[i];
      check(any_free == (lo >= 0), "any_free");
      if (lo >= 0) check(free_idx == 6'(lo), $sformatf("free_idx %0d expected %0d", free_idx, lo));
      check(n_used == 7'(cnt), "n_used");
      if (cnt == N) fulls++;
      // phases: mostly fill, then mostly drain
      relp = ((t / 700) % 2 == 0) ? 25 : 75;
      alloc      = $urandom_range(99) >= 100 - (100 - relp);
      release_en = 0;
      if ($urandom_range(99) < relp && cnt > 0) begin
        int r;
        do r = $urandom_range(N - 1); while (!used_m[r]);
        release_en = 1;
        rel_idx    = 6'(r);
      end
      @(posedge clk);
      #1;
      if (release_en) used_m[rel_idx] = 0;
      if (alloc && lo >= 0) used_m[lo] = 1;
    end
    check(fulls > 0, "pool filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
