// tb_cycle_counter: checks the label counter's next-label logic at its
// default 12-bit width against a reference written as a plain search: the
// next label is the first label after the current one (1 follows 4095)
// whose rightmost 1 sits in a position not marked sterile. Also checks the
// one-hot position output. Masks are random (any pattern), plus the empty
// mask and the masks made of a run of low positions, which the multiplexing
// controller produces most.
module tb_cycle_counter;
  localparam int W = 12;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic [W-1:0] cnt, mask, next_cnt, pos;
  int checks = 0, failures = 0;

  cycle_counter #(.W(W)) dut (.cnt, .mask, .next_cnt, .pos);

  function automatic int pos_of(int c);
    for (int i = 0; i < W; i++) if (c[i]) return i;
    return -1;
  endfunction

  function automatic int ref_next(int c, logic [W-1:0] m);
    if (&m) return c;                       // nothing left to visit: hold
    for (int n = 0; n < (1 << W); n++) begin
      c = (c == (1 << W) - 1) ? 1 : c + 1;
      if (!m[pos_of(c)]) return c;
    end
    return -1;
  endfunction

  task automatic try(int c, logic [W-1:0] m);
    int e;
    cnt  = W'(c);
    mask = m;
    #1;
    e = ref_next(c, m);
    checks++;
    if (next_cnt !== W'(e) || pos !== W'(1 << pos_of(c))) begin
      failures++;
      if (failures < 10)
        $display("FAIL cnt=%0d mask=%b: next %0d (expected %0d) pos %b", c, m, next_cnt, e, pos);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = 1;
    mask = '0;
    // no sterile position: plain +1 with wrap 4095 -> 1
    for (int c = 1; c < (1 << W); c++) try(c, '0);
    // low runs of sterile positions
    for (int k = 1; k < W; k++)
      for (int n = 0; n < 200; n++) try(1 + int'($urandom_range((1 << W) - 2)), W'((1 << k) - 1));
    // arbitrary masks
    for (int n = 0; n < 20000; n++)
      try(1 + int'($urandom_range((1 << W) - 2)), W'($urandom) & W'($urandom));
    // every position sterile: label holds
    try(77, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
