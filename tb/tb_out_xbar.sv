// tb_out_xbar: drives the link-output crossbar with random link states
// (busy, frame clock, cut-through flag and source input per outgoing link,
// each input claimed by at most one link) and random bytes, and checks its
// two jobs against a direct model: each input is told which byte of its
// cell the claiming link needs (frame clock minus one) and when the
// cut-through ends, and each link's registered output word carries the
// claimed input's byte during a cut-through frame and the output buffer's
// byte otherwise, one clock later.
module tb_out_xbar;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic [NLINK-1:0] busy, cur_ct, ob_ct_done, ob_sig, ct_done, tx_sig;
  logic [5:0]       f [NLINK], ct_idx [NLINK];
  link_t            cur_in [NLINK];
  logic [7:0]       ob_byte [NLINK], ct_byte [NLINK], tx_data [NLINK];
  logic [7:0]       exp_data [NLINK];
  logic [NLINK-1:0] exp_sig;
  int checks = 0, failures = 0;

  out_xbar dut (.clk, .rst_n, .busy, .f, .cur_ct, .cur_in, .ob_ct_done, .ob_sig, .ob_byte,
                .ct_byte, .ct_idx, .ct_done, .tx_sig, .tx_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
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
    busy = '0; cur_ct = '0; ob_ct_done = '0; ob_sig = '1;
    foreach (f[i]) begin
      f[i] = 0; cur_in[i] = 0; ob_byte[i] = 0; ct_byte[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int perm [NLINK];
      @(negedge clk);
      // a random one-to-one assignment of inputs to links
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int o = 0; o < NLINK; o++) begin
        busy[o]       = $urandom_range(3) != 0;
        f[o]          = 6'($urandom_range(FRAME - 1));
        cur_ct[o]     = busy[o] && $urandom_range(1);
        cur_in[o]     = link_t'(perm[o]);
        ob_sig[o]     = !busy[o] || f[o] == 0;
        ob_ct_done[o] = cur_ct[o] && f[o] == 6'(FRAME - 1);
        ob_byte[o]    = 8'($urandom);
        ct_byte[o]    = 8'($urandom);
      end
      #1;
      for (int i = 0; i < NLINK; i++) begin
        automatic int o = -1;
        for (int k = 0; k < NLINK; k++) if (busy[k] && cur_ct[k] && cur_in[k] == link_t'(i)) o = k;
        check(ct_idx[i] == ((o < 0 || f[o] == 0) ? 6'd0 : f[o] - 6'd1), "ct_idx");
        check(ct_done[i] == (o >= 0 && ob_ct_done[o]), "ct_done");
      end
      for (int o = 0; o < NLINK; o++) begin
        exp_sig[o]  = ob_sig[o];
        exp_data[o] = (busy[o] && cur_ct[o] && !ob_sig[o]) ? ct_byte[cur_in[o]] : ob_byte[o];
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < NLINK; o++)
        check(tx_sig[o] == exp_sig[o] && tx_data[o] == exp_data[o], $sformatf("link %0d word", o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
