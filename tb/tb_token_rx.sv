// tb_token_rx: serialises random permit tokens (start bit, 8 VC bits MSB
// first) onto the flow-control bit, back to back or with random gaps, and
// checks that each is decoded once, with the right VC, in the clock after
// its last bit.
module tb_token_rx;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic        fc_in, tk_valid;
  vc_t         tk_vc;
  logic [15:0] cnt_tokens;
  int checks = 0, failures = 0;
  int exp_q [$];
  longint cyc = 0, last_bit [$];

  token_rx dut (.clk, .rst_n, .fc_in, .tk_valid, .tk_vc, .cnt_tokens);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && tk_valid) begin
      checks++;
      if (exp_q.size() == 0 || tk_vc != vc_t'(exp_q[0]) || cyc != last_bit[0] + 1) begin
        failures++;
        if (failures < 10) $display("FAIL @%0d: token %0d", cyc, tk_vc);
      end
      if (exp_q.size() > 0) begin
        void'(exp_q.pop_front());
        void'(last_bit.pop_front());
      end
    end
  end

  initial begin
    automatic int n = 0;
    fc_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic vc_t v = vc_t'($urandom);
      automatic logic [8:0] w = {1'b1, v};
      exp_q.push_back(int'(v));
      for (int b = 8; b >= 0; b--) begin
        @(negedge clk);
        fc_in = w[b];
        if (b == 0) last_bit.push_back(cyc);
      end
      n++;
      @(negedge clk);
      fc_in = 0;
      if ($urandom_range(1)) repeat ($urandom_range(20)) @(negedge clk);
      else @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || cnt_tokens != 16'(n)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
