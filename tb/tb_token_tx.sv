// tb_token_tx: pushes permits from up to four outgoing-link controllers at
// once into the token sender of one link and decodes its flow-control bit
// (start bit, then 8 VC bits, MSB first). Checks that the tokens come out in
// order (pushes of the same clock in port order), back to back: 9 clocks
// per token when the queue holds more, i.e. 6 tokens per 54-clock cell time;
// and that pushes into a full queue are counted as lost.
module tb_token_tx;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic [3:0]  push;
  vc_t         push_vc [4];
  logic        fc_out;
  logic [15:0] cnt_sent, cnt_lost;
  int checks = 0, failures = 0;
  int exp_q [$];
  int skipped = 0;
  int nrx = 0;
  longint cyc = 0;
  longint starts [$];

  token_tx #(.DEPTH(8), .NP(4)) dut (.clk, .rst_n, .push, .push_vc, .fc_out, .cnt_sent, .cnt_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  int bits = 0;
  logic [7:0] sh;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (bits == 0) begin
        if (fc_out) begin
          bits = 8;
          starts.push_back(cyc);
        end
      end else begin
        sh = {sh[6:0], fc_out};
        bits--;
        if (bits == 0) begin
          nrx++;
          while (exp_q.size() > 0 && exp_q[0] != int'(sh)) begin
            void'(exp_q.pop_front());
            skipped++;
          end
          check(exp_q.size() > 0, $sformatf("token vc %0d not expected here", sh));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
        end
      end
    end
  end

  initial begin
    push = '0;
    foreach (push_vc[i]) push_vc[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // burst: 4 pushes per clock for 3 clocks -> 12 pushed, queue of 8
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        push[i] = 1;
        push_vc[i] = vc_t'(16 * t + i + 1);
      end
    end
    @(negedge clk);
    push = '0;
    repeat (200) @(posedge clk);
    check(cnt_lost > 0, "overflowing pushes counted as lost");
    check(int'(cnt_sent) + int'(cnt_lost) == 12, "every push sent or lost");
    // back-to-back spacing inside the burst
    for (int i = 1; i < starts.size(); i++)
      check(starts[i] - starts[i-1] == 9, $sformatf("token spacing %0d", starts[i] - starts[i-1]));
    // random pushes at a sustainable rate
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      push = '0;
      if ($urandom_range(19) == 0) begin
        automatic int i = $urandom_range(3);
        push[i] = 1;
        push_vc[i] = vc_t'($urandom);
      end
    end
    @(negedge clk);
    push = '0;
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "all tokens received");
    check(int'(cnt_lost) == skipped, $sformatf("lost %0d, missing from the stream %0d", cnt_lost, skipped));
    check(cnt_sent == 16'(nrx), "cnt_sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every push is expected; one lost to a full queue is skipped over
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < 4; i++)
        if (push[i]) exp_q.push_back(int'(push_vc[i]));
endmodule
