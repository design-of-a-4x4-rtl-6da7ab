// tb_link_port: two link ports back to back (one's pins drive the other's)
// carry random link words, one per clock over five pins on both clock
// edges. Checks that every word arrives intact exactly two clocks after it
// was presented, and that the receiver shows a delimiter word after reset.
module tb_link_port;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  link_word_t a_tx, b_tx, a_rx, b_rx;
  logic [4:0] a2b, b2a;
  int checks = 0, failures = 0;
  link_word_t sent_a [$], sent_b [$];

  link_port u_a (.clk, .rst_n, .tx_word(a_tx), .tx_pins(a2b), .rx_pins(b2a), .rx_word(a_rx));
  link_port u_b (.clk, .rst_n, .tx_word(b_tx), .tx_pins(b2a), .rx_pins(a2b), .rx_word(b_rx));

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_tx = '{sig: 1'b1, data: DELIM_BYTE, fc: 1'b0};
    b_tx = a_tx;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (a_rx != a_tx || b_rx != b_tx) failures++;
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      a_tx = link_word_t'($urandom);
      b_tx = link_word_t'($urandom);
      sent_a.push_back(a_tx);
      sent_b.push_back(b_tx);
      // word presented at clock t is on rx_word after the edge of clock t+1
      if (sent_a.size() > 2) begin
        automatic link_word_t ea = sent_a.pop_front();
        automatic link_word_t eb = sent_b.pop_front();
        checks += 2;
        if (b_rx != ea) begin
          failures++;
          if (failures < 10) $display("FAIL a->b %h expected %h", b_rx, ea);
        end
        if (a_rx != eb) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
