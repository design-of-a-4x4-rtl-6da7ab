// tb_routing_table: writes random entries into the 256-entry routing table
// and reads them back, comparing with a model array. Checks that every entry
// is closed after reset, that a read returns the entry two clocks after the
// request, and that reads and writes to other entries interleave freely.
module tb_routing_table;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic      rd_en, wr_en;
  vc_t       rd_vc, wr_vc;
  rt_entry_t rd_data, wr_data;
  rt_entry_t model [NVC];
  bit        written [NVC];
  int checks = 0, failures = 0;

  routing_table dut (.clk, .rst_n, .rd_en, .rd_vc, .rd_data, .wr_en, .wr_vc, .wr_data);

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reads issued at clock t are compared at clock t+2
  vc_t pipe_vc [2];
  bit  pipe_v  [2];
  always @(posedge clk) begin
    if (rst_n && pipe_v[1]) begin
      automatic rt_entry_t e = model[pipe_vc[1]];
      checks++;
      if (rd_data.valid !== e.valid ||
          (e.valid && (rd_data.new_vc !== e.new_vc || rd_data.out_link !== e.out_link))) begin
        failures++;
        if (failures < 10) $display("FAIL vc %0d: got %p expected %p", pipe_vc[1], rd_data, e);
      end
    end
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_vc = 0; wr_vc = 0; wr_data = '0;
    pipe_v = '{0, 0}; pipe_vc = '{0, 0};
    foreach (model[i]) begin
      model[i] = '0;
      written[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // after reset all VCs are closed
    for (int i = 0; i < NVC + 2; i++) begin
      @(negedge clk);
      rd_en = i < NVC;
      rd_vc = vc_t'(i);
      @(posedge clk);
      #1;
      pipe_v[1] = pipe_v[0]; pipe_vc[1] = pipe_vc[0];
      pipe_v[0] = rd_en;     pipe_vc[0] = rd_vc;
    end
    // random traffic
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      rd_en = $urandom_range(1);
      rd_vc = vc_t'($urandom);
      wr_en = $urandom_range(2) == 0;
      do wr_vc = vc_t'($urandom); while (wr_en && (wr_vc == rd_vc || wr_vc == pipe_vc[0]));
      wr_data = '{valid: $urandom_range(3) != 0, new_vc: vc_t'($urandom), out_link: link_t'($urandom)};
      @(posedge clk);
      #1;
      if (wr_en) model[wr_vc] = wr_data;
      pipe_v[1] = pipe_v[0]; pipe_vc[1] = pipe_vc[0];
      pipe_v[0] = rd_en;     pipe_vc[0] = rd_vc;
    end
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
