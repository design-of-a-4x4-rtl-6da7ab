// tb_cfg_ctrl: presents node-ID, VC set-up and other cells to the
// configuration controller from one or several input links at once. Checks
// that the lowest requesting link is served, that the node ID is loaded by
// a node-ID cell, that a set-up cell writes the routing table of its InLink
// and the scanning memory of its OutLink with the fields of the set-up
// layout (bytes 2-3 node ID, 4 open, 5 class, 6 VCinit, 7 VCtrans, 8 InLink,
// 9 OutLink, 10-11 weight, weight 0 read as 1) only when the node ID
// matches, and that the applied and ignored cells are counted.
module tb_cfg_ctrl;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic [NLINK-1:0] cfg_req, cfg_ack, rt_wr_en, su_en;
  cell_type_e       cfg_type [NLINK];
  cell_t            cfg_cell [NLINK];
  vc_t              rt_wr_vc, su_vc, su_src_vc;
  rt_entry_t        rt_wr_data;
  logic             su_valid, node_valid;
  logic [3:0]       su_cls;
  logic [11:0]      su_weight;
  link_t            su_src_link;
  logic [15:0]      node_id, cnt_setup, cnt_ignored;
  int checks = 0, failures = 0;
  logic [15:0] my_id;
  bit   id_ok;
  int   n_set = 0, n_ign = 0;

  cfg_ctrl dut (.clk, .rst_n, .cfg_req, .cfg_type, .cfg_cell, .cfg_ack, .rt_wr_en, .rt_wr_vc,
                .rt_wr_data, .su_en, .su_vc, .su_valid, .su_cls, .su_weight, .su_src_link,
                .su_src_vc, .node_valid, .node_id, .cnt_setup, .cnt_ignored);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_t rnd_cell(cell_type_e t, logic [15:0] id);
    cell_t c;
    for (int i = 0; i < CELL_BYTES; i++) c[8*i +: 8] = 8'($urandom);
    c[15:8]  = {t, 6'($urandom)};
    c[23:16] = id[15:8];
    c[31:24] = id[7:0];
    if ($urandom_range(3) == 0) begin
      c[87:80] = '0;
      c[95:88] = '0;
    end
    return c;
  endfunction

  initial begin
    cfg_req = '0;
    foreach (cfg_type[i]) begin
      cfg_type[i] = CT_NORMAL;
      cfg_cell[i] = '0;
    end
    my_id = 16'h0;
    id_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int ci;
      cell_t c;
      @(negedge clk);
      cfg_req = 4'($urandom);
      foreach (cfg_type[i]) begin
        automatic int k = $urandom_range(9);
        automatic cell_type_e ty = (k < 1) ? CT_NODEID : (k < 8) ? CT_VCSETUP : CT_SIGNAL;
        automatic logic [15:0] id = ($urandom_range(4) == 0) ? 16'($urandom) : my_id;
        cfg_type[i] = ty;
        cfg_cell[i] = rnd_cell(ty, id);
      end
      #1;
      ci = -1;
      for (int i = NLINK - 1; i >= 0; i--) if (cfg_req[i]) ci = i;
      check(cfg_ack == ((ci >= 0) ? 4'(1 << ci) : 4'd0), "ack goes to the lowest requester");
      if (ci >= 0) begin
        bit app;
        c = cfg_cell[ci];
        app = cfg_type[ci] == CT_VCSETUP && id_ok && {c[23:16], c[31:24]} == my_id;
        check(rt_wr_en == (app ? 4'(1 << c[65:64]) : 4'd0), "routing table write enable");
        check(su_en == (app ? 4'(1 << c[73:72]) : 4'd0), "scanning memory write enable");
        if (app) begin
          automatic logic [11:0] w = {c[83:80], c[95:88]};
          check(rt_wr_vc == c[55:48] && rt_wr_data.valid == c[32] &&
                rt_wr_data.new_vc == c[63:56] && rt_wr_data.out_link == c[73:72], "routing entry");
          check(su_vc == c[63:56] && su_valid == c[32] && su_cls == 4'(1 << c[41:40]) &&
                su_weight == ((w == 0) ? 12'd1 : w) && su_src_link == c[65:64] &&
                su_src_vc == c[55:48], "scanning memory entry");
          n_set++;
        end else if (cfg_type[ci] != CT_NODEID) begin
          n_ign++;
        end
        @(posedge clk);
        #1;
        if (cfg_type[ci] == CT_NODEID) begin
          my_id = {c[23:16], c[31:24]};
          id_ok = 1;
        end
        check(node_valid == id_ok && (!id_ok || node_id == my_id), "node ID register");
        check(cnt_setup == 16'(n_set) && cnt_ignored == 16'(n_ign), "counters");
      end
    end
    check(n_set > 100 && n_ign > 100, "both applied and ignored cells seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
