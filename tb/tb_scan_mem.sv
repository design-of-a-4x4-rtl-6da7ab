// tb_scan_mem: exercises the 256-entry scanning memory with random VC
// set-ups, cells stored (full), permit tokens (enable), final selections
// (visited, not full, stopped) and class-wide unvisited resets, one per
// clock, and after each checks every read path against a model: the
// content-addressable match for a random class and label position (ready,
// unvisited, class bit, weight bit for that position; lowest VC wins), the
// wired-OR of ready classes, the random-access read ports and the selection
// read port. Weight bit 11 (value 2048) must meet label position 0, weight
// bit 0 position 11.
module tb_scan_mem;
  import atm_pkg::*;
  localparam int N = 256, WW = 12, NRD = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic su_en, su_valid, fs_en, tk_en, fm_en, cr_en, m_any;
  vc_t  su_vc, fs_vc, tk_vc, fm_vc, m_idx, sel_vc, su_src_vc, sel_src_vc;
  logic [3:0] su_cls, cr_cls, q_cls, rdy_cls;
  logic [WW-1:0] su_weight, q_pos;
  link_t su_src_link, sel_src_link;
  logic [5:0] fs_addr, sel_addr;
  vc_t  rp_vc [NRD];
  logic rp_valid [NRD], rp_en [NRD], rp_full [NRD];
  logic [3:0] rp_cls [NRD];

  // model
  bit        m_valid [N], m_en [N], m_full [N], m_unv [N];
  logic [3:0] m_cls [N];
  logic [WW-1:0] m_w [N];
  link_t     m_sl [N];
  vc_t       m_sv [N];
  logic [5:0] m_addr [N];
  int checks = 0, failures = 0, hits = 0;

  scan_mem #(.N(N), .WW(WW), .NRD(NRD)) dut (
    .clk, .rst_n, .su_en, .su_vc, .su_valid, .su_cls, .su_weight, .su_src_link, .su_src_vc,
    .fs_en, .fs_vc, .fs_addr, .tk_en, .tk_vc, .fm_en, .fm_vc, .cr_en, .cr_cls,
    .q_cls, .q_pos, .m_any, .m_idx, .rdy_cls, .rp_vc, .rp_valid, .rp_en, .rp_full, .rp_cls,
    .sel_vc, .sel_src_link, .sel_src_vc, .sel_addr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    su_en = 0; fs_en = 0; tk_en = 0; fm_en = 0; cr_en = 0;
  endtask

  initial begin
    idle();
    su_vc = 0; su_valid = 0; su_cls = 0; su_weight = 0; su_src_link = 0; su_src_vc = 0;
    fs_vc = 0; fs_addr = 0; tk_vc = 0; fm_vc = 0; cr_cls = 0; q_cls = 1; q_pos = 1; sel_vc = 0;
    foreach (rp_vc[r]) rp_vc[r] = 0;
    for (int i = 0; i < N; i++) begin
      m_valid[i] = 0; m_en[i] = 0; m_full[i] = 0; m_unv[i] = 0;
      m_cls[i] = 0; m_w[i] = 0; m_sl[i] = 0; m_sv[i] = 0; m_addr[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // open 40 VCs in a window so that matches are frequent
    for (int t = 0; t < 30000; t++) begin
      int op;
      vc_t v;
      @(negedge clk);
      idle();
      op = $urandom_range(9);
      v  = vc_t'($urandom_range(39) * 6);
      case (op)
        0: begin
          su_en = 1; su_vc = v; su_valid = $urandom_range(5) != 0;
          su_cls = 4'(1 << $urandom_range(3));
          su_weight = 12'(1 << $urandom_range(11)) | (($urandom_range(1)) ? 12'($urandom) : 12'd0);
          su_src_link = link_t'($urandom); su_src_vc = vc_t'($urandom);
        end
        1, 2: begin fs_en = 1; fs_vc = v; fs_addr = 6'($urandom); end
        3, 4: begin tk_en = 1; tk_vc = v; end
        5, 6: begin fm_en = 1; fm_vc = (m_any && $urandom_range(1)) ? m_idx : v; end
        7: begin cr_en = 1; cr_cls = 4'(1 << $urandom_range(3)); end
        default: ;
      endcase
      @(posedge clk);
      #1;
      // model update
      if (cr_en) for (int i = 0; i < N; i++) if (|(m_cls[i] & cr_cls)) m_unv[i] = 1;
      if (fm_en) begin m_unv[fm_vc] = 0; m_full[fm_vc] = 0; m_en[fm_vc] = 0; end
      if (tk_en) m_en[tk_vc] = 1;
      if (fs_en) begin m_full[fs_vc] = 1; m_addr[fs_vc] = fs_addr; end
      if (su_en) begin
        m_valid[su_vc] = su_valid; m_en[su_vc] = 1; m_full[su_vc] = 0; m_unv[su_vc] = 1;
        m_cls[su_vc] = su_cls; m_w[su_vc] = su_weight; m_sl[su_vc] = su_src_link; m_sv[su_vc] = su_src_vc;
      end
      idle();
      // queries
      for (int qn = 0; qn < 4; qn++) begin
        automatic int p = $urandom_range(WW - 1);
        automatic int exp_idx = -1;
        automatic logic [3:0] exp_rdy = 0;
        q_cls = 4'(1 << $urandom_range(3));
        q_pos = WW'(1 << p);
        foreach (rp_vc[r]) rp_vc[r] = vc_t'($urandom_range(39) * 6);
        sel_vc = vc_t'($urandom_range(39) * 6);
        #1;
        for (int i = N - 1; i >= 0; i--) begin
          automatic bit rdy = m_valid[i] && m_en[i] && m_full[i];
          if (rdy) exp_rdy |= m_cls[i];
          if (rdy && m_unv[i] && |(m_cls[i] & q_cls) && m_w[i][WW - 1 - p]) exp_idx = i;
        end
        check(m_any == (exp_idx >= 0) && (exp_idx < 0 || m_idx == vc_t'(exp_idx)),
              $sformatf("match: any %b idx %0d, expected %0d", m_any, m_idx, exp_idx));
        if (exp_idx >= 0) hits++;
        check(rdy_cls == exp_rdy, "ready classes");
        foreach (rp_vc[r])
          check(rp_valid[r] == m_valid[rp_vc[r]] && rp_en[r] == m_en[rp_vc[r]] &&
                rp_full[r] == m_full[rp_vc[r]] && (!m_valid[rp_vc[r]] || rp_cls[r] == m_cls[rp_vc[r]]),
                "read port");
        if (m_valid[sel_vc] || m_sv[sel_vc] != 0)
          check(sel_src_link == m_sl[sel_vc] && sel_src_vc == m_sv[sel_vc], "selection read port");
        if (m_full[sel_vc]) check(sel_addr == m_addr[sel_vc], "shared row read");
      end
    end
    check(hits > 1000, $sformatf("%0d matches seen", hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
