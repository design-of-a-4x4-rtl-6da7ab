// tb_mux_ctrl: runs the multiplexing controller of outgoing link 1 at its
// default size (256 VCs, 12-bit weights) against a behavioural model of the
// rest of the chip: an output link that sends 54-clock frames, a central
// controller that gives the selection timeout at frame clock 40 and
// performs the reserved read two memory cycles later, upstream chips that
// return a cell soon after each permit, and input buffers that offer cells
// for cut-through. Phases and checks:
//   A  four always-ready class-3 VCs of weights 2048, 2048, 1024, 1024: the
//      heavy ones are served twice as often; every selection reads the VC's
//      own buffer row and sends the permit to the VC's upstream link and VC;
//   B  a class-1 VC that becomes ready is served at the next selection;
//   C  a stopped VC is never served; its permit token makes it ready and
//      selects it at once (special access);
//   D  a class-0 cell arriving on input 2 for an empty, enabled VC is cut
//      through (ct_claim, ct_arm, ct_in), overtaking the class-3 backlog;
//   E  on an idle link a stored cell is read immediately (imm_req/imm_gnt)
//      with no timeout.
module tb_mux_ctrl;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic mem_en = 1'b0;
  always @(posedge clk) mem_en <= rst_n ? !mem_en : 1'b0;

  logic su_en = 0, su_valid = 0, fs_en = 0, tk_valid = 0, chk_full;
  vc_t  su_vc = 0, su_src_vc = 0, fs_vc = 0, chk_vc = 0, tk_vc = 0;
  logic [3:0] su_cls = 0;
  logic [11:0] su_weight = 0;
  link_t su_src_link = 0;
  logic [5:0] fs_addr = 0;
  logic [NLINK-1:0] arr_valid = 0, ct_claim;
  vc_t  arr_vc [NLINK];
  logic out_idle, frame_start, timeout, imm_req, imm_gnt, pend_rd, rd_done, ct_arm, pm_valid;
  row_t imm_row, pend_row;
  link_t ct_in, pm_link;
  vc_t  pm_vc;
  logic [15:0] cnt_sel_scan, cnt_sel_special, cnt_sterile, cnt_scan_end;

  mux_ctrl #(.LINK(2'd1)) dut (
    .clk, .rst_n, .mem_en, .su_en, .su_vc, .su_valid, .su_cls, .su_weight, .su_src_link,
    .su_src_vc, .fs_en, .fs_vc, .fs_addr, .chk_vc, .chk_full, .tk_valid, .tk_vc, .arr_valid,
    .arr_vc, .out_idle, .frame_start, .timeout, .imm_req, .imm_row, .imm_gnt, .pend_rd,
    .pend_row, .rd_done, .ct_claim, .ct_arm, .ct_in, .pm_valid, .pm_link, .pm_vc,
    .cnt_sel_scan, .cnt_sel_special, .cnt_sterile, .cnt_scan_end);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- link model
  bit  link_on = 1;      // frames keep coming (busy link) when set
  bit  busy = 0, nxt = 0;
  int  f = 0;
  int  rd_wait = -1;
  assign out_idle    = !busy && !nxt;
  assign frame_start = busy && f == 0;
  assign timeout     = busy && f >= 40 && f <= 41 && mem_en;
  assign rd_done     = rd_wait == 0 && mem_en;
  assign imm_gnt     = imm_req && mem_en;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_wait > 0 && mem_en) rd_wait <= rd_wait - 1;
      if (rd_done) begin rd_wait <= -1; nxt <= 1; end
      if (imm_gnt || ct_arm) nxt <= 1;
      if (pend_rd && rd_wait < 0 && !rd_done) rd_wait <= 2;
      if (busy && f < FRAME - 1) f <= f + 1;
      else if (busy || nxt || imm_gnt || ct_arm) begin
        if (nxt || (link_on && filler)) begin
          busy <= 1;
          f <= 0;
          nxt <= 0;
        end else busy <= 0;
      end
    end
  end
  bit filler = 1;   // an unchecked cell keeps a busy link busy

  // ---------------------------------------------------------- VC model
  typedef struct { int src_l; int src_v; bit refill; } vcm_t;
  vcm_t vm [NVC];
  int served [NVC];
  int order [$];
  int last_sel = -1;
  bit phase_e = 0;
  longint last_sel_t = 0;
  bit  last_ct = 0;
  int  last_ct_in = 0;
  int  refill_tk [$], refill_fs [$];
  longint refill_at [$];

  // every final selection: permit and buffer row
  always @(posedge clk) begin
    if (rst_n && pm_valid) begin
      automatic int v = int'(pm_vc) - 100;
      check(v >= 0 && vm[v].src_v == int'(pm_vc) && vm[v].src_l == int'(pm_link),
            $sformatf("permit to link %0d vc %0d", pm_link, pm_vc));
      if (v >= 0) begin
        served[v]++;
        order.push_back(v);
        last_sel = v;
        last_sel_t = cyc;
        last_ct = ct_arm;
        last_ct_in = int'(ct_in);
        if (ct_arm) check(ct_claim == 4'(1 << ct_in), "claim goes to the arm input");
        if (vm[v].refill) begin
          refill_tk.push_back(v);
          refill_at.push_back(cyc + 12);
        end
      end
    end
    if (rst_n && pend_rd && rd_wait < 0 && !rd_done && last_sel >= 0)
      check(pend_row == ded_row(2'd1, vc_t'(last_sel)), "reserved read of the VC's own row");
    if (rst_n && imm_req && phase_e)
      check(imm_row == ded_row(2'd1, vc_t'(21)), "immediate read row");
  end

  // upstream: permit -> new cell stored soon after
  initial begin
    forever begin
      @(negedge clk);
      tk_valid = 0;
      fs_en = 0;
      if (refill_at.size() > 0 && cyc >= refill_at[0]) begin
        automatic int v = refill_tk.pop_front();
        void'(refill_at.pop_front());
        tk_valid = 1; tk_vc = vc_t'(v);
        refill_fs.push_back(v);
      end else if (refill_fs.size() > 0) begin
        fs_en = 1; fs_vc = vc_t'(refill_fs.pop_front()); fs_addr = 0;
      end
    end
  end

  task automatic setup(int v, int cls, int w, bit refill);
    @(negedge clk);
    while (tk_valid || fs_en) @(negedge clk);
    #1;
    vm[v].src_l = v % 4;
    vm[v].src_v = v + 100;
    vm[v].refill = refill;
    su_en = 1; su_vc = vc_t'(v); su_valid = 1; su_cls = 4'(1 << cls); su_weight = 12'(w);
    su_src_link = link_t'(v % 4); su_src_vc = vc_t'(v + 100);
    @(negedge clk);
    su_en = 0;
  endtask

  // mark a VC full (cell stored) from the test thread, between refills
  task automatic store(int v);
    @(negedge clk);
    #1;
    while (tk_valid || fs_en) begin @(negedge clk); #1; end
    fs_en = 1; fs_vc = vc_t'(v); fs_addr = 0;
    @(negedge clk);
    #1;
    fs_en = 0;
  endtask
  task automatic token(int v);
    @(negedge clk);
    #1;
    while (tk_valid || fs_en) begin @(negedge clk); #1; end
    tk_valid = 1; tk_vc = vc_t'(v);
    @(negedge clk);
    #1;
    tk_valid = 0;
  endtask

  initial begin
    int n0, n0_20;
    for (int i = 0; i < NVC; i++) begin
      vm[i] = '{0, 0, 0};
      served[i] = 0;
    end
    foreach (arr_vc[i]) arr_vc[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // A: weighted round robin
    setup(10, 3, 2048, 1);
    setup(11, 3, 2048, 1);
    setup(12, 3, 1024, 1);
    setup(13, 3, 1024, 1);
    for (int v = 10; v < 14; v++) store(v);
    repeat (FRAME * 600) @(posedge clk);
    begin
      automatic int h = served[10] + served[11];
      automatic int l = served[12] + served[13];
      $display("A: weight 2048: %0d, weight 1024: %0d", h, l);
      check(l > 0 && real'(h) / real'(l) > 1.8 && real'(h) / real'(l) < 2.2, "service ratio 2:1");
      check(h + l > 580, "one cell per frame");
    end

    // B: class 1 overtakes class 3
    setup(20, 1, 1, 0);
    store(20);
    n0 = served[20];
    repeat (FRAME * 2 + 10) @(posedge clk);
    check(served[20] == n0 + 1, "class-1 VC served within two frames");

    // C: VC 20 is now stopped; a stored cell waits for its permit
    store(20);
    repeat (FRAME * 10) @(posedge clk);
    check(served[20] == n0 + 1, "stopped VC not served");
    n0_20 = n0;
    n0 = int'(cnt_sel_special);
    token(20);
    repeat (FRAME * 2 + 10) @(posedge clk);
    check(served[20] == n0_20 + 2, "token releases the stopped VC");
    check(int'(cnt_sel_special) > n0, "token handled as a special access");

    // D: class-0 cut-through from input 2
    setup(30, 0, 1, 0);
    @(negedge clk);
    arr_valid = 4'b0100;
    arr_vc[2] = 30;
    while (!(ct_arm && ct_claim[2])) @(posedge clk);
    check(ct_in == 2'd2 && pm_vc == vc_t'(130), "cut-through claim of input 2 for VC 30");
    @(negedge clk);
    arr_valid = 0;

    // E: idle link
    for (int v = 10; v < 14; v++) vm[v].refill = 0;
    filler = 0;
    repeat (FRAME * 12) @(posedge clk);
    check(out_idle, "link idle once the sources stop");
    phase_e = 1;
    setup(21, 2, 4095, 0);
    store(21);
    n0 = served[21];
    repeat (40) @(posedge clk);
    check(served[21] == n0 + 1, "idle link reads a stored cell at once");

    check(cnt_sel_scan > 0 && cnt_scan_end > 0 && cnt_sterile > 0, "scan, scan end and sterile positions counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
