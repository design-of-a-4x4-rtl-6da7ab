// tb_atm_switch: end-to-end test of the switch with its default parameters.
//
// Four peer chips, one per link, talk to the switch through their own
// link_port pin drivers. Each peer is the upstream chip of one incoming
// link (it sends cells of a VC only while it holds a permit for it) and the
// downstream chip of one outgoing link (it returns a permit for each cell it
// receives unless told to hold them). The test:
//   1. sets the node ID and opens VCs with set-up cells (and one set-up for
//      another node, which must be ignored), plus one truncated cell;
//   2. sends one cell to an idle link: it must be cut through (first byte out
//      less than a cell time after its first byte in) with its VC translated;
//      then a node-ID cell and a set-up cell on that open VC must be forwarded
//      unchanged instead of being applied;
//   3. holds the downstream permits of one link: a second cell must wait
//      until the permit comes back (back-pressure stall);
//   4. fills the 64-cell shared pool past capacity with held VCs: exactly the
//      overflow is lost, and all stored cells leave once permits return;
//   5. runs saturated weighted round-robin traffic on one link (weights
//      2:2:1:1, one class) with competing traffic on the others and a few
//      top-priority cells; checks the service ratio and that top-priority
//      cells overtake.
// Every received cell is checked against the cell sent (out link, new VC,
// payload). Each mechanism's counter must have moved at least once.
module tb_atm_switch;
  import atm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = !clk;

  logic [4:0] sw_rx_pins [NLINK], sw_tx_pins [NLINK];
  logic       node_valid;
  logic [15:0] node_id;
  logic [15:0] cells_in [NLINK], cells_out [NLINK];
  logic [6:0]  shared_used;
  logic [15:0] stats [NSTAT];

  atm_switch dut (
    .clk, .rst_n, .rx_pins(sw_rx_pins), .tx_pins(sw_tx_pins),
    .node_valid, .node_id, .cells_in, .cells_out, .shared_used, .stats
  );

  // ------------------------------------------------------------ peers' pins
  link_word_t peer_tx [NLINK], peer_rx [NLINK];
  for (genvar l = 0; l < NLINK; l++) begin : g_peer
    link_port u_pp (
      .clk, .rst_n, .tx_word(peer_tx[l]), .tx_pins(sw_rx_pins[l]),
      .rx_pins(sw_tx_pins[l]), .rx_word(peer_rx[l])
    );
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ cells
  function automatic cell_t mk_cell(vc_t vc, cell_type_e t, int seq);
    cell_t c;
    c[7:0]   = vc;
    c[15:8]  = {t, 6'd0};
    c[23:16] = seq[31:24];
    c[31:24] = seq[23:16];
    c[39:32] = seq[15:8];
    c[47:40] = seq[7:0];
    for (int k = 6; k < CELL_BYTES; k++) c[8*k +: 8] = 8'(seq * 7 + k * 13);
    return c;
  endfunction

  function automatic cell_t mk_setup(vc_t carrier, logic [15:0] node, bit open, int cls,
                                     vc_t vin, vc_t vout, int inl, int outl, int w);
    automatic cell_t c = mk_cell(carrier, CT_VCSETUP, 0);
    c[23:16] = node[15:8];
    c[31:24] = node[7:0];
    c[39:32] = {7'd0, open};
    c[47:40] = 8'(cls);
    c[55:48] = vin;
    c[63:56] = vout;
    c[71:64] = 8'(inl);
    c[79:72] = 8'(outl);
    c[87:80] = 8'(w >> 8);
    c[95:88] = 8'(w);
    return c;
  endfunction

  function automatic int seq_of(cell_t c);
    return {c[23:16], c[31:24], c[39:32], c[47:40]};
  endfunction

  // ------------------------------------------------------------ VC table
  typedef struct {
    int inl; vc_t vin; int outl; vc_t vout; int cls; int w;
    bit active;   // upstream keeps it backlogged
    int credit;   // permits held by the upstream peer
    int sent, rcvd;
  } vcd_t;
  vcd_t vcs [$];

  function automatic int find_vc_in(int inl, vc_t vin);
    foreach (vcs[i]) if (vcs[i].inl == inl && vcs[i].vin == vin) return i;
    return -1;
  endfunction
  function automatic int find_vc_out(int outl, vc_t vout);
    foreach (vcs[i]) if (vcs[i].outl == outl && vcs[i].vout == vout) return i;
    return -1;
  endfunction

  // expected cells by sequence number
  int     exp_vc   [int];
  cell_type_e exp_type [int];   // cell type of a sequence number, if not normal
  longint exp_t0   [int];   // clock its first byte left the peer
  longint rcv_lat  [int];   // first byte out minus first byte in
  int     seq_next = 1;
  int     n_rcvd = 0;

  // ------------------------------------------------------------ upstream side
  cell_t  txq [NLINK][$];     // explicit cells to send first
  int     rr_ptr [NLINK];
  bit     trunc_req [NLINK];
  int     tok_out_q [NLINK][$];   // permits the peer returns to the switch
  bit     auto_permit [NLINK];
  int     held_permits [NLINK][$];

  function automatic int pick_active(int l);
    automatic int n = vcs.size();
    for (int k = 0; k < n; k++) begin
      automatic int i = (rr_ptr[l] + k) % n;
      if (vcs[i].inl == l && vcs[i].active && vcs[i].credit > 0) begin
        rr_ptr[l] = i + 1;
        return i;
      end
    end
    return -1;
  endfunction

  // one driver per link: cells (delimiter + 53 bytes) and the permit bit stream
  for (genvar l = 0; l < NLINK; l++) begin : g_drv
    initial begin
      cell_t c;
      int    pos;        // byte position in frame, -1 = idle
      int    tk_bits;
      logic [8:0] tk_sh;
      pos = -1;
      tk_bits = 0;
      tk_sh = '0;
      peer_tx[l] = '{sig: 1'b1, data: DELIM_BYTE, fc: 1'b0};
      forever begin
        @(posedge clk);
        // permit serialiser
        if (tk_bits == 0 && tok_out_q[l].size() > 0) begin
          tk_sh = {1'b1, 8'(tok_out_q[l].pop_front())};
          tk_bits = 9;
        end
        // cell stream
        if (pos < 0) begin
          int i;
          if (txq[l].size() > 0) begin
            c = txq[l].pop_front();
            pos = 0;
          end else if (rst_n) begin
            i = pick_active(l);
            if (i >= 0) begin
              c = mk_cell(vcs[i].vin, CT_NORMAL, seq_next);
              exp_vc[seq_next] = i;
              seq_next++;
              vcs[i].credit--;
              vcs[i].sent++;
              pos = 0;
            end
          end
          peer_tx[l].sig  <= 1'b1;
          peer_tx[l].data <= DELIM_BYTE;
        end else begin
          if (pos == 0 && exp_vc.exists(seq_of(c))) exp_t0[seq_of(c)] = cyc;
          peer_tx[l].sig  <= 1'b0;
          peer_tx[l].data <= c[8*pos +: 8];
          pos++;
          if (pos == CELL_BYTES || (trunc_req[l] && pos == 20)) begin
            trunc_req[l] = 1'b0;
            pos = -1;
          end
        end
        peer_tx[l].fc <= (tk_bits > 0) ? tk_sh[8] : 1'b0;
        if (tk_bits > 0) begin
          tk_sh = {tk_sh[7:0], 1'b0};
          tk_bits--;
        end
      end
    end
  end

  // ------------------------------------------------------------ receive side
  int tokens_rcvd [NLINK];
  for (genvar l = 0; l < NLINK; l++) begin : g_mon
    initial begin
      cell_t c;
      int    n;
      longint t_first;
      int    tk_bits;
      logic [7:0] tk_sh;
      n = -1;
      tk_bits = 0;
      t_first = 0;
      tk_sh = '0;
      forever begin
        @(posedge clk);
        if (!rst_n) continue;
        // permits from the switch: credit for the upstream VC
        if (tk_bits == 0) begin
          if (peer_rx[l].fc) tk_bits = 8;
        end else begin
          tk_sh = {tk_sh[6:0], peer_rx[l].fc};
          tk_bits--;
          if (tk_bits == 0) begin
            automatic int i = find_vc_in(l, tk_sh);
            tokens_rcvd[l]++;
            check(i >= 0, $sformatf("permit for unknown VC %0d on link %0d", tk_sh, l));
            if (i >= 0) vcs[i].credit++;
          end
        end
        // cells from the switch
        if (peer_rx[l].sig) begin
          if (n == CELL_BYTES) begin
            automatic int s = seq_of(c);
            automatic int i = find_vc_out(l, c[7:0]);
            n_rcvd++;
            check(exp_vc.exists(s), $sformatf("unexpected cell seq %0d on link %0d", s, l));
            if (exp_vc.exists(s)) begin
              automatic int e = exp_vc[s];
              check(vcs[e].outl == l && vcs[e].vout == c[7:0],
                    $sformatf("cell %0d: link %0d vc %0d, expected link %0d vc %0d",
                              s, l, c[7:0], vcs[e].outl, vcs[e].vout));
              check(c == mk_cell(vcs[e].vout, exp_type.exists(s) ? exp_type[s] : CT_NORMAL, s),
                    $sformatf("cell %0d payload corrupted", s));
              rcv_lat[s] = t_first - exp_t0[s];
              vcs[e].rcvd++;
              exp_vc.delete(s);
            end
            if (i >= 0) begin
              if (auto_permit[l]) tok_out_q[l].push_back(int'(c[7:0]));
              else held_permits[l].push_back(int'(c[7:0]));
            end
          end
          n = 0;
        end else if (n >= 0 && n < CELL_BYTES) begin
          if (n == 0) t_first = cyc;
          c[8*n +: 8] = peer_rx[l].data;
          n++;
        end
      end
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic wait_clk(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_and_wait(int l, cell_t c);
    txq[l].push_back(c);
    while (!(txq[l].size() == 0)) @(posedge clk);
    wait_clk(60);
  endtask

  function automatic int add_vc(int inl, vc_t vin, int outl, vc_t vout, int cls, int w);
    vcd_t v;
    v.inl = inl; v.vin = vin; v.outl = outl; v.vout = vout; v.cls = cls; v.w = w;
    v.active = 0; v.credit = 1; v.sent = 0; v.rcvd = 0;
    vcs.push_back(v);
    // set-up cells travel on link 0 over closed VC 255
    txq[0].push_back(mk_setup(8'd255, 16'h0001, 1'b1, cls, vin, vout, inl, outl, w));
    return vcs.size() - 1;
  endfunction

  task automatic send_one(int i, cell_type_e t = CT_NORMAL);
    while (!(vcs[i].credit > 0)) @(posedge clk);
    vcs[i].credit--;
    exp_vc[seq_next] = i;
    if (t != CT_NORMAL) exp_type[seq_next] = t;
    vcs[i].sent++;
    txq[vcs[i].inl].push_back(mk_cell(vcs[i].vin, t, seq_next));
    seq_next++;
  endtask

  function automatic bit all_rcvd();
    return exp_vc.size() == 0;
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test
  int v_ct, v_bp, v_top, v_w [8];
  int v_sh [$];
  int top_seq [$];
  longint t_rel;

  initial begin
    for (int l = 0; l < NLINK; l++) begin
      auto_permit[l] = 1'b1;
      trunc_req[l] = 1'b0;
      rr_ptr[l] = 0;
      tokens_rcvd[l] = 0;
    end
    wait_clk(5);
    rst_n = 1'b1;
    wait_clk(5);

    $display("[%0d] %s", cyc, "1. node ID");
    // 1. node ID and VC set-up
    txq[0].push_back(mk_cell(8'd255, CT_NODEID, 0));
    begin
      automatic cell_t c = mk_cell(8'd255, CT_NODEID, 0);
      c[23:16] = 8'h00; c[31:24] = 8'h01;
      void'(txq[0].pop_back());
      txq[0].push_back(c);
    end
    v_ct  = add_vc(0, 8'd10, 1, 8'd20, 1, 2048);
    v_bp  = add_vc(2, 8'd11, 1, 8'd21, 2, 2048);
    v_top = add_vc(1, 8'd12, 2, 8'd5, 0, 4095);
    // weighted set: four VCs of weight 2048 and four of weight 1024, all
    // class 3, two per input link
    for (int k = 0; k < 8; k++)
      v_w[k] = add_vc(k % 4, 8'(40 + k), 2, 8'(40 + k), 3, (k < 4) ? 2048 : 1024);
    // a set-up cell for another node: ignored
    txq[0].push_back(mk_setup(8'd255, 16'h0002, 1'b1, 0, 8'd99, 8'd99, 0, 0, 1));
    while (!(txq[0].size() == 0)) @(posedge clk);
    wait_clk(200);
    check(node_valid && node_id == 16'h0001, "node ID loaded");
    check(stats[ST_SETUP] == 16'(vcs.size()), $sformatf("%0d set-ups applied", stats[ST_SETUP]));
    check(stats[ST_CFG_IGNORED] == 16'd1, "set-up for another node ignored");

    // a truncated cell: framing recovers on the next delimiter
    trunc_req[3] = 1'b1;
    txq[3].push_back(mk_cell(8'd77, CT_NORMAL, 0));
    while (!(txq[3].size() == 0)) @(posedge clk);
    wait_clk(100);
    check(stats[ST_FRAME_ERR] == 16'd1, "truncated cell detected");

    $display("[%0d] %s", cyc, "2. cut-through");
    // 2. cut-through on an idle link
    send_one(v_ct);
    while (!(all_rcvd())) @(posedge clk);
    wait_clk(40);
    begin
      automatic int s = seq_next - 1;
      check(rcv_lat.exists(s) && rcv_lat[s] < 53,
            $sformatf("cut-through latency %0d clocks", rcv_lat.exists(s) ? rcv_lat[s] : -1));
    end
    check(stats[ST_CUT_THROUGH] >= 16'd1, "cut-through counted");
    check(vcs[v_ct].credit == 1, "permit returned upstream for the cut-through cell");

    // node-ID and VC set-up cells on an open VC are forwarded, not applied
    send_one(v_ct, CT_NODEID);
    send_one(v_ct, CT_VCSETUP);
    while (!(all_rcvd())) @(posedge clk);
    wait_clk(40);
    check(node_id == 16'h0001, "node-ID cell on an open VC leaves the node ID alone");
    check(stats[ST_SETUP] == 16'(vcs.size()) && stats[ST_CFG_IGNORED] == 16'd1,
          "set-up cell on an open VC forwarded, not applied");

    $display("[%0d] %s", cyc, "3. back-pressure");
    // 3. back-pressure: hold link 1's permits
    auto_permit[1] = 1'b0;
    send_one(v_bp);                // goes out, VC 21 now stopped
    while (!(all_rcvd())) @(posedge clk);
    send_one(v_bp);                // must wait for the permit
    wait_clk(600);
    check(!all_rcvd(), "stopped VC holds its cell");
    check(shared_used == 7'd0, "dedicated VC uses no shared row");
    t_rel = cyc;
    tok_out_q[1].push_back(held_permits[1].pop_front());
    tok_out_q[1].push_back(held_permits[1].pop_front());
    while (!(all_rcvd())) @(posedge clk);
    check(cyc - t_rel < 200, $sformatf("held cell released %0d clocks after permit", cyc - t_rel));
    auto_permit[1] = 1'b1;
    while (held_permits[1].size() > 0) tok_out_q[1].push_back(held_permits[1].pop_front());

    $display("[%0d] %s", cyc, "4. shared pool");
    // 4. shared pool overflow: 66 shared VCs on link 3, permits held
    auto_permit[3] = 1'b0;
    for (int k = 0; k < 66; k++)
      v_sh.push_back(add_vc(k % 4, 8'(100 + k), 3, 8'(128 + k), 2, 2048));
    while (!(txq[0].size() == 0)) @(posedge clk);
    wait_clk(200);
    foreach (v_sh[k]) send_one(v_sh[k]);        // first cells leave at once
    while (!(all_rcvd())) @(posedge clk);
    wait_clk(100);
    foreach (v_sh[k]) send_one(v_sh[k]);        // second cells are stored
    for (int l = 0; l < NLINK; l++) while (!(txq[l].size() == 0)) @(posedge clk);
    wait_clk(300);
    check(shared_used == 7'd64, $sformatf("shared pool full (%0d used)", shared_used));
    check(stats[ST_DROP_POOL] == 16'd2, $sformatf("%0d cells lost to a full pool", stats[ST_DROP_POOL]));
    // the two lost cells will never arrive
    begin
      automatic int lost [$];
      foreach (exp_vc[s]) if (vcs[exp_vc[s]].outl == 3) lost.push_back(s);
      check(lost.size() == 66, $sformatf("%0d shared cells pending", lost.size()));
    end
    auto_permit[3] = 1'b1;
    while (held_permits[3].size() > 0) tok_out_q[3].push_back(held_permits[3].pop_front());
    wait_clk(9000);
    check(exp_vc.size() == 2, $sformatf("all stored shared cells sent (%0d left)", exp_vc.size()));
    check(shared_used == 7'd0, "shared pool empty again");
    exp_vc.delete();

    $display("[%0d] %s", cyc, "5. weighted");
    // 5. weighted round robin under saturation, competing traffic, priority
    // Each VC holds at most one cell, so a VC is ready again only a round
    // trip after it was served; with four VCs per weight the visits of one
    // VC are at least four cell times apart, longer than that round trip.
    for (int k = 0; k < 8; k++) vcs[v_w[k]].active = 1;
    // competing traffic to links 1 and 3 makes the output links contend
    // for buffer RAM read slots
    for (int k = 0; k < 4; k++) vcs[v_sh[k]].active = 1;
    vcs[v_bp].active = 1;
    wait_clk(54 * 300);
    for (int k = 0; k < 6; k++) begin
      send_one(v_top);
      top_seq.push_back(seq_next - 1);
      wait_clk(54 * 20);
    end
    wait_clk(54 * 100);
    begin
      automatic int heavy = 0;
      automatic int light = 0;
      automatic real ratio;
      for (int k = 0; k < 4; k++) heavy += vcs[v_w[k]].rcvd;
      for (int k = 4; k < 8; k++) light += vcs[v_w[k]].rcvd;
      ratio = (light > 0) ? real'(heavy) / real'(light) : 0.0;
      $display("WRR: weight-2048 VCs %0d cells, weight-1024 VCs %0d cells, ratio %0.2f",
               heavy, light, ratio);
      check(ratio > 1.6 && ratio < 2.4, "weighted service ratio near 2");
      check(heavy + light > 300, $sformatf("link 2 saturated (%0d cells)", heavy + light));
    end
    check(vcs[v_top].rcvd == 6, "all top-priority cells delivered");
    // class 0 overtakes the backlog of class 3: out within three cell times (the
    // cell on the link and the one already chosen for the next slot)
    foreach (top_seq[k])
      check(rcv_lat.exists(top_seq[k]) && rcv_lat[top_seq[k]] < 3 * FRAME,
            $sformatf("top-priority cell latency %0d clocks",
                      rcv_lat.exists(top_seq[k]) ? rcv_lat[top_seq[k]] : -1));
    // stop sources and drain
    foreach (vcs[i]) vcs[i].active = 0;
    wait_clk(54 * 20);
    check(all_rcvd(), $sformatf("everything delivered (%0d missing)", exp_vc.size()));
    foreach (exp_vc[s])
      $display("  missing cell %0d: link %0d vc %0d -> link %0d vc %0d", s,
               vcs[exp_vc[s]].inl, vcs[exp_vc[s]].vin, vcs[exp_vc[s]].outl, vcs[exp_vc[s]].vout);

    $display("[%0d] %s", cyc, "mechanisms seen");
    // mechanisms seen
    $display("stats: ct=%0d scan=%0d special=%0d sterile=%0d scan_end=%0d conflict=%0d refresh=%0d drop_pool=%0d tokens_in=%0d tokens_out=%0d",
             stats[ST_CUT_THROUGH], stats[ST_SEL_SCAN], stats[ST_SEL_SPECIAL], stats[ST_STERILE],
             stats[ST_SCAN_END], stats[ST_CONFLICT], stats[ST_REFRESH], stats[ST_DROP_POOL],
             stats[ST_TOKENS_IN], stats[ST_TOKENS_OUT]);
    check(stats[ST_SEL_SCAN] > 0,    "label-matching selections happened");
    check(stats[ST_SEL_SPECIAL] > 0, "special-access selections happened");
    check(stats[ST_STERILE] > 0,     "sterile label positions skipped");
    check(stats[ST_SCAN_END] > 0,    "scan cycles ended");
    check(stats[ST_CONFLICT] > 0,    "buffer read conflicts resolved");
    check(stats[ST_REFRESH] > 0,     "refresh performed");
    check(stats[ST_TOKENS_IN] > 0 && stats[ST_TOKENS_OUT] > 0, "permits both ways");
    check(stats[ST_OVERRUN] == 0,    "no input buffer overrun");
    check(stats[ST_TOKENS_LOST] == 0, "no permit lost");
    check(stats[ST_DROP_FULL] == 0,  "no cell for an already full VC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
