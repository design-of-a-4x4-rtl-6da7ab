// atm_switch: 4x4 ATM switch chip with a shared, statically partitioned cell
// buffer, per-VC back-pressure and prioritized weighted round-robin output
// multiplexing.
//
// Data path: each incoming link's bytes are assembled into a 53-byte cell in
// its input buffer while the VC ID is translated by that link's routing
// table. The whole cell (424 bits) is then written in one access into a row
// of the buffer RAM: VCs 0..127 of each outgoing link own one row each, VCs
// 128..255 of all links share a 64-row pool. Each outgoing link's
// multiplexing controller chooses the next VC to send; its cell is read in
// one access into that link's output buffer and sent byte by byte. A cell of
// higher priority arriving for an idle (or about to be free) link is cut
// through: the outgoing link takes its bytes straight from the input
// buffer's cut-through bus while the cell is still arriving.
// Flow control: at most one cell per VC is buffered. When a VC's cell is
// chosen, a permit token naming its upstream VC is sent back on the link it
// came in by, and the VC is stopped until a permit for it comes back from the
// downstream chip.
// Control: the central controller (buf_sched) owns the single RAM port,
// placing each outgoing link's read as late as possible, then writes, then
// refresh. Configuration cells set the node ID and open/close VCs.
// Timing: one 50 MHz clock; every link carries one byte, a delimiter flag
// and a flow-control bit per clock on five double-data-rate pins; the buffer
// RAM, scanning memories and controllers step once every two clocks
// (mem_en), the chip's 25 MHz memory clock.
// Ports: rx_pins/tx_pins per link; node ID and a few counters for
// observation. The chip's two-phase clock generation is not modelled (one
// clock plus an enable does its job here).
module atm_switch
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] rx_pins [NLINK],
  output logic [4:0] tx_pins [NLINK],
  output logic       node_valid,
  output logic [NODEID_W-1:0] node_id,
  output logic [15:0] cells_in  [NLINK],
  output logic [15:0] cells_out [NLINK],
  output logic [6:0]  shared_used,
  output logic [15:0] stats [NSTAT]   // event counters, indexed by stat_e
);

  logic mem_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mem_en <= 1'b0;
    else        mem_en <= !mem_en;

  // ------------------------------------------------------------ per-link signals
  link_word_t rx_word [NLINK], tx_word [NLINK];
  logic [NLINK-1:0] tx_sig;
  logic [7:0]  tx_data [NLINK];
  logic [NLINK-1:0] fc_out;

  logic        rt_rd_en [NLINK];
  vc_t         rt_rd_vc [NLINK];
  rt_entry_t   rt_rd_data [NLINK];

  logic [NLINK-1:0] ib_ct_ok, ib_ct_claim, ib_ct_done, ib_wr_req, ib_wr_ack,
                    ib_cfg_req, ib_cfg_ack;
  link_t       ib_hdr_out [NLINK];
  vc_t         ib_hdr_vc  [NLINK];
  logic [5:0]  ib_ct_idx  [NLINK];
  logic [7:0]  ib_ct_byte [NLINK];
  link_t       ib_wr_out  [NLINK];
  vc_t         ib_wr_vc   [NLINK];
  cell_t       ib_cell    [NLINK];
  cell_type_e  ib_cfg_type [NLINK];
  logic [15:0] ib_cnt_ferr [NLINK], ib_cnt_drop [NLINK], ib_cnt_ovr [NLINK];

  logic        tk_valid [NLINK];
  vc_t         tk_vc    [NLINK];
  logic [15:0] tk_cnt   [NLINK];

  logic [NLINK-1:0] mc_arr_valid [NLINK];
  logic [NLINK-1:0] mc_ct_claim  [NLINK];
  logic [NLINK-1:0] mc_ct_arm, mc_pm_valid, mc_imm_req, mc_pend_rd, mc_chk_full;
  link_t       mc_ct_in   [NLINK];
  link_t       mc_pm_link [NLINK];
  vc_t         mc_pm_vc   [NLINK];
  row_t        mc_imm_row [NLINK];
  row_t        mc_pend_row [NLINK];
  logic [15:0] mc_cnt_scan [NLINK], mc_cnt_special [NLINK], mc_cnt_sterile [NLINK],
               mc_cnt_scan_end [NLINK];

  logic [NLINK-1:0] ob_busy, ob_frame_start, ob_idle, ob_cur_ct, ob_ct_done, ob_sig, ob_load;
  logic [5:0]  ob_f    [NLINK];
  link_t       ob_cur_in [NLINK];
  logic [7:0]  ob_byte [NLINK];

  logic [NLINK-1:0] pm_push [NLINK];
  logic [15:0] tkt_sent [NLINK], tkt_lost [NLINK];

  // ------------------------------------------------------------ shared blocks
  logic [NLINK-1:0] sc_timeout, sc_rd_done, sc_imm_gnt, sc_fs_en;
  vc_t        sc_chk_vc, sc_fs_vc;
  logic [5:0] sc_fs_addr;
  logic       fl_any_free, fl_alloc, fl_release;
  logic [5:0] fl_free_idx, fl_rel_idx;
  logic [1:0] ram_op;
  logic       ram_ref_wr;
  row_t       ram_addr;
  link_t      ram_wsel;
  cell_t      ram_rdata;
  logic       rd_dst_valid;
  link_t      rd_dst;
  logic [15:0] sc_cnt_conflict, sc_cnt_refresh, sc_cnt_drop_full, sc_cnt_drop_pool;

  logic [NLINK-1:0] cf_rt_wr_en, cf_su_en;
  vc_t        cf_rt_wr_vc, cf_su_vc, cf_su_src_vc;
  rt_entry_t  cf_rt_wr_data;
  logic       cf_su_valid;
  logic [3:0] cf_su_cls;
  logic [WEIGHT_W-1:0] cf_su_weight;
  link_t      cf_su_src_link;
  logic [15:0] cf_cnt_setup, cf_cnt_ignored;

  // ------------------------------------------------------------ link blocks
  for (genvar l = 0; l < NLINK; l++) begin : g_link
    assign tx_word[l] = '{sig: tx_sig[l], data: tx_data[l], fc: fc_out[l]};

    link_port u_port (
      .clk, .rst_n, .tx_word(tx_word[l]), .tx_pins(tx_pins[l]),
      .rx_pins(rx_pins[l]), .rx_word(rx_word[l])
    );

    routing_table u_rt (
      .clk, .rst_n, .rd_en(rt_rd_en[l]), .rd_vc(rt_rd_vc[l]), .rd_data(rt_rd_data[l]),
      .wr_en(cf_rt_wr_en[l]), .wr_vc(cf_rt_wr_vc), .wr_data(cf_rt_wr_data)
    );

    input_buffer u_ib (
      .clk, .rst_n,
      .rx_sig(rx_word[l].sig), .rx_data(rx_word[l].data),
      .rt_rd_en(rt_rd_en[l]), .rt_rd_vc(rt_rd_vc[l]), .rt_rd_data(rt_rd_data[l]),
      .ct_ok(ib_ct_ok[l]), .hdr_out(ib_hdr_out[l]), .hdr_vc(ib_hdr_vc[l]),
      .ct_claim(ib_ct_claim[l]), .ct_idx(ib_ct_idx[l]), .ct_byte(ib_ct_byte[l]),
      .ct_done(ib_ct_done[l]),
      .wr_req(ib_wr_req[l]), .wr_out(ib_wr_out[l]), .wr_vc(ib_wr_vc[l]),
      .lower_cell(ib_cell[l]), .wr_ack(ib_wr_ack[l]),
      .cfg_req(ib_cfg_req[l]), .cfg_type(ib_cfg_type[l]), .cfg_ack(ib_cfg_ack[l]),
      .cnt_cells(cells_in[l]), .cnt_frame_err(ib_cnt_ferr[l]), .cnt_drop(ib_cnt_drop[l]),
      .cnt_overrun(ib_cnt_ovr[l])
    );

    token_rx u_tkr (
      .clk, .rst_n, .fc_in(rx_word[l].fc), .tk_valid(tk_valid[l]), .tk_vc(tk_vc[l]),
      .cnt_tokens(tk_cnt[l])
    );

    for (genvar i = 0; i < NLINK; i++) begin : g_arr
      assign mc_arr_valid[l][i] = ib_ct_ok[i] && ib_hdr_out[i] == link_t'(l);
      assign pm_push[l][i] = mc_pm_valid[i] && mc_pm_link[i] == link_t'(l);
    end

    always_comb begin
      ib_ct_claim[l] = 1'b0;
      for (int o = 0; o < NLINK; o++) ib_ct_claim[l] |= mc_ct_claim[o][l];
    end

    token_tx u_tkt (
      .clk, .rst_n, .push(pm_push[l]), .push_vc(mc_pm_vc), .fc_out(fc_out[l]),
      .cnt_sent(tkt_sent[l]), .cnt_lost(tkt_lost[l])
    );

    mux_ctrl #(.LINK(link_t'(l))) u_mc (
      .clk, .rst_n, .mem_en,
      .su_en(cf_su_en[l]), .su_vc(cf_su_vc), .su_valid(cf_su_valid), .su_cls(cf_su_cls),
      .su_weight(cf_su_weight), .su_src_link(cf_su_src_link), .su_src_vc(cf_su_src_vc),
      .fs_en(sc_fs_en[l]), .fs_vc(sc_fs_vc), .fs_addr(sc_fs_addr),
      .chk_vc(sc_chk_vc), .chk_full(mc_chk_full[l]),
      .tk_valid(tk_valid[l]), .tk_vc(tk_vc[l]),
      .arr_valid(mc_arr_valid[l]), .arr_vc(ib_hdr_vc),
      .out_idle(ob_idle[l]), .frame_start(ob_frame_start[l]),
      .timeout(sc_timeout[l]), .imm_req(mc_imm_req[l]), .imm_row(mc_imm_row[l]),
      .imm_gnt(sc_imm_gnt[l]), .pend_rd(mc_pend_rd[l]), .pend_row(mc_pend_row[l]),
      .rd_done(sc_rd_done[l]),
      .ct_claim(mc_ct_claim[l]), .ct_arm(mc_ct_arm[l]), .ct_in(mc_ct_in[l]),
      .pm_valid(mc_pm_valid[l]), .pm_link(mc_pm_link[l]), .pm_vc(mc_pm_vc[l]),
      .cnt_sel_scan(mc_cnt_scan[l]), .cnt_sel_special(mc_cnt_special[l]),
      .cnt_sterile(mc_cnt_sterile[l]), .cnt_scan_end(mc_cnt_scan_end[l])
    );

    assign ob_load[l] = rd_dst_valid && rd_dst == link_t'(l);

    output_buffer u_ob (
      .clk, .rst_n, .load(ob_load[l]), .load_cell(ram_rdata),
      .arm_ct(mc_ct_arm[l]), .arm_in(mc_ct_in[l]),
      .busy(ob_busy[l]), .f(ob_f[l]), .frame_start(ob_frame_start[l]), .out_idle(ob_idle[l]),
      .cur_ct(ob_cur_ct[l]), .cur_in(ob_cur_in[l]), .ct_done(ob_ct_done[l]),
      .ob_sig(ob_sig[l]), .ob_byte(ob_byte[l]), .cnt_frames(cells_out[l])
    );
  end

  // ------------------------------------------------------------ crossbar
  out_xbar u_xbar (
    .clk, .rst_n, .busy(ob_busy), .f(ob_f), .cur_ct(ob_cur_ct), .cur_in(ob_cur_in),
    .ob_ct_done(ob_ct_done), .ob_sig(ob_sig), .ob_byte(ob_byte),
    .ct_byte(ib_ct_byte), .ct_idx(ib_ct_idx), .ct_done(ib_ct_done),
    .tx_sig(tx_sig), .tx_data(tx_data)
  );

  // ------------------------------------------------------------ buffer memory
  shared_free_list u_fl (
    .clk, .rst_n, .any_free(fl_any_free), .free_idx(fl_free_idx), .alloc(fl_alloc),
    .release_en(fl_release), .rel_idx(fl_rel_idx), .n_used(shared_used)
  );

  buffer_ram u_ram (
    .clk, .mem_en, .op(ram_op), .ref_wr(ram_ref_wr), .addr(ram_addr),
    .wdata(ib_cell[ram_wsel]), .rdata(ram_rdata)
  );

  buf_sched u_sched (
    .clk, .rst_n, .mem_en,
    .out_busy(ob_busy), .out_f(ob_f), .frame_start(ob_frame_start),
    .timeout(sc_timeout), .pend_rd(mc_pend_rd), .pend_row(mc_pend_row), .rd_done(sc_rd_done),
    .imm_req(mc_imm_req), .imm_row(mc_imm_row), .imm_gnt(sc_imm_gnt),
    .wr_req(ib_wr_req), .wr_out(ib_wr_out), .wr_vc(ib_wr_vc), .wr_ack(ib_wr_ack),
    .chk_vc(sc_chk_vc), .chk_full(mc_chk_full),
    .fs_en(sc_fs_en), .fs_vc(sc_fs_vc), .fs_addr(sc_fs_addr),
    .any_free(fl_any_free), .free_idx(fl_free_idx), .alloc(fl_alloc),
    .release_en(fl_release), .rel_idx(fl_rel_idx),
    .ram_op(ram_op), .ram_ref_wr(ram_ref_wr), .ram_addr(ram_addr), .ram_wsel(ram_wsel),
    .rd_dst_valid(rd_dst_valid), .rd_dst(rd_dst),
    .cnt_conflict(sc_cnt_conflict), .cnt_refresh(sc_cnt_refresh),
    .cnt_drop_full(sc_cnt_drop_full), .cnt_drop_pool(sc_cnt_drop_pool)
  );

  // ------------------------------------------------------------ configuration
  cfg_ctrl u_cfg (
    .clk, .rst_n, .cfg_req(ib_cfg_req), .cfg_type(ib_cfg_type), .cfg_cell(ib_cell),
    .cfg_ack(ib_cfg_ack),
    .rt_wr_en(cf_rt_wr_en), .rt_wr_vc(cf_rt_wr_vc), .rt_wr_data(cf_rt_wr_data),
    .su_en(cf_su_en), .su_vc(cf_su_vc), .su_valid(cf_su_valid), .su_cls(cf_su_cls),
    .su_weight(cf_su_weight), .su_src_link(cf_su_src_link), .su_src_vc(cf_su_src_vc),
    .node_valid, .node_id, .cnt_setup(cf_cnt_setup), .cnt_ignored(cf_cnt_ignored)
  );

  // ------------------------------------------------------------ observation
  logic [15:0] ct_count;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ct_count <= '0;
    else if (ib_ct_claim != '0) ct_count <= ct_count + 16'd1;

  always_comb begin
    for (int s = 0; s < NSTAT; s++) stats[s] = '0;
    for (int l = 0; l < NLINK; l++) begin
      stats[ST_FRAME_ERR]   += ib_cnt_ferr[l];
      stats[ST_DROP_CLOSED] += ib_cnt_drop[l];
      stats[ST_OVERRUN]     += ib_cnt_ovr[l];
      stats[ST_TOKENS_IN]   += tk_cnt[l];
      stats[ST_TOKENS_OUT]  += tkt_sent[l];
      stats[ST_TOKENS_LOST] += tkt_lost[l];
      stats[ST_SEL_SCAN]    += mc_cnt_scan[l];
      stats[ST_SEL_SPECIAL] += mc_cnt_special[l];
      stats[ST_STERILE]     += mc_cnt_sterile[l];
      stats[ST_SCAN_END]    += mc_cnt_scan_end[l];
    end
    stats[ST_CUT_THROUGH] = ct_count;
    stats[ST_CONFLICT]    = sc_cnt_conflict;
    stats[ST_REFRESH]     = sc_cnt_refresh;
    stats[ST_DROP_FULL]   = sc_cnt_drop_full;
    stats[ST_DROP_POOL]   = sc_cnt_drop_pool;
    stats[ST_SETUP]       = cf_cnt_setup;
    stats[ST_CFG_IGNORED] = cf_cnt_ignored;
  end

endmodule
