// mux_ctrl: the cell multiplexing controller of one outgoing link: scanning
// memory, label (cycle) counters and the selection FSM.
//
// It decides which VC sends the next cell on the link, by prioritized
// weighted round robin. A selection period starts when the link starts a
// cell (frame_start) or, while the link is idle, as soon as the previous
// selection has been used. The FSM steps once per memory cycle (mem_en):
//   CLS1, CLS2  find the highest class with a ready (open, enabled, full) VC
//   SCAN        one label-matching access per step with the class's label
//               counter; a match selects the lowest matching VC. A miss ends
//               that scan cycle: the class's unvisited flags are set again, the
//               label counter advances past every position already known to
//               be sterile, and the current position is added to the sterile
//               mask if it matched nothing during the whole scan cycle.
//   HOLD        keep the selection until the central controller's timeout
//               (or, on an idle link, until the buffer RAM grants the read).
// In every step the FSM also looks at "special accesses": a permit token
// that made a full VC ready, and incoming cells routed to this link that
// may still be cut through. One of higher priority than the current
// selection replaces it. On the timeout the selection becomes final: the VC
// is marked visited, not full and stopped, a permit goes to its upstream
// link, and either its buffer row is handed to the scheduler (pend_rd,
// read two memory cycles later) or its input buffer is told to cut the
// cell through (ct_claim, ct_arm). Without a selection at the timeout the
// link goes idle after the current cell ("urgent search" is not needed at a
// 12-bit weight). Each class keeps its own label counter and matched flag
// across class changes; the sterile mask is cleared at each selection start.
// This design also clears it when a cell or token may have made a VC ready
// (else an idle link could keep skipping the only position that now
// matches) and when every position would be masked.
// Everything above follows the chip. This design's choices: class 0 is the
// highest, ties go to the lowest VC / lowest input, a token is examined at
// the first step after it arrives, and a cut-through selection whose cell
// can no longer be cut through is dropped and the search restarted.
module mux_ctrl
  import atm_pkg::*;
#(
  parameter link_t LINK = 2'd0,
  parameter int    N    = NVC,
  parameter int    WW   = WEIGHT_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mem_en,
  // VC open/close
  input  logic            su_en,
  input  vc_t             su_vc,
  input  logic            su_valid,
  input  logic [3:0]      su_cls,
  input  logic [WW-1:0]   su_weight,
  input  link_t           su_src_link,
  input  vc_t             su_src_vc,
  // cell written to the buffer RAM
  input  logic            fs_en,
  input  vc_t             fs_vc,
  input  logic [5:0]      fs_addr,
  // state check for the write path
  input  vc_t             chk_vc,
  output logic            chk_full,
  // permit token from the downstream chip
  input  logic            tk_valid,
  input  vc_t             tk_vc,
  // incoming cells that may be cut through to this link
  input  logic [NLINK-1:0] arr_valid,
  input  vc_t             arr_vc [NLINK],
  // output link state
  input  logic            out_idle,
  input  logic            frame_start,
  // central controller
  input  logic            timeout,
  output logic            imm_req,
  output row_t            imm_row,
  input  logic            imm_gnt,
  output logic            pend_rd,
  output row_t            pend_row,
  input  logic            rd_done,
  // results
  output logic [NLINK-1:0] ct_claim,
  output logic            ct_arm,
  output link_t           ct_in,
  output logic            pm_valid,
  output link_t           pm_link,
  output vc_t             pm_vc,
  // observation
  output logic [15:0]     cnt_sel_scan,
  output logic [15:0]     cnt_sel_special,
  output logic [15:0]     cnt_sterile,
  output logic [15:0]     cnt_scan_end
);

  typedef enum logic [2:0] {P_DONE, P_CLS1, P_CLS2, P_SCAN, P_HOLD} phase_e;

  localparam int NRD = NLINK + 2;   // arrivals, token, write check

  phase_e        phase, phase_n;
  logic [1:0]    cur, cur_n;
  logic          cur_valid, cur_valid_n;
  logic [WW-1:0] label [NCLASS];
  logic [WW-1:0] label_n;
  logic [NCLASS-1:0] matched, matched_n;
  logic [WW-1:0] mask, mask_n;
  logic          sel, sel_n;
  vc_t           sel_vc, sel_vc_n;
  logic          sel_ct, sel_ct_n;
  link_t         sel_in, sel_in_n;
  logic [2:0]    sel_cls, sel_cls_n;
  logic          tk_pend;
  vc_t           tk_pend_vc;
  logic          fs_pend;
  logic          rdy_evt;   // a VC of this link may have become ready
  logic          wait_arm;
  logic          fin, fin_imm;
  logic          special, scan_hit, sterile_add, scan_miss;

  // scanning memory
  logic          m_any;
  vc_t           m_idx;
  logic [3:0]    rdy_cls;
  vc_t           rp_vc    [NRD];
  logic          rp_valid [NRD];
  logic          rp_en    [NRD];
  logic          rp_full  [NRD];
  logic [3:0]    rp_cls   [NRD];
  link_t         sel_src_link;
  vc_t           sel_src_vc;
  logic [5:0]    sel_addr;
  logic          fm_en, cr_en;
  logic [3:0]    q_cls;
  logic [WW-1:0] q_pos, lbl_next;

  function automatic logic [2:0] enc_cls(logic [3:0] c);
    for (int i = 0; i < NCLASS; i++) if (c[i]) return 3'(i);
    return 3'd4;
  endfunction

  always_comb begin
    for (int i = 0; i < NLINK; i++) rp_vc[i] = arr_vc[i];
    rp_vc[NLINK]     = tk_pend_vc;
    rp_vc[NLINK + 1] = chk_vc;
  end
  assign chk_full = rp_full[NLINK + 1];

  assign q_cls = 4'(1) << cur;

  scan_mem #(.N(N), .WW(WW), .NRD(NRD)) u_mem (
    .clk, .rst_n,
    .su_en, .su_vc, .su_valid, .su_cls, .su_weight, .su_src_link, .su_src_vc,
    .fs_en, .fs_vc, .fs_addr,
    .tk_en(tk_valid), .tk_vc,
    .fm_en, .fm_vc(sel_vc_n),
    .cr_en, .cr_cls(q_cls),
    .q_cls, .q_pos, .m_any, .m_idx, .rdy_cls,
    .rp_vc, .rp_valid, .rp_en, .rp_full, .rp_cls,
    .sel_vc(sel_vc_n), .sel_src_link, .sel_src_vc, .sel_addr
  );

  // sterile-mask update made by a missing SCAN step (feeds the counter)
  logic [WW-1:0] mask_scan;
  assign mask_scan = (phase == P_SCAN && !m_any && !matched[cur]) ? (mask | q_pos) : mask;

  cycle_counter #(.W(WW)) u_cnt (
    .cnt(label[cur]), .mask(mask_scan), .next_cnt(lbl_next), .pos(q_pos)
  );

  row_t          sel_row_q;   // buffer row of the held selection
  wire row_t sel_row = (sel_vc_n < vc_t'(NDED)) ? ded_row(LINK, sel_vc_n) : shared_row(sel_addr);

  // ---------------------------------------------------------------- step
  always_comb begin
    logic [2:0] best_cls;
    logic       best_ct;
    link_t      best_in;
    vc_t        best_vc;
    logic [2:0] ref_cls;

    phase_n     = phase;
    cur_n       = cur;
    cur_valid_n = cur_valid;
    label_n     = label[cur];
    matched_n   = matched;
    sel_n       = sel;
    sel_vc_n    = sel_vc;
    sel_ct_n    = sel_ct;
    sel_in_n    = sel_in;
    sel_cls_n   = sel_cls;
    cr_en       = 1'b0;
    fin         = 1'b0;
    fin_imm     = 1'b0;
    special     = 1'b0;
    scan_hit    = 1'b0;
    scan_miss   = 1'b0;
    sterile_add = 1'b0;

    // special-access candidates
    best_cls = 3'd4;
    best_ct  = 1'b0;
    best_in  = '0;
    best_vc  = '0;
    if (tk_pend && rp_valid[NLINK] && rp_en[NLINK] && rp_full[NLINK] &&
        enc_cls(rp_cls[NLINK]) < best_cls) begin
      best_cls = enc_cls(rp_cls[NLINK]);
      best_vc  = tk_pend_vc;
    end
    for (int i = 0; i < NLINK; i++) begin
      if (arr_valid[i] && rp_valid[i] && rp_en[i] && !rp_full[i] &&
          enc_cls(rp_cls[i]) < best_cls) begin
        best_cls = enc_cls(rp_cls[i]);
        best_ct  = 1'b1;
        best_in  = link_t'(i);
        best_vc  = arr_vc[i];
      end
    end
    ref_cls = sel ? sel_cls : (cur_valid ? {1'b0, cur} : 3'd4);

    // A VC that becomes ready can make a recorded sterile position fertile
    // again; forget the mask then (and if every position were masked).
    mask_n      = (rdy_evt || &mask_scan) ? '0 : mask_scan;

    if (mem_en) begin
      if (phase == P_HOLD && imm_gnt) begin
        fin     = 1'b1;
        fin_imm = 1'b1;
      end else begin
        // a cut-through choice whose cell has moved on is dropped
        if (sel && sel_ct && !arr_valid[sel_in]) begin
          sel_n   = 1'b0;
          phase_n = P_CLS1;
        end
        if (phase != P_DONE && best_cls < ref_cls) begin
          special     = 1'b1;
          sel_n       = 1'b1;
          sel_vc_n    = best_vc;
          sel_ct_n    = best_ct;
          sel_in_n    = best_in;
          sel_cls_n   = best_cls;
          cur_n       = best_cls[1:0];
          cur_valid_n = 1'b1;
          phase_n     = P_HOLD;
        end else begin
          unique case (phase)
            P_CLS1: phase_n = P_CLS2;
            P_CLS2: begin
              if (rdy_cls != 4'd0) begin
                cur_n       = enc_cls(rdy_cls)[1:0];
                cur_valid_n = 1'b1;
                phase_n     = P_SCAN;
              end else begin
                cur_valid_n = 1'b0;
                phase_n     = P_CLS1;
              end
            end
            P_SCAN: begin
              if (!rdy_cls[cur]) begin
                phase_n = P_CLS1;
              end else if (m_any) begin
                scan_hit     = 1'b1;
                sel_n        = 1'b1;
                sel_vc_n     = m_idx;
                sel_ct_n     = 1'b0;
                sel_cls_n    = {1'b0, cur};
                matched_n[cur] = 1'b1;
                phase_n      = P_HOLD;
              end else begin
                scan_miss    = 1'b1;
                sterile_add  = !matched[cur];
                cr_en        = 1'b1;
                matched_n[cur] = 1'b0;
                label_n      = lbl_next;
              end
            end
            default: ;
          endcase
        end
        if (timeout && phase != P_DONE) fin = 1'b1;
        else if (out_idle && !wait_arm && sel_n && sel_ct_n && phase_n == P_HOLD)
          fin = 1'b1;   // idle link: cut through at once
      end
    end
  end

  // a finished selection uses the values chosen in this same step
  assign fm_en = fin && sel_n;
  always_comb begin
    ct_claim = '0;
    if (fin && sel_n && sel_ct_n) ct_claim[sel_in_n] = 1'b1;
  end
  assign ct_arm   = fin && sel_n && sel_ct_n;
  assign ct_in    = sel_in_n;
  assign pm_valid = fin && sel_n;
  assign pm_link  = sel_src_link;
  assign pm_vc    = sel_src_vc;
  assign imm_req  = phase == P_HOLD && sel && !sel_ct && out_idle && !wait_arm && !pend_rd;
  assign imm_row  = sel_row_q;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_DONE;
      cur        <= '0;
      cur_valid  <= 1'b0;
      for (int c = 0; c < NCLASS; c++) label[c] <= WW'(1);
      matched    <= '0;
      mask       <= '0;
      sel        <= 1'b0;
      sel_vc     <= '0;
      sel_row_q  <= '0;
      sel_ct     <= 1'b0;
      sel_in     <= '0;
      sel_cls    <= 3'd4;
      tk_pend    <= 1'b0;
      tk_pend_vc <= '0;
      fs_pend    <= 1'b0;
      rdy_evt    <= 1'b0;
      wait_arm   <= 1'b0;
      pend_rd    <= 1'b0;
      pend_row   <= '0;
      cnt_sel_scan    <= '0;
      cnt_sel_special <= '0;
      cnt_sterile     <= '0;
      cnt_scan_end    <= '0;
    end else begin
      if (tk_valid) begin
        tk_pend    <= 1'b1;
        tk_pend_vc <= tk_vc;
      end else if (mem_en) begin
        tk_pend <= 1'b0;
      end
      if (frame_start) fs_pend <= 1'b1;
      if (fs_en || tk_valid) rdy_evt <= 1'b1;
      else if (mem_en) rdy_evt <= 1'b0;
      if (!out_idle) wait_arm <= 1'b0;
      if (rd_done) pend_rd <= 1'b0;

      if (mem_en) begin
        phase      <= phase_n;
        cur        <= cur_n;
        cur_valid  <= cur_valid_n;
        label[cur] <= label_n;
        matched    <= matched_n;
        mask       <= mask_n;
        sel        <= sel_n;
        sel_vc     <= sel_vc_n;
        sel_row_q  <= sel_row;
        sel_ct     <= sel_ct_n;
        sel_in     <= sel_in_n;
        sel_cls    <= sel_cls_n;
        if (scan_hit)    cnt_sel_scan    <= cnt_sel_scan + 16'd1;
        if (special)     cnt_sel_special <= cnt_sel_special + 16'd1;
        if (sterile_add) cnt_sterile     <= cnt_sterile + 16'd1;
        if (scan_miss)   cnt_scan_end    <= cnt_scan_end + 16'd1;
        if (fin) begin
          phase <= P_DONE;
          sel   <= 1'b0;
          if (sel_n) wait_arm <= 1'b1;
          if (sel_n && !sel_ct_n && !fin_imm) begin
            pend_rd  <= 1'b1;
            pend_row <= sel_row;
          end
        end else if (phase_n == P_DONE &&
                     (fs_pend || frame_start || (out_idle && !wait_arm && !pend_rd))) begin
          // start a new selection period
          phase   <= P_CLS1;
          mask    <= '0;
          sel     <= 1'b0;
          fs_pend <= 1'b0;
        end
      end
    end
  end

endmodule
