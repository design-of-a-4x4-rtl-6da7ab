// scan_mem: the scanning memory of one outgoing link, one word per VC.
//
// Fields per VC (the chip's): valid (VC open), source link and VC ID (where
// permits go), priority class (4 bits, one-hot, bit 0 = highest class),
// 12-bit service weight (stored bit-reversed, so that the weight's most
// significant bit meets the most frequent label position, bit 0),
// still-unvisited flag, enabled (not stopped by the
// downstream chip), full (a cell of this VC is buffered) and, for VCs
// 128..255, the 6-bit pointer of their cell in the shared pool. VC 0..127
// keep their cell in the dedicated row, so they need no pointer.
// The memory is searched like a content-addressable memory: a VC is ready
// when valid, enabled and full; a label match asks for ready VCs of class
// q_cls that are still unvisited and whose weight has a 1 where the label's
// rightmost 1 is (q_pos); the priority enforcer returns the lowest matching
// VC. rdy_cls is the wired-OR of the class bits of all ready VCs, which
// gives the highest ready class in one step.
// Write ports, all usable in the same clock (different VCs):
//   su_*  open/close a VC (writes every field; enabled=1, full=0, unvisited=1)
//   fs_*  a cell of the VC has been written into the buffer RAM
//   tk_*  a permit arrived from downstream: enable the VC
//   fm_*  final selection: mark visited, not full and stopped
//   cr_*  start a new scan cycle of a class: set its unvisited flags
// Read ports rp_* give class and state of any NRD VCs (special accesses);
// the sel_* port gives what the final selection needs. All reads are
// combinational. Reset closes every VC. The chip stores one still-unvisited
// bit per class; since a VC has one class, one bit per VC plus the class
// match on cr_* does the same job (this design's simplification).
module scan_mem
  import atm_pkg::*;
#(
  parameter int N   = NVC,
  parameter int WW  = WEIGHT_W,
  parameter int NRD = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  // open / close a VC
  input  logic            su_en,
  input  vc_t             su_vc,
  input  logic            su_valid,
  input  logic [3:0]      su_cls,
  input  logic [WW-1:0]   su_weight,
  input  link_t           su_src_link,
  input  vc_t             su_src_vc,
  // cell stored
  input  logic            fs_en,
  input  vc_t             fs_vc,
  input  logic [5:0]      fs_addr,
  // permit token
  input  logic            tk_en,
  input  vc_t             tk_vc,
  // final mark
  input  logic            fm_en,
  input  vc_t             fm_vc,
  // class scan-cycle restart
  input  logic            cr_en,
  input  logic [3:0]      cr_cls,
  // label matching
  input  logic [3:0]      q_cls,
  input  logic [WW-1:0]   q_pos,
  output logic            m_any,
  output vc_t             m_idx,
  output logic [3:0]      rdy_cls,
  // special-access reads
  input  vc_t             rp_vc    [NRD],
  output logic            rp_valid [NRD],
  output logic            rp_en    [NRD],
  output logic            rp_full  [NRD],
  output logic [3:0]      rp_cls   [NRD],
  // final-selection read
  input  vc_t             sel_vc,
  output link_t           sel_src_link,
  output vc_t             sel_src_vc,
  output logic [5:0]      sel_addr
);

  logic [N-1:0]  valid, en, full, unv;
  logic [3:0]    cls    [N];
  logic [WW-1:0] weight [N];
  link_t         src_l  [N];
  vc_t           src_v  [N];
  logic [5:0]    addr   [N];

  logic [N-1:0] ready, match;

  always_comb begin
    rdy_cls = '0;
    for (int i = 0; i < N; i++) begin
      ready[i] = valid[i] && en[i] && full[i];
      match[i] = ready[i] && unv[i] && |(cls[i] & q_cls) && |(weight[i] & q_pos);
      if (ready[i]) rdy_cls |= cls[i];
    end
    m_any = |match;
    m_idx = '0;
    for (int i = N - 1; i >= 0; i--) if (match[i]) m_idx = vc_t'(i);
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rp_valid[r] = valid[rp_vc[r]];
      rp_en[r]    = en[rp_vc[r]];
      rp_full[r]  = full[rp_vc[r]];
      rp_cls[r]   = cls[rp_vc[r]];
    end
  end

  assign sel_src_link = src_l[sel_vc];
  assign sel_src_vc   = src_v[sel_vc];
  assign sel_addr     = addr[sel_vc];

  // fields written only when a VC is opened
  always_ff @(posedge clk) begin
    if (su_en) begin
      cls[su_vc]    <= su_cls;
      weight[su_vc] <= {<<{su_weight}};   // stored in reverse bit order
      src_l[su_vc]  <= su_src_link;
      src_v[su_vc]  <= su_src_vc;
    end
    if (fs_en) addr[fs_vc] <= fs_addr;
  end

  // flags with reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      en    <= '0;
      full  <= '0;
      unv   <= '0;
    end else begin
      if (cr_en)
        for (int i = 0; i < N; i++) if (|(cls[i] & cr_cls)) unv[i] <= 1'b1;
      if (fm_en) begin
        unv[fm_vc]  <= 1'b0;
        full[fm_vc] <= 1'b0;
        en[fm_vc]   <= 1'b0;
      end
      if (tk_en) en[tk_vc] <= 1'b1;
      if (fs_en) full[fs_vc] <= 1'b1;
      if (su_en) begin
        valid[su_vc] <= su_valid;
        en[su_vc]    <= 1'b1;
        full[su_vc]  <= 1'b0;
        unv[su_vc]   <= 1'b1;
      end
    end
  end

endmodule
