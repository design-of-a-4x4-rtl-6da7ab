// buf_sched: the central controller that owns the buffer RAM port: it
// schedules the outgoing links' reads as late as possible, grants the input
// buffers' writes and fills the remaining memory cycles with refresh.
//
// Time is counted in memory cycles of two link clocks (mem_en marks the
// first clock of each). For every outgoing link that is sending a cell, the
// read of its next cell must start by frame clock 51 so that the cell is in
// the output buffer before the next delimiter. The link's multiplexing
// controller is told to finalise its choice (timeout) two memory cycles
// before that read. Timeouts are issued as late as possible: with d the
// number of memory cycles a link's timeout can still wait, a timeout is
// issued now if, for some k, more than k links have d <= k; the link with
// the smallest d (lowest index on a tie) gets it. Links whose cells end in
// the same or adjacent cycles are thereby pushed back one memory cycle each,
// up to three, the chip's conflict resolution. The read itself then happens
// in the memory cycle two after the timeout (the reserved slot).
// Memory cycle priority, as in the chip:
//   1. the reserved read of a link that was timed out two cycles ago
//   2. the write-back half of a refresh started in the previous cycle
//   3. an immediate read for an idle link (lowest link first)
//   4. a pending cell write (lowest input first); the row is the VC's
//      dedicated row, or a free shared row from the free list. A cell for a
//      VC that already holds one, or for a full shared pool, is dropped.
//   5. otherwise, if the next cycle holds no reserved read, a refresh read of
//      the row named by a rotating counter, written back in the next cycle.
// Reading a shared row returns it to the free list. Read data appear on the
// RAM output the clock after the read; rd_dst names the link that takes them.
// The as-late-as-possible rule and the priorities follow the chip; the
// deadline counting that implements them is this design's own circuit (the
// chip uses a cascade of tally modules fed by the buffers' shift registers).
module buf_sched
  import atm_pkg::*;
#(
  parameter int READ_LAST = 51   // last frame clock a read may start
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_en,
  // outgoing links
  input  logic [NLINK-1:0] out_busy,
  input  logic [5:0]       out_f [NLINK],
  input  logic [NLINK-1:0] frame_start,
  output logic [NLINK-1:0] timeout,
  input  logic [NLINK-1:0] pend_rd,
  input  row_t             pend_row [NLINK],
  output logic [NLINK-1:0] rd_done,
  input  logic [NLINK-1:0] imm_req,
  input  row_t             imm_row [NLINK],
  output logic [NLINK-1:0] imm_gnt,
  // incoming cell writes
  input  logic [NLINK-1:0] wr_req,
  input  link_t            wr_out [NLINK],
  input  vc_t              wr_vc  [NLINK],
  output logic [NLINK-1:0] wr_ack,
  output vc_t              chk_vc,
  input  logic [NLINK-1:0] chk_full,
  output logic [NLINK-1:0] fs_en,
  output vc_t              fs_vc,
  output logic [5:0]       fs_addr,
  // shared pool free list
  input  logic             any_free,
  input  logic [5:0]       free_idx,
  output logic             alloc,
  output logic             release_en,
  output logic [5:0]       rel_idx,
  // buffer RAM
  output logic [1:0]       ram_op,
  output logic             ram_ref_wr,
  output row_t             ram_addr,
  output link_t            ram_wsel,     // input buffer whose cell is written
  output logic             rd_dst_valid, // RAM data of the last read are valid now
  output link_t            rd_dst,
  // observation
  output logic [15:0]      cnt_conflict, // timeouts moved earlier by a conflict
  output logic [15:0]      cnt_refresh,
  output logic [15:0]      cnt_drop_full,
  output logic [15:0]      cnt_drop_pool
);

  localparam logic [1:0] OP_NONE = 2'd0, OP_READ = 2'd1, OP_WRITE = 2'd2, OP_REF = 2'd3;

  logic [NLINK-1:0] to_done;        // timeout given for the current frame
  logic [1:0]       to_hist_v;      // timeouts of the last two memory cycles
  link_t            to_hist_l [2];
  logic             ref_half;       // refresh write-back due
  row_t             ref_cnt;

  int               dl [NLINK];     // deadline in memory cycles, -1 = none
  logic             issue;
  link_t            issue_l;
  int               issue_d;

  // ---------------------------------------------------------------- timeouts
  always_comb begin
    int cnt_le;
    for (int o = 0; o < NLINK; o++) begin
      if (out_busy[o] && !to_done[o] && !frame_start[o]) begin
        dl[o] = ((READ_LAST - int'(out_f[o])) >>> 1) - 2;
        if (dl[o] < 0) dl[o] = 0;
      end else begin
        dl[o] = -1;
      end
    end
    issue   = 1'b0;
    issue_l = '0;
    issue_d = 1000;
    for (int o = 0; o < NLINK; o++)
      if (dl[o] >= 0 && dl[o] < issue_d) begin
        issue_d = dl[o];
        issue_l = link_t'(o);
      end
    for (int k = 0; k < NLINK; k++) begin
      cnt_le = 0;
      for (int o = 0; o < NLINK; o++) if (dl[o] >= 0 && dl[o] <= k) cnt_le++;
      if (cnt_le > k) issue = mem_en;
    end
  end

  always_comb begin
    timeout = '0;
    if (issue) timeout[issue_l] = 1'b1;
  end

  // ---------------------------------------------------------------- memory cycle
  link_t wi;
  logic  wfound;

  always_comb begin
    wi     = '0;
    wfound = 1'b0;
    for (int i = NLINK - 1; i >= 0; i--)
      if (wr_req[i]) begin
        wi     = link_t'(i);
        wfound = 1'b1;
      end
  end
  assign chk_vc = wr_vc[wi];

  always_comb begin
    logic  resv;

    ram_op     = OP_NONE;
    ram_ref_wr = 1'b0;
    ram_addr   = '0;
    ram_wsel   = '0;
    rd_done    = '0;
    imm_gnt    = '0;
    wr_ack     = '0;
    fs_en      = '0;
    fs_vc      = '0;
    fs_addr    = '0;
    alloc      = 1'b0;
    release_en = 1'b0;
    rel_idx    = '0;

    resv = to_hist_v[1] && pend_rd[to_hist_l[1]];

    if (mem_en) begin
      if (resv) begin
        ram_op   = OP_READ;
        ram_addr = pend_row[to_hist_l[1]];
        rd_done[to_hist_l[1]] = 1'b1;
      end else if (ref_half) begin
        ram_op     = OP_REF;
        ram_ref_wr = 1'b1;
      end else if (imm_req != '0) begin
        for (int o = NLINK - 1; o >= 0; o--)
          if (imm_req[o]) begin
            ram_addr = imm_row[o];
            imm_gnt  = '0;
            imm_gnt[o] = 1'b1;
          end
        ram_op = OP_READ;
      end else if (wfound) begin
        wr_ack[wi] = 1'b1;
        ram_wsel   = wi;
        if (!chk_full[wr_out[wi]]) begin
          if (wr_vc[wi] < vc_t'(NDED)) begin
            ram_op   = OP_WRITE;
            ram_addr = ded_row(wr_out[wi], wr_vc[wi]);
            fs_en[wr_out[wi]] = 1'b1;
          end else if (any_free) begin
            ram_op   = OP_WRITE;
            ram_addr = shared_row(free_idx);
            alloc    = 1'b1;
            fs_en[wr_out[wi]] = 1'b1;
          end
        end
        fs_vc   = wr_vc[wi];
        fs_addr = free_idx;
      end else if (!to_hist_v[0]) begin
        ram_op   = OP_REF;
        ram_addr = ref_cnt;
      end
      if (ram_op == OP_READ && ram_addr >= row_t'(NLINK * NDED)) begin
        release_en = 1'b1;
        rel_idx    = 6'(ram_addr - row_t'(NLINK * NDED));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      to_done       <= '0;
      to_hist_v     <= '0;
      to_hist_l[0]  <= '0;
      to_hist_l[1]  <= '0;
      ref_half      <= 1'b0;
      ref_cnt       <= '0;
      rd_dst_valid  <= 1'b0;
      rd_dst        <= '0;
      cnt_conflict  <= '0;
      cnt_refresh   <= '0;
      cnt_drop_full <= '0;
      cnt_drop_pool <= '0;
    end else begin
      to_done <= (to_done | timeout) & ~frame_start;
      rd_dst_valid <= mem_en && ram_op == OP_READ;
      if (mem_en && ram_op == OP_READ)
        for (int o = 0; o < NLINK; o++)
          if (rd_done[o] || imm_gnt[o]) rd_dst <= link_t'(o);
      if (mem_en) begin
        to_hist_v    <= {to_hist_v[0], issue};
        to_hist_l[1] <= to_hist_l[0];
        to_hist_l[0] <= issue_l;
        if (issue && issue_d > 0) cnt_conflict <= cnt_conflict + 16'd1;
        ref_half <= ram_op == OP_REF && !ram_ref_wr;
        if (ram_op == OP_REF && !ram_ref_wr) begin
          cnt_refresh <= cnt_refresh + 16'd1;
          ref_cnt <= (ref_cnt == row_t'(NROWS - 1)) ? '0 : ref_cnt + row_t'(1);
        end
        if (wr_ack != '0 && ram_op != OP_WRITE) begin
          if (chk_full[wr_out[wi]]) cnt_drop_full <= cnt_drop_full + 16'd1;
          else cnt_drop_pool <= cnt_drop_pool + 16'd1;
        end
      end
    end
  end

endmodule
