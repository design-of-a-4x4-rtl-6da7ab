// tb_buf_sched: drives the central buffer controller with four outgoing
// links that send back-to-back 54-clock frames, four input buffers that
// raise random write requests, and a model of the VC-full flags and the
// shared free list. The testbench plays the multiplexing controllers: the
// clock after a link's timeout it asks for the reserved read of a stored
// cell of that link (or of any dedicated row when none is stored).
// Checks:
//   - each busy link gets exactly one timeout per frame, and its read comes
//     exactly two memory cycles later, no later than frame clock 51, from
//     the requested row; this holds with random link phases and with all
//     four links aligned (conflict case, which must move timeouts earlier);
//   - every write request is acknowledged; a cell for a VC that holds one
//     is dropped, a shared-VC cell takes the lowest free shared row or is
//     dropped when the pool is empty; a written cell sets its VC's full flag
//     (fs_en) on the right link; reading a shared row releases it;
//   - a refresh read is always followed by its write-back in the next cycle
//     and refresh cycles occur;
//   - an idle link's immediate read is granted within a few memory cycles;
//   - the drop counters agree with the model.
module tb_buf_sched;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic mem_en = 1'b0;
  always @(posedge clk) mem_en <= rst_n ? !mem_en : 1'b0;

  logic [NLINK-1:0] out_busy = '1, frame_start, timeout, pend_rd = '0, rd_done;
  logic [5:0] out_f [NLINK];
  row_t pend_row [NLINK], imm_row [NLINK];
  logic [NLINK-1:0] imm_req = '0, imm_gnt, wr_req = '0, wr_ack, chk_full, fs_en;
  link_t wr_out [NLINK];
  vc_t   wr_vc [NLINK], chk_vc, fs_vc;
  logic [5:0] fs_addr, free_idx, rel_idx;
  logic any_free, alloc, release_en, ram_ref_wr, rd_dst_valid;
  logic [1:0] ram_op;
  row_t ram_addr;
  link_t ram_wsel, rd_dst;
  logic [15:0] cnt_conflict, cnt_refresh, cnt_drop_full, cnt_drop_pool;

  buf_sched dut (.*);

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

  // ------------------------------------------------------------ models
  bit full [NLINK][NVC];
  int srow [NLINK][NVC];            // shared row index of a stored shared-VC cell
  bit pool_used [NSHARED];
  int exp_drop_full = 0, exp_drop_pool = 0;
  int to_cnt [NLINK];               // timeouts in the current frame
  longint to_t [NLINK];
  int frames_checked = 0, reads = 0, writes = 0, refreshes = 0, imm_grants = 0;

  always_comb begin
    any_free = 1'b0;
    free_idx = '0;
    for (int i = NSHARED - 1; i >= 0; i--)
      if (!pool_used[i]) begin any_free = 1'b1; free_idx = 6'(i); end
    for (int l = 0; l < NLINK; l++) chk_full[l] = full[l][chk_vc];
  end

  assign frame_start = (out_busy) & {out_f[3] == 0, out_f[2] == 0, out_f[1] == 0, out_f[0] == 0};

  bit  prev_ref_rd = 0;
  vc_t pend_vc [NLINK];
  bit  pend_any [NLINK];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < NLINK; l++) begin
        if (out_busy[l]) out_f[l] <= (out_f[l] == 6'(FRAME - 1)) ? 6'd0 : out_f[l] + 6'd1;
        if (frame_start[l]) begin
          if (cyc > 200 && to_cnt[l] >= 0) begin
            check(to_cnt[l] == 1, $sformatf("one timeout per frame on link %0d (%0d)", l, to_cnt[l]));
            frames_checked++;
          end
          to_cnt[l] = 0;
        end
        if (timeout[l]) begin
          to_cnt[l]++;
          to_t[l] = cyc;
          check(!pend_rd[l], "timeout while a read is pending");
          // choose a stored cell of this link, if any
          pend_any[l] = 0;
          pend_vc[l] = vc_t'($urandom_range(0, NDED - 1));
          for (int t = 0; t < 8 && !pend_any[l]; t++) begin
            automatic int v = $urandom_range(0, NVC - 1);
            if (full[l][v]) begin pend_any[l] = 1; pend_vc[l] = vc_t'(v); end
          end
          pend_row[l] <= (pend_vc[l] >= vc_t'(NDED) && pend_any[l])
                         ? shared_row(6'(srow[l][pend_vc[l]])) : ded_row(link_t'(l), pend_vc[l]);
          pend_rd[l] <= 1'b1;
        end
        if (rd_done[l]) begin
          reads++;
          check(cyc - to_t[l] == 4, $sformatf("read two memory cycles after the timeout (link %0d)", l));
          check(int'(out_f[l]) <= 51, $sformatf("read starts by frame clock 51 (link %0d, f=%0d)", l, out_f[l]));
          check(ram_op == 2'd1 && ram_addr == pend_row[l], "reserved read of the requested row");
          pend_rd[l] <= 1'b0;
          if (pend_any[l]) begin
            full[l][pend_vc[l]] = 0;
            if (pend_vc[l] >= vc_t'(NDED)) begin
              check(release_en && int'(rel_idx) == srow[l][pend_vc[l]], "shared row released on read");
              pool_used[srow[l][pend_vc[l]]] = 0;
            end
          end
        end
      end

      if (mem_en) begin
        if (prev_ref_rd) check(ram_op == 2'd3 && ram_ref_wr, "refresh write-back follows refresh read");
        prev_ref_rd = ram_op == 2'd3 && !ram_ref_wr;
        if (prev_ref_rd) refreshes++;
      end

      // writes
      for (int i = 0; i < NLINK; i++)
        if (wr_ack[i]) begin
          automatic int o = wr_out[i];
          automatic int v = wr_vc[i];
          check(mem_en && ram_wsel == link_t'(i), "write acknowledged on a memory cycle");
          if (full[o][v]) begin
            exp_drop_full++;
            check(ram_op != 2'd2 && fs_en == '0, "cell for a full VC dropped");
          end else if (v < NDED) begin
            check(ram_op == 2'd2 && ram_addr == ded_row(link_t'(o), vc_t'(v)), "write to the dedicated row");
            check(fs_en == 4'(1 << o) && fs_vc == vc_t'(v), "full flag set on the VC's link");
            full[o][v] = 1;
            writes++;
          end else if (!any_free) begin
            exp_drop_pool++;
            check(ram_op != 2'd2 && fs_en == '0, "cell dropped when the pool is empty");
          end else begin
            check(ram_op == 2'd2 && alloc && ram_addr == shared_row(free_idx), "write to the lowest free shared row");
            check(fs_en == 4'(1 << o) && fs_addr == free_idx, "full flag and shared index");
            full[o][v] = 1;
            srow[o][v] = int'(free_idx);
            pool_used[free_idx] = 1;
            writes++;
          end
          wr_req[i] <= 1'b0;
        end
    end
  end

  // input buffers: random write requests
  int wr_rate = 6;
  int vc_hi = NVC - 1;
  always @(negedge clk) begin
    if (rst_n)
      for (int i = 0; i < NLINK; i++)
        if (!wr_req[i] && $urandom_range(0, 99) < wr_rate) begin
          wr_req[i] = 1'b1;
          wr_out[i] = link_t'($urandom_range(0, NLINK - 1));
          wr_vc[i]  = vc_t'($urandom_range(0, 1) ? $urandom_range(0, 15) : $urandom_range(NDED, vc_hi));
        end
  end

  initial begin
    foreach (full[l, v]) begin full[l][v] = 0; srow[l][v] = 0; end
    foreach (pool_used[i]) pool_used[i] = 0;
    for (int l = 0; l < NLINK; l++) begin
      out_f[l] = 6'($urandom_range(0, FRAME - 1));
      pend_row[l] = '0; imm_row[l] = '0; wr_out[l] = '0; wr_vc[l] = '0;
      to_cnt[l] = 0; to_t[l] = 0; pend_vc[l] = '0; pend_any[l] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;

    // 1: random phases, moderate write load
    repeat (FRAME * 400) @(posedge clk);
    // 2: all four links aligned
    @(negedge clk);
    for (int l = 0; l < NLINK; l++) out_f[l] = out_f[0];
    for (int l = 0; l < NLINK; l++) to_cnt[l] = -100;   // the running frame is not checked
    begin
      automatic int c0 = int'(cnt_conflict);
      repeat (FRAME * 400) @(posedge clk);
      check(int'(cnt_conflict) > c0, "aligned links cause conflict resolution");
    end
    // 3: heavy load: the shared pool fills and cells are dropped
    wr_rate = 60;
    repeat (FRAME * 200) @(posedge clk);
    wr_rate = 6;
    repeat (FRAME * 50) @(posedge clk);
    // 4: link 3 idle, immediate reads
    @(negedge clk);
    while (pend_rd[3] || timeout[3]) @(negedge clk);
    out_busy[3] = 0;
    for (int n = 0; n < 50; n++) begin
      automatic longint t0;
      @(negedge clk);
      imm_req[3] = 1;
      imm_row[3] = ded_row(2'd3, vc_t'(n));
      t0 = cyc;
      while (!imm_gnt[3]) begin
        @(posedge clk);
        #1;
      end
      check(cyc - t0 <= 8 && ram_op == 2'd1 && ram_addr == imm_row[3], "immediate read granted quickly");
      imm_grants++;
      @(negedge clk);
      imm_req[3] = 0;
      repeat ($urandom_range(2, 30)) @(negedge clk);
    end

    check(int'(cnt_drop_full) == exp_drop_full, "drop-full counter");
    check(int'(cnt_drop_pool) == exp_drop_pool, "drop-pool counter");
    check(exp_drop_pool > 0 && exp_drop_full > 0, "both drop cases exercised");
    check(refreshes > 100 && int'(cnt_refresh) > 0, "refresh cycles");
    check(frames_checked > 3000 && reads > 3000, "frames and reads checked");
    $display("frames=%0d reads=%0d writes=%0d refreshes=%0d imm=%0d drop_full=%0d drop_pool=%0d conflicts=%0d",
             frames_checked, reads, writes, refreshes, imm_grants, exp_drop_full, exp_drop_pool, cnt_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
