// tb_input_buffer: sends a stream of cells (open and closed VCs, all four
// cell types, some cut short by a delimiter) into one input buffer, answers
// its routing lookups from a model table two clocks after each request, and
// plays the outgoing side: it sometimes claims an offered cell for
// cut-through and then reads the cut-through bus byte by byte as an output
// link would, one frame later. Checks: lookups carry byte 0; an offered cell
// is offered with its routed link and new VC, only after its header is
// routed and while at most 36 bytes have arrived; a claimed cell's bytes
// come out of the bus unchanged except byte 0 (new VC) and it is not
// written; every other complete cell on an open VC raises a write request
// with its link, new VC and the translated cell in the lower latches; a
// node-ID or set-up cell on a closed VC raises a configuration request with
// its type; others are dropped; truncated cells are counted as framing
// errors.
module tb_input_buffer;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic       rx_sig, rt_rd_en, ct_ok, ct_claim, ct_done, wr_req, wr_ack, cfg_req, cfg_ack;
  logic [7:0] rx_data, ct_byte;
  vc_t        rt_rd_vc, hdr_vc, wr_vc;
  rt_entry_t  rt_rd_data;
  link_t      hdr_out, wr_out;
  logic [5:0] ct_idx;
  cell_t      lower_cell;
  cell_type_e cfg_type;
  logic [15:0] cnt_cells, cnt_frame_err, cnt_drop, cnt_overrun;

  input_buffer #(.CT_LIMIT(36)) dut (
    .clk, .rst_n, .rx_sig, .rx_data, .rt_rd_en, .rt_rd_vc, .rt_rd_data, .ct_ok, .hdr_out,
    .hdr_vc, .ct_claim, .ct_idx, .ct_byte, .ct_done, .wr_req, .wr_out, .wr_vc, .lower_cell,
    .wr_ack, .cfg_req, .cfg_type, .cfg_ack, .cnt_cells, .cnt_frame_err, .cnt_drop, .cnt_overrun);

  int checks = 0, failures = 0;
  int n_wr = 0, n_cfg = 0, n_ct = 0, n_drop = 0, n_trunc = 0;
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
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rt_entry_t table_m [NVC];

  // routing table model: registered address, registered data
  vc_t rq [1];
  bit  rv [1];
  always @(posedge clk) begin
    rt_rd_data <= table_m[rq[0]];
    rq[0] <= rt_rd_vc; rv[0] <= rt_rd_en;
  end

  // the cell being received and its fate
  cell_t cur_cell;
  int    ld = 0;          // bytes of cur_cell sent
  bit    claimed = 0;
  bit    cur_trunc = 0;
  bit    want_ct = 0;      // the outgoing side will claim this cell
  int    ct_at = 0;        // not before this many bytes

  // outgoing side: cut-through reader
  int    ct_wait = -1;    // clocks until the frame starts
  int    ct_pos = -1;
  cell_t ct_cell;
  always @(negedge clk) begin
    ct_claim = 0;
    ct_done  = 0;
    if (ct_pos >= 0) begin
      ct_idx = 6'(ct_pos);
      #1;
      check(ct_byte == ((ct_pos == 0) ? table_m[ct_cell[7:0]].new_vc : ct_cell[8*ct_pos +: 8]),
            $sformatf("cut-through byte %0d", ct_pos));
      if (ct_pos == CELL_BYTES - 1) begin
        ct_done = 1;
        ct_pos = -1;
      end else ct_pos++;
    end else if (ct_wait > 0) begin
      ct_wait--;
      if (ct_wait == 0) ct_pos = 0;
    end else if (ct_ok && !claimed && !cur_trunc && want_ct && ld >= ct_at) begin
      automatic rt_entry_t e = table_m[cur_cell[7:0]];
      check(ld >= 2 && ld <= 36, $sformatf("offered with %0d bytes in", ld));
      check(hdr_out == e.out_link && hdr_vc == e.new_vc && e.valid, "offer carries the route");
      ct_claim = 1;
      claimed  = 1;
      ct_cell  = cur_cell;
      ct_wait  = $urandom_range(1, 12);
      n_ct++;
    end
  end

  // disposition monitor and acknowledgements
  typedef struct { cell_t c; bit claimed; } done_t;
  done_t done_q [$];
  int ack_wait = -1;
  always @(negedge clk) begin
    wr_ack  = 0;
    cfg_ack = 0;
    if (ack_wait > 0) ack_wait--;
    else if (ack_wait == 0) begin
      if (wr_req) wr_ack = 1;
      if (cfg_req) cfg_ack = 1;
      ack_wait = -1;
    end
  end
  always @(posedge clk) begin
    if (rst_n && (wr_req || cfg_req) && ack_wait < 0 && !wr_ack && !cfg_ack) begin
      check(done_q.size() > 0, "request without a cell");
      if (done_q.size() > 0) begin
        automatic done_t d = done_q.pop_front();
        automatic rt_entry_t e = table_m[d.c[7:0]];
        automatic cell_t x = d.c;
        automatic cell_type_e t = cell_type_e'(d.c[15:14]);
        // skip cells that needed no request
        while (d.claimed || (!e.valid && t != CT_NODEID && t != CT_VCSETUP)) begin
          if (done_q.size() == 0) break;
          d = done_q.pop_front();
          e = table_m[d.c[7:0]];
          t = cell_type_e'(d.c[15:14]);
        end
        x = d.c;
        x[7:0] = e.new_vc;
        if (e.valid) begin
          check(wr_req && !cfg_req && wr_out == e.out_link && wr_vc == e.new_vc && lower_cell == x,
                $sformatf("write request %b/%b out %0d/%0d vc %0d/%0d cell %b", wr_req, cfg_req, wr_out, e.out_link, wr_vc, e.new_vc, lower_cell == x));
          n_wr++;
        end else begin
          check(cfg_req && !wr_req && cfg_type == t && lower_cell == d.c, "configuration request");
          n_cfg++;
        end
      end
      ack_wait = $urandom_range(1, 30);
    end
  end

  initial begin
    rx_sig = 1; rx_data = DELIM_BYTE; ct_idx = 0; ct_claim = 0; ct_done = 0;
    wr_ack = 0; cfg_ack = 0; rt_rd_data = '0;
    rq[0] = 0; rv[0] = 0;
    for (int i = 0; i < NVC; i++)
      table_m[i] = '{valid: $urandom_range(3) != 0, new_vc: vc_t'($urandom), out_link: link_t'($urandom)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int len;
      for (int i = 0; i < CELL_BYTES; i++) cur_cell[8*i +: 8] = 8'($urandom);
      ld = 0;
      claimed = 0;
      cur_trunc = $urandom_range(24) == 0;
      want_ct = $urandom_range(2) == 0;
      ct_at = $urandom_range(40);
      len = cur_trunc ? $urandom_range(3, 50) : CELL_BYTES;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        #2;
        rx_sig = 0;
        rx_data = cur_cell[8*i +: 8];
        @(posedge clk);
        ld = i + 1;
      end
      if (cur_trunc) n_trunc++;
      else begin
        automatic done_t d;
        d.c = cur_cell;
        d.claimed = claimed;
        done_q.push_back(d);
        if (!claimed && !table_m[cur_cell[7:0]].valid &&
            cur_cell[15:14] != 2'(CT_NODEID) && cur_cell[15:14] != 2'(CT_VCSETUP)) n_drop++;
      end
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        #2;
        rx_sig = 1;
        rx_data = DELIM_BYTE;
      end
      @(posedge clk);
    end
    repeat (100) @(posedge clk);
    check(cnt_frame_err == 16'(n_trunc), $sformatf("framing errors %0d expected %0d", cnt_frame_err, n_trunc));
    check(cnt_drop == 16'(n_drop), $sformatf("drops %0d expected %0d", cnt_drop, n_drop));
    check(cnt_overrun == 0, "no overrun");
    check(n_ct > 100 && n_wr > 100 && n_cfg > 20 && n_trunc > 10, "all cases seen");
    $display("cut-through %0d, writes %0d, configuration %0d, dropped %0d, truncated %0d",
             n_ct, n_wr, n_cfg, n_drop, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
