// input_buffer: double-buffered cell assembly for one incoming link, with the
// link's cut-through bus.
//
// Bytes of a cell (sig = 0) are loaded one per clock into the upper latches,
// indexed by a load counter that a delimiter (sig = 1) resets; a cell that is
// cut short by a delimiter is discarded, so one lost byte never costs more
// than one cell of framing. The VC ID (byte 0) is looked up in the link's
// routing table as soon as it arrives; the answer comes two clocks later.
// The cycle after the 53rd byte, the cell is copied into the lower latches
// (double buffering) with byte 0 replaced by the translated VC ID, and its
// disposition is decided:
//   - open VC                 -> write request to the buffer RAM (wr_req)
//   - closed VC, node-ID or VC set-up cell -> configuration request (cfg_req)
//   - anything else           -> dropped
//   - cell already cut through -> nothing more to do.
// While the header is routed and at most CT_LIMIT bytes have arrived, the
// cell is offered to its outgoing link for cut-through (ct_ok). When that
// link claims it (ct_claim), the cut-through bus is reserved until the
// outgoing link reports the end of that frame (ct_done); the bus drives the
// byte the outgoing link asks for (ct_idx), with byte 0 replaced by the new
// VC ID. The load counter always runs ahead of ct_idx, and the next cell's
// bytes overwrite only latches that have already been forwarded.
// The structure (upper/lower latches, one cut-through bus, routing lookup on
// the header byte) follows the chip; the CT_LIMIT bound and the request
// handshakes are this design's choices. The lower latches must be emptied
// (wr_ack/cfg_ack) before the next cell completes; otherwise the next cell
// overwrites them and an overrun is counted.
module input_buffer
  import atm_pkg::*;
#(
  parameter int CT_LIMIT = 36   // latest load count at which cut-through may be granted
) (
  input  logic       clk,
  input  logic       rst_n,
  // from the link receiver
  input  logic       rx_sig,
  input  logic [7:0] rx_data,
  // routing table port (2-clock read latency)
  output logic       rt_rd_en,
  output vc_t        rt_rd_vc,
  input  rt_entry_t  rt_rd_data,
  // current incoming cell, for cut-through
  output logic       ct_ok,       // cell may be cut through now
  output link_t      hdr_out,     // its outgoing link
  output vc_t        hdr_vc,      // its translated VC ID
  input  logic       ct_claim,    // outgoing link hdr_out takes it
  input  logic [5:0] ct_idx,      // byte the cut-through bus must drive
  output logic [7:0] ct_byte,
  input  logic       ct_done,     // cut-through frame finished
  // write request for the assembled cell (lower latches)
  output logic       wr_req,
  output link_t      wr_out,
  output vc_t        wr_vc,
  output cell_t      lower_cell,
  input  logic       wr_ack,
  // configuration request (closed VC, node-ID or VC set-up cell)
  output logic       cfg_req,
  output cell_type_e cfg_type,
  input  logic       cfg_ack,
  // event counters
  output logic [15:0] cnt_cells,     // complete cells received
  output logic [15:0] cnt_frame_err, // cells cut short by a delimiter
  output logic [15:0] cnt_drop,      // cells on closed VCs that are not set-up cells
  output logic [15:0] cnt_overrun    // lower latches overwritten before use
);

  logic [7:0] upper [CELL_BYTES];
  logic [5:0] ld_cnt;            // bytes of the current cell received
  logic [1:0] rt_pipe;           // routing lookup in flight
  logic       hdr_routed;        // rt result valid for the current cell
  rt_entry_t  hdr_rt;
  cell_type_e hdr_type;
  logic       ct_claimed;        // current cell is being cut through
  vc_t        ct_vc_q;
  logic       copy_pend;         // 53rd byte latched, copy next clock
  logic       ct_busy;           // cut-through bus in use

  wire byte_in = !rx_sig;

  assign rt_rd_en = byte_in && ld_cnt == 6'd0;
  assign rt_rd_vc = rx_data;

  assign hdr_out = hdr_rt.out_link;
  assign hdr_vc  = hdr_rt.new_vc;
  assign ct_ok   = hdr_routed && hdr_rt.valid && !ct_claimed && !ct_busy &&
                   ld_cnt >= 6'd2 && ld_cnt <= 6'(CT_LIMIT) && !copy_pend;

  assign ct_byte = (ct_idx == 6'd0) ? ct_vc_q
                 : (ct_idx < 6'(CELL_BYTES)) ? upper[ct_idx] : 8'h00;

  always_ff @(posedge clk) begin
    if (byte_in && ld_cnt < 6'(CELL_BYTES)) upper[ld_cnt] <= rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt        <= '0;
      rt_pipe       <= '0;
      hdr_routed    <= 1'b0;
      hdr_rt        <= '0;
      hdr_type      <= CT_NORMAL;
      ct_claimed    <= 1'b0;
      ct_busy       <= 1'b0;
      ct_vc_q       <= '0;
      copy_pend     <= 1'b0;
      wr_req        <= 1'b0;
      cfg_req       <= 1'b0;
      wr_out        <= '0;
      wr_vc         <= '0;
      cfg_type      <= CT_NORMAL;
      cnt_cells     <= '0;
      cnt_frame_err <= '0;
      cnt_drop      <= '0;
      cnt_overrun   <= '0;
    end else begin
      rt_pipe <= {rt_pipe[0], rt_rd_en};
      if (rt_pipe[1]) begin
        hdr_rt     <= rt_rd_data;
        hdr_routed <= 1'b1;
      end
      if (byte_in && ld_cnt == 6'd1) hdr_type <= cell_type_e'(rx_data[7:6]);

      // load counter and framing
      if (rx_sig) begin
        if (ld_cnt != 6'd0 && ld_cnt != 6'(CELL_BYTES))
          cnt_frame_err <= cnt_frame_err + 16'd1;
        ld_cnt <= '0;
        if (ld_cnt != 6'(CELL_BYTES)) begin
          hdr_routed <= 1'b0;
          ct_claimed <= 1'b0;
        end
      end else if (ld_cnt < 6'(CELL_BYTES)) begin
        ld_cnt <= ld_cnt + 6'd1;
        if (ld_cnt == 6'(CELL_BYTES - 1)) copy_pend <= 1'b1;
      end

      if (ct_claim && ct_ok) begin
        ct_claimed <= 1'b1;
        ct_busy    <= 1'b1;
        ct_vc_q    <= hdr_rt.new_vc;
      end else if (ct_done) begin
        ct_busy <= 1'b0;
      end

      if (wr_ack)  wr_req  <= 1'b0;
      if (cfg_ack) cfg_req <= 1'b0;

      // double buffering: copy and decide what becomes of the cell
      if (copy_pend) begin
        copy_pend  <= 1'b0;
        cnt_cells  <= cnt_cells + 16'd1;
        hdr_routed <= 1'b0;
        ct_claimed <= 1'b0;
        if (!ct_claimed) begin
          if ((wr_req && !wr_ack) || (cfg_req && !cfg_ack))
            cnt_overrun <= cnt_overrun + 16'd1;
          wr_req  <= 1'b0;
          cfg_req <= 1'b0;
          if (hdr_rt.valid) begin
            wr_req <= 1'b1;
            wr_out <= hdr_rt.out_link;
            wr_vc  <= hdr_rt.new_vc;
          end else if (hdr_type == CT_NODEID || hdr_type == CT_VCSETUP) begin
            cfg_req  <= 1'b1;
            cfg_type <= hdr_type;
          end else begin
            cnt_drop <= cnt_drop + 16'd1;
          end
        end
      end
    end
  end

  // lower latches
  always_ff @(posedge clk) begin
    if (copy_pend && !ct_claimed) begin
      for (int k = 0; k < CELL_BYTES; k++) lower_cell[8*k +: 8] <= upper[k];
      if (hdr_rt.valid) lower_cell[7:0] <= hdr_rt.new_vc;
    end
  end

endmodule
