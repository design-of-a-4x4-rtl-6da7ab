// cfg_ctrl: node-ID register and VC set-up for the whole chip.
//
// Cells that arrive on a VC that is not open in their link's routing table
// and whose type (top two bits of byte 1) is node-ID set-up or VC set-up
// are handed here by the input buffers (lowest input first, one per clock).
//   node-ID set-up: the 16-bit node ID in bytes 2..3 is loaded and the chip
//                   now has an identity.
//   VC set-up:      applied only if the chip has a node ID equal to bytes
//                   2..3. It writes the routing table of InLink at VCinit
//                   (open flag, VCtrans, OutLink) and opens or closes VCtrans
//                   in OutLink's scanning memory with its class, weight and
//                   source (InLink, VCinit). A weight of 0 is stored as 1.
// Set-up cells addressed to a VC that is open are ordinary cells and are
// forwarded, which is how a set-up travels through chips already configured.
// Byte layout of a set-up cell (this design's choice, the chip fixes only the
// fields): 2..3 node ID (high byte first), 4 bit 0 open, 5 bits 1..0 class,
// 6 VCinit, 7 VCtrans, 8 bits 1..0 InLink, 9 bits 1..0 OutLink,
// 10 bits 3..0 weight[11:8], 11 weight[7:0].
module cfg_ctrl
  import atm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NLINK-1:0] cfg_req,
  input  cell_type_e       cfg_type [NLINK],
  input  cell_t            cfg_cell [NLINK],
  output logic [NLINK-1:0] cfg_ack,
  // routing tables
  output logic [NLINK-1:0] rt_wr_en,
  output vc_t              rt_wr_vc,
  output rt_entry_t        rt_wr_data,
  // scanning memories
  output logic [NLINK-1:0] su_en,
  output vc_t              su_vc,
  output logic             su_valid,
  output logic [3:0]       su_cls,
  output logic [WEIGHT_W-1:0] su_weight,
  output link_t            su_src_link,
  output vc_t              su_src_vc,
  // state
  output logic             node_valid,
  output logic [NODEID_W-1:0] node_id,
  output logic [15:0]      cnt_setup,
  output logic [15:0]      cnt_ignored
);

  link_t      ci;
  logic       any;
  cell_t      c;
  logic [NODEID_W-1:0] fid;
  logic       is_setup, apply;
  link_t      in_l, out_l;
  logic [WEIGHT_W-1:0] w;

  function automatic logic [7:0] byt(cell_t cc, int k);
    return cc[8*k +: 8];
  endfunction

  always_comb begin
    ci  = '0;
    any = 1'b0;
    for (int i = NLINK - 1; i >= 0; i--)
      if (cfg_req[i]) begin
        ci  = link_t'(i);
        any = 1'b1;
      end
    c        = cfg_cell[ci];
    fid      = {byt(c, 2), byt(c, 3)};
    is_setup = cfg_type[ci] == CT_VCSETUP;
    apply    = any && is_setup && node_valid && fid == node_id;
    in_l     = byt(c, 8)[1:0];
    out_l    = byt(c, 9)[1:0];
    w        = {byt(c, 10)[3:0], byt(c, 11)};

    cfg_ack  = '0;
    if (any) cfg_ack[ci] = 1'b1;

    rt_wr_en   = '0;
    su_en      = '0;
    if (apply) begin
      rt_wr_en[in_l] = 1'b1;
      su_en[out_l]   = 1'b1;
    end
    rt_wr_vc    = byt(c, 6);
    rt_wr_data  = '{valid: byt(c, 4)[0], new_vc: byt(c, 7), out_link: out_l};
    su_vc       = byt(c, 7);
    su_valid    = byt(c, 4)[0];
    su_cls      = 4'(1) << byt(c, 5)[1:0];
    su_weight   = (w == '0) ? WEIGHT_W'(1) : w;
    su_src_link = in_l;
    su_src_vc   = byt(c, 6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node_valid  <= 1'b0;
      node_id     <= '0;
      cnt_setup   <= '0;
      cnt_ignored <= '0;
    end else if (any) begin
      if (cfg_type[ci] == CT_NODEID) begin
        node_valid <= 1'b1;
        node_id    <= fid;
      end else if (apply) begin
        cnt_setup <= cnt_setup + 16'd1;
      end else begin
        cnt_ignored <= cnt_ignored + 16'd1;
      end
    end
  end

endmodule
