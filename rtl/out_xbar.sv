// out_xbar: the outgoing-link crossbar and cut-through bus steering.
//
// Each outgoing link is fed either from its own output buffer or from the
// cut-through bus of one input buffer (four 4-to-1 byte multiplexers). For
// each input buffer whose bus is in use, the crossbar tells it which byte
// to drive (the using link's frame clock minus one) and when that frame has
// ended. The link words are registered before they leave, standing for the
// chip's latch at the crossbar output, so a link carries each byte one
// clock after the frame counter reaches it.
// The multiplexer structure is the chip's; the registered output stage is
// this design's timing choice (the chip budgets the same clock).
module out_xbar
  import atm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NLINK-1:0] busy,
  input  logic [5:0]       f       [NLINK],
  input  logic [NLINK-1:0] cur_ct,
  input  link_t            cur_in  [NLINK],
  input  logic [NLINK-1:0] ob_ct_done,
  input  logic [NLINK-1:0] ob_sig,
  input  logic [7:0]       ob_byte [NLINK],
  input  logic [7:0]       ct_byte [NLINK],   // per input buffer
  output logic [5:0]       ct_idx  [NLINK],   // per input buffer
  output logic [NLINK-1:0] ct_done,           // per input buffer
  output logic [NLINK-1:0] tx_sig,
  output logic [7:0]       tx_data [NLINK]
);

  always_comb begin
    for (int i = 0; i < NLINK; i++) begin
      ct_idx[i]  = '0;
      ct_done[i] = 1'b0;
      for (int o = 0; o < NLINK; o++) begin
        if (busy[o] && cur_ct[o] && cur_in[o] == link_t'(i)) begin
          ct_idx[i] = (f[o] == 6'd0) ? 6'd0 : f[o] - 6'd1;
          if (ob_ct_done[o]) ct_done[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sig <= '1;
      for (int o = 0; o < NLINK; o++) tx_data[o] <= DELIM_BYTE;
    end else begin
      for (int o = 0; o < NLINK; o++) begin
        tx_sig[o]  <= ob_sig[o];
        tx_data[o] <= (busy[o] && cur_ct[o] && !ob_sig[o]) ? ct_byte[cur_in[o]] : ob_byte[o];
      end
    end
  end

endmodule
