// token_rx: deserialiser of permit tokens arriving on the flow-control bit
// of one incoming link direction.
//
// An idle line is 0. A 1 is a start bit; the next eight bits are the VC ID,
// most significant first. When the last bit is in, tk_valid pulses for one
// clock with the VC ID, which enables that VC in the outgoing link's
// scanning memory. Format as in token_tx.
module token_rx
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fc_in,
  output logic  tk_valid,
  output vc_t   tk_vc,
  output logic [15:0] cnt_tokens
);

  logic [3:0] bits;   // 0 = waiting for a start bit
  logic [6:0] sh;     // first seven VC bits received

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits       <= '0;
      sh         <= '0;
      tk_valid   <= 1'b0;
      tk_vc      <= '0;
      cnt_tokens <= '0;
    end else begin
      tk_valid <= 1'b0;
      if (bits == 4'd0) begin
        if (fc_in) bits <= 4'd8;
      end else begin
        sh   <= {sh[5:0], fc_in};
        bits <= bits - 4'd1;
        if (bits == 4'd1) begin
          tk_valid   <= 1'b1;
          tk_vc      <= {sh, fc_in};
          cnt_tokens <= cnt_tokens + 16'd1;
        end
      end
    end
  end

endmodule
