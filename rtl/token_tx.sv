// token_tx: queue and serialiser of permit tokens sent to the upstream chip
// over the flow-control bit of one link direction.
//
// Whenever a cell that came in on this link is selected for transmission,
// its upstream VC ID is queued here (several multiplexing controllers may
// push in the same clock; they enter in link order). A token is a start bit
// 1 followed by the eight VC ID bits, most significant first, so one token
// takes 9 clocks and six fit in one 54-clock cell time, more than the four
// a cell time can create. Queued tokens follow each other without a gap;
// between tokens the bit is 0. The 9-clock token is
// the chip's (8-bit VC IDs per link); the queue depth and bit order are this
// design's choices. A push into a full queue is lost and counted.
module token_tx
  import atm_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int NP    = NLINK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NP-1:0] push,
  input  vc_t           push_vc [NP],
  output logic          fc_out,
  output logic [15:0]   cnt_sent,
  output logic [15:0]   cnt_lost
);

  localparam int AW = $clog2(DEPTH);

  vc_t         q [DEPTH];
  logic [AW:0] count;
  logic [AW-1:0] rd_p, wr_p;
  logic [8:0]  shreg;
  logic [3:0]  bits_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      rd_p      <= '0;
      wr_p      <= '0;
      shreg     <= '0;
      bits_left <= '0;
      cnt_sent  <= '0;
      cnt_lost  <= '0;
    end else begin
      automatic logic [AW:0]   c  = count;
      automatic logic [AW-1:0] wp = wr_p;
      automatic logic [15:0]   lost = cnt_lost;
      // serialiser
      if (bits_left > 4'd1) begin
        shreg     <= {shreg[7:0], 1'b0};
        bits_left <= bits_left - 4'd1;
      end else if (c != '0) begin
        shreg     <= {1'b1, q[rd_p]};
        bits_left <= 4'd9;
        rd_p      <= rd_p + AW'(1);
        c         = c - 1'b1;
        cnt_sent  <= cnt_sent + 16'd1;
      end else begin
        shreg     <= '0;
        bits_left <= '0;
      end
      // pushes
      for (int i = 0; i < NP; i++) begin
        if (push[i]) begin
          if (c < (AW+1)'(DEPTH)) begin
            q[wp] <= push_vc[i];
            wp = wp + AW'(1);
            c  = c + 1'b1;
          end else begin
            lost = lost + 16'd1;
          end
        end
      end
      count    <= c;
      wr_p     <= wp;
      cnt_lost <= lost;
    end
  end

  // the start bit leaves in the clock after a token is loaded
  assign fc_out = bits_left != 4'd0 && shreg[8];

endmodule
