// link_port: the five-wire double-data-rate pins of one bidirectional link.
//
// Each clock a link direction carries one 10-bit word {sig, data[7:0], fc}:
// the upper five bits while the clock is high, the lower five while it is
// low, so the data pins toggle at twice the clock rate while the clock pin
// does not. Transmit side: the word is registered at the rising edge; a
// rising-edge register and a falling-edge register whose XOR drives the pins
// make the pins show the upper half after the rising edge and the lower half
// after the falling edge, without the clock passing through a multiplexer.
// Receive side: the pins are sampled at the falling edge (upper half) and
// at the next rising edge (lower half), giving the word one clock after it
// was on the pins. Both chips of a link run from the same clock, as on the
// chip's boards (no synchroniser or elastic buffer). The five pins, ten bits
// per clock and word content are the chip's; the XOR pin driver is this
// design's choice.
module link_port
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t tx_word,
  output logic [4:0] tx_pins,
  input  logic [4:0] rx_pins,
  output link_word_t rx_word
);

  logic [4:0] p_q, n_q, lo_q, hi_cap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q     <= '0;
      lo_q    <= '0;
      rx_word <= '{sig: 1'b1, data: DELIM_BYTE, fc: 1'b0};
    end else begin
      p_q     <= tx_word[9:5] ^ n_q;
      lo_q    <= tx_word[4:0];
      rx_word <= {hi_cap, rx_pins};
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= '0;
      hi_cap <= 5'b10000;   // upper half of a delimiter word
    end else begin
      n_q    <= lo_q ^ p_q;
      hi_cap <= rx_pins;
    end
  end

  assign tx_pins = p_q ^ n_q;

endmodule
