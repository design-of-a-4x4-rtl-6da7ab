// routing_table: VC translation and routing memory of one incoming link.
//
// 256 words of 11 bits: an open flag, the new 8-bit VC ID and the 2-bit
// outgoing link (the chip's figures). A lookup is issued with the VC ID of an
// arriving cell and answered two clocks later, the access delay the chip
// budgets for this memory: the address is registered in the first clock and
// the word in the second. Words are written by the configuration controller
// when a VC set-up cell opens or closes a VC. Reset clears every open flag
// (a closed table after a global reset), the other fields are not reset.
// A write and a lookup of the same word in the same clock return the old word.
module routing_table
  import atm_pkg::*;
#(
  parameter int DEPTH = NVC
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rd_en,
  input  vc_t       rd_vc,
  output rt_entry_t rd_data,   // valid two clocks after rd_en
  input  logic      wr_en,
  input  vc_t       wr_vc,
  input  rt_entry_t wr_data
);

  logic [DEPTH-1:0] open_q;
  logic [9:0]       mem [DEPTH];   // {new_vc, out_link}
  vc_t              addr_q;
  logic             rd_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_vc] <= {wr_data.new_vc, wr_data.out_link};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q  <= '0;
      addr_q  <= '0;
      rd_q    <= 1'b0;
      rd_data <= '0;
    end else begin
      if (wr_en) open_q[wr_vc] <= wr_data.valid;
      rd_q <= rd_en;
      if (rd_en) addr_q <= rd_vc;
      if (rd_q) rd_data <= '{valid: open_q[addr_q], new_vc: mem[addr_q][9:2],
                             out_link: mem[addr_q][1:0]};
    end
  end

endmodule
