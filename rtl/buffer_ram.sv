// buffer_ram: the shared cell buffer, one 424-bit ATM cell per row.
//
// 576 rows: rows 0..511 are dedicated one-to-one to VCs 0..127 of the four
// outgoing links, rows 512..575 form the 64-cell pool shared by VCs 128..255
// of all links. Every access moves a whole cell in parallel, which is what
// gives the single-ported memory the bandwidth of 4 reads and 4 writes per
// cell time. One access is made per memory cycle (two link clocks); the
// request is presented on the clock where mem_en is high.
//   OP_READ   : rdata <= row, available on the next clock.
//   OP_WRITE  : row <= wdata.
//   OP_REF_RD : refresh, first half: the row is read into a refresh latch.
//   OP_REF_WR : refresh, second half: the latch is written back to the row it
//               came from.
// The chip builds this array from three-transistor dynamic cells, which lose
// their charge and need the two-cycle read/write refresh the central
// controller schedules; here the array is ordinary storage, so refresh
// leaves the contents unchanged, as it must. Memory content is not reset.
module buffer_ram
  import atm_pkg::*;
#(
  parameter int ROWS  = NROWS,
  parameter int WIDTH = CELL_BITS
) (
  input  logic             clk,
  input  logic             mem_en,
  input  logic [1:0]       op,      // 0 idle, 1 read, 2 write, 3 refresh half
  input  logic             ref_wr,  // with op 3: 0 = refresh read, 1 = refresh write-back
  input  row_t             addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  localparam logic [1:0] OP_READ = 2'd1, OP_WRITE = 2'd2, OP_REF = 2'd3;

  logic [WIDTH-1:0] mem [ROWS];
  logic [WIDTH-1:0] ref_latch;
  row_t             ref_row;

  always_ff @(posedge clk) begin
    if (mem_en) begin
      unique case (op)
        OP_READ:  rdata <= mem[addr];
        OP_WRITE: mem[addr] <= wdata;
        OP_REF: begin
          if (!ref_wr) begin
            ref_latch <= mem[addr];
            ref_row   <= addr;
          end else begin
            mem[ref_row] <= ref_latch;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
