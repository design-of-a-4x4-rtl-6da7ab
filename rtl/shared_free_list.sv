// shared_free_list: empty/full flags of the 64-cell shared buffer pool and
// the priority enforcer that finds a free row.
//
// One flag per shared row (1 = holds a cell). free_idx is the lowest-numbered
// empty row and any_free says whether there is one; both are combinational.
// alloc marks free_idx full; release marks rel_idx empty (when its cell is
// read out). Both may happen in the same clock. Reset empties the pool.
// The flag-plus-priority-encoder free list is the chip's; lowest index
// first is this design's choice of priority order.
module shared_free_list
  import atm_pkg::*;
#(
  parameter int N = NSHARED
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 any_free,
  output logic [$clog2(N)-1:0] free_idx,
  input  logic                 alloc,
  input  logic                 release_en,
  input  logic [$clog2(N)-1:0] rel_idx,
  output logic [$clog2(N):0]   n_used
);

  logic [N-1:0] used;

  always_comb begin
    any_free = 1'b0;
    free_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!used[i]) begin
        any_free = 1'b1;
        free_idx = ($clog2(N))'(i);
      end
    end
  end

  always_comb begin
    n_used = '0;
    for (int i = 0; i < N; i++) n_used += ($clog2(N)+1)'(used[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) used <= '0;
    else begin
      if (release_en) used[rel_idx] <= 1'b0;
      if (alloc && any_free) used[free_idx] <= 1'b1;
    end
  end

endmodule
