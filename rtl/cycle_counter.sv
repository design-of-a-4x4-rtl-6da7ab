// cycle_counter: next value of the scan-cycle label counter, jumping over
// sterile bit positions, and the rightmost-1 decoder that drives the weight
// bus of the scanning memory.
//
// Scan cycles are labelled 1 .. 2^W-1. A VC of weight w is visited in every
// cycle whose label's rightmost 1 sits at a bit position where w has a 1, so
// bit j of w buys (2^W)/2^(j+1) visits per 2^W-1 cycles. pos is that
// rightmost-1 position in one-hot form.
// A position found "sterile" (no ready VC of the class has that weight bit)
// is marked in mask; the next label is the smallest one above cnt whose
// rightmost 1 is not sterile. With k the length of the run of sterile
// positions starting at bit 0 (the least-significant sterile string), the
// low k bits are cleared and 1 is added at bit k, or 2 at bit k when bit k
// is 1 and the first 0 above it is a sterile position (an imaginary bit W is
// always sterile, which wraps 2^W-1 round to a small label, never 0).
// Purely combinational; the label register lives in the multiplexing FSM.
// The algorithm is the chip's; the dynamic carry-chain circuit it uses is
// replaced by ordinary logic. The adder is one bit wider than the label;
// its top bit (the carry out of the wrap from 2^W-1) is dropped on purpose.
module cycle_counter #(
  parameter int W = 12
) (
  input  logic [W-1:0] cnt,
  input  logic [W-1:0] mask,     // 1 = sterile bit position
  output logic [W-1:0] next_cnt,
  output logic [W-1:0] pos       // one-hot rightmost 1 of cnt
);

  int k;           // length of the LS sterile string
  int p;           // first 0 of cnt above bit k (W if none)
  logic [W:0] hi;  // cnt with the LS sterile string cleared, one spare bit
  logic [W:0] sum;  // bit W is the carry out of the wrap, dropped

  always_comb begin
    pos = cnt & (~cnt + W'(1));

    k = W;
    for (int i = W - 1; i >= 0; i--) if (!mask[i]) k = i;

    p = W;
    for (int i = W - 1; i >= 0; i--) if (i > k && !cnt[i]) p = i;

    hi = {1'b0, cnt};
    for (int i = 0; i < W; i++) if (i < k) hi[i] = 1'b0;

    if (k >= W) begin
      sum = {1'b0, cnt};               // every position sterile: hold
    end else if (!cnt[k]) begin
      sum = hi + ((W+1)'(1) << k);     // case (a), bit k itself is 0
    end else if (p >= W || mask[p]) begin
      sum = hi + ((W+1)'(2) << k);     // case (b)
    end else begin
      sum = hi + ((W+1)'(1) << k);     // case (a)
    end
    next_cnt = sum[W-1:0];
  end

endmodule
