// Seed generator: a bit-swapping ("modified") LFSR holding the X-filled seed.
// The state is an ordinary XOR LFSR that advances once per step pulse (the
// slow X-filler clock, one step per counter period). Its output x swaps the
// neighbouring bit pairs (Q1,Q2), (Q3,Q4), ... whenever the last bit Qn is 0
// and passes the state unchanged when Qn is 1; Qn itself is never swapped.
// The swap rule on the last bit follows the design description; applying it
// to the output rather than the stored state, the tap choice (x^5 + x^3 + 1
// by default) and the synchronous active-low reset to zero are this design's
// choices. An all-zero seed stays all-zero.
// Timing: x follows the state combinationally; the state changes one clock
// after load or step.
module seed_generator #(
  parameter int unsigned  N    = 5,
  parameter logic [N-1:0] TAPS = N'('b00101)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_val,
  input  logic         step,
  output logic [N-1:0] x
);

  logic [N-1:0] state;
  logic         unused_sout;

  lfsr #(.N(N), .TAPS(TAPS), .SEED('0)) u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (step),
    .load    (load),
    .seed_in (load_val),
    .sin     (1'b0),
    .q       (state),
    .sout    (unused_sout)
  );

  // Q1 is bit N-1 and Qn is bit 0: pair (Q1,Q2) is bits N-1 and N-2, etc.
  always_comb begin
    x = state;
    if (!state[0]) begin
      for (int k = int'(N) - 1; k >= 2; k -= 2) begin
        x[k]   = state[k-1];
        x[k-1] = state[k];
      end
    end
  end

endmodule
