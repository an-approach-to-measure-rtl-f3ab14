// N-bit shift register: a chain of D flip-flops D1..Dn.
// On every enabled clock D1 takes the serial input and each later stage takes
// the value of its left neighbour, so data moves from Q1 towards Qn.
// Q1 is kept in the MSB of q, so q printed in binary reads Q1..Qn left to
// right. A parallel load (used to place a seed) has priority over shifting;
// load, enable and the synchronous active-low reset (to all zeros) are this
// design's additions, the chain itself follows the classic structure.
// Timing: q changes one clock after load or en is sampled high.
module shift_register #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] load_val,
  input  logic         sin,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= load_val;
    else if (en)   q <= {sin, q[N-1:1]};
  end

endmodule
