// N-bit binary up-counter C[n-1:0] of the single-input-change generator.
// It counts one per enabled clock and wraps from all ones to zero.
// count_next is the value the counter takes at the next enabled clock; the
// generator uses it to detect the return to zero one clock early.
// Synchronous active-low reset and synchronous clear (both to zero) are this
// design's choice. Timing: count changes one clock after en.
module nbit_counter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  output logic [N-1:0] count,
  output logic [N-1:0] count_next
);

  assign count_next = count + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (en)       count <= count_next;
  end

endmodule
