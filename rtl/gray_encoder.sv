// Binary-to-Gray encoder (the phase-shifting stage after the counter).
// GC[i] = C[i] xor C[i+1] for i < n-1 and GC[n-1] = C[n-1], so two
// consecutive counter values give outputs that differ in exactly one bit.
// Purely combinational; the equations are those of the design description.
module gray_encoder #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] c,
  output logic [N-1:0] gc
);

  always_comb begin
    gc[N-1] = c[N-1];
    for (int i = 0; i < int'(N) - 1; i++)
      gc[i] = c[i] ^ c[i+1];
  end

endmodule
