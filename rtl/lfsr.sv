// External-XOR (Type I) linear feedback shift register.
// D1 receives the XOR of the tapped stages and the serial input IN; all other
// stages shift right (Q1 -> Q2 -> ... -> Qn), and the output OP is Qn.
// TAPS holds one bit per stage, Q1 in the MSB. The default taps Q3 and Q5
// (x^5 + x^3 + 1) with seed 11111 give the maximal 31-pattern sequence
// 11111, 01111, 00111, 00011, 10001, ... and back to 11111; that choice of
// taps is derived from the reference LFSR pattern table, not stated as such.
// Reset loads SEED; load takes seed_in. A seed of all zeros locks the
// register at zero (with sin = 0), as for any XOR LFSR.
// Timing: one new state per clock with en high.
module lfsr #(
  parameter int unsigned N    = 5,
  parameter logic [N-1:0] TAPS = N'('b00101),
  parameter logic [N-1:0] SEED = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed_in,
  input  logic         sin,
  output logic [N-1:0] q,
  output logic         sout
);

  logic         fb;
  logic [N-1:0] load_val;

  assign fb       = (^(q & TAPS)) ^ sin;
  assign load_val = rst_n ? seed_in : SEED;
  assign sout     = q[0];

  // The register is the plain shift chain; reset is expressed as a load of
  // SEED so that the chain itself never has to know the seed.
  shift_register #(.N(N)) u_sr (
    .clk      (clk),
    .rst_n    (1'b1),
    .en       (en),
    .load     (load || !rst_n),
    .load_val (load_val),
    .sin      (fb),
    .q        (q)
  );

endmodule
