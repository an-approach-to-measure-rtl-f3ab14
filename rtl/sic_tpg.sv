// Single-input-change test pattern generator with an X-filled seed.
// An N-bit counter runs one count per enabled clock; the Gray encoder turns
// its value GC into a sequence in which consecutive words differ in one bit.
// The test pattern is SG = X xor GC, where X is the seed vector from the
// bit-swapping seed generator. Because X is constant while the counter runs,
// SG is also single-input-change. The seed advances only when the NOR of
// the counter bits is true, i.e. once every 2^N test clocks (the text's
// TCK/2^m X-filler clock).
// start fills the test cube (zero, one or adjacent fill), loads it as the
// seed and clears the counter; the first pattern is then X xor 0 = X.
// The AND-gated seed clock is written as a clock enable: seed_step is
// en AND NOR(count_next), so the seed changes on the same edge at which the
// counter returns to zero. Using an enable instead of a gated clock is this
// design's choice. Timing: a new pattern on sg each clock with en high.
module sic_tpg
  import tpg_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [N-1:0] cube_val,
  input  logic [N-1:0] cube_care,
  input  fill_mode_t   fill_mode,
  output logic [N-1:0] sg,
  output logic         seed_step
);

  logic [N-1:0] count, count_next, gc, seed, x;
  logic         nor_c;

  nbit_counter #(.N(N)) u_counter (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (en),
    .clr        (start),
    .count      (count),
    .count_next (count_next)
  );

  gray_encoder #(.N(N)) u_gray (
    .c  (count),
    .gc (gc)
  );

  x_filler #(.N(N)) u_fill (
    .cube_val  (cube_val),
    .cube_care (cube_care),
    .mode      (fill_mode),
    .seed      (seed)
  );

  assign nor_c     = ~|count_next;
  assign seed_step = en && !start && nor_c;

  seed_generator #(.N(N)) u_seed (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (start),
    .load_val (seed),
    .step     (seed_step),
    .x        (x)
  );

  assign sg = x ^ gc;

endmodule
