// Pattern generation and transition-density screening, end to end.
// Two generators produce N-bit test patterns: a conventional XOR LFSR and
// the single-input-change generator whose seed is an X-filled test cube.
// src_sel picks one; while run is high it produces one pattern per clock.
// Each pattern goes to the transition-density meter (per-pattern switching
// activity and TD, pattern-to-pattern changes, sequence totals) and then to
// the pattern store, which keeps the patterns whose TD is at or below
// td_limit. start reloads both generators (LFSR seed all ones, SIC seed from
// the filled cube) and clears the meter and the store.
// lfsr_op is the LFSR's serial output OP (its last stage).
// Timing: pattern/pattern_valid show the generator's current word; the
// measured values (sa, td, totals) appear one clock later and saved_count
// one clock after that. Both generators and the screening flow follow the
// design description; selecting between them with src_sel and the store
// interface are this design's choices.
module tpg_td_top
  import tpg_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     src_sel,
  input  logic                     start,
  input  logic                     run,
  input  logic [N-1:0]             cube_val,
  input  logic [N-1:0]             cube_care,
  input  fill_mode_t               fill_mode,
  input  logic [TD_W-1:0]          td_limit,
  output logic [N-1:0]             pattern,
  output logic                     lfsr_op,
  output logic                     pattern_valid,
  output logic [$clog2(N+1)-1:0]   sa,
  output logic [$clog2(N+1)-1:0]   hd,
  output logic [TD_W-1:0]          td,
  output logic [TD_W-1:0]          td_prob,
  output logic                     meas_valid,
  output logic [31:0]              total_intra,
  output logic [31:0]              total_inter,
  output logic [31:0]              total_ones,
  output logic [31:0]              n_patterns,
  output logic                     seed_step,
  output logic                     saved,
  output logic [$clog2(DEPTH):0]   saved_count,
  output logic                     store_full,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [N-1:0]             rd_data
);

  logic [N-1:0] lfsr_q, sic_q, m_pat;
  logic         active;   // a pattern sequence has been started

  lfsr #(.N(N)) u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (run && !start && !src_sel),
    .load    (start),
    .seed_in ('1),
    .sin     (1'b0),
    .q       (lfsr_q),
    .sout    (lfsr_op)
  );

  sic_tpg #(.N(N)) u_sic (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .en        (run && src_sel),
    .cube_val  (cube_val),
    .cube_care (cube_care),
    .fill_mode (fill_mode),
    .sg        (sic_q),
    .seed_step (seed_step)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)     active <= 1'b0;
    else if (start) active <= 1'b1;
  end

  assign pattern       = src_sel ? sic_q : lfsr_q;
  assign pattern_valid = run && active && !start;

  td_meter #(.N(N)) u_meter (
    .clk         (clk),
    .rst_n       (rst_n),
    .clr         (start),
    .valid       (pattern_valid),
    .pat         (pattern),
    .out_valid   (meas_valid),
    .out_pat     (m_pat),
    .sa          (sa),
    .hd          (hd),
    .td          (td),
    .td_prob     (td_prob),
    .total_intra (total_intra),
    .total_inter (total_inter),
    .total_ones  (total_ones),
    .n_patterns  (n_patterns)
  );

  pattern_store #(.N(N), .DEPTH(DEPTH)) u_store (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (start),
    .valid    (meas_valid),
    .pat      (m_pat),
    .td       (td),
    .td_limit (td_limit),
    .saved    (saved),
    .count    (saved_count),
    .full     (store_full),
    .rd_addr  (rd_addr),
    .rd_data  (rd_data)
  );

endmodule
