// Transition-density meter for a stream of patterns.
// For each pattern presented with valid it registers, one clock later:
//   sa  - transitions between neighbouring bits inside the pattern (sa_calc)
//   td  - SA/N in percent times 100
//   td_prob - 2*P1*(1-P1), P1 the fraction of ones, in the same units
//   hd  - bits that changed from the previous valid pattern (consecutive
//         pattern switching; 0 for the first pattern after clr)
// and adds sa and hd to the running totals total_intra and total_inter, with
// n_patterns counting the patterns measured. total_ones sums the ones of
// all measured patterns, so the average probability of a 1 is
// total_ones / (N * n_patterns). total_intra is the in-pattern
// transition count of a whole sequence, total_inter its pattern-to-pattern
// count; a single-input-change sequence of k+1 patterns gives total_inter = k.
// Which totals to keep comes from the design description; their 32-bit width,
// clr and the synchronous active-low reset are this design's choices.
module td_meter
  import tpg_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   valid,
  input  logic [N-1:0]           pat,
  output logic                   out_valid,
  output logic [N-1:0]           out_pat,
  output logic [$clog2(N+1)-1:0] sa,
  output logic [$clog2(N+1)-1:0] hd,
  output logic [TD_W-1:0]        td,
  output logic [TD_W-1:0]        td_prob,
  output logic [31:0]            total_intra,
  output logic [31:0]            total_inter,
  output logic [31:0]            total_ones,
  output logic [31:0]            n_patterns
);

  logic [$clog2(N+1)-1:0] c_ones, c_sa, c_hd;
  logic                   c_lsb, c_msb;
  logic [1:0]             c_alpha;
  logic [TD_W-1:0]        c_td, c_tdp;
  logic [N-1:0]           prev;
  logic                   have_prev;

  sa_calc #(.N(N)) u_sa (
    .pat     (pat),
    .ones    (c_ones),
    .lsb     (c_lsb),
    .msb     (c_msb),
    .alpha   (c_alpha),
    .sa      (c_sa),
    .td      (c_td),
    .td_prob (c_tdp)
  );

  always_comb begin
    c_hd = '0;
    if (have_prev)
      for (int i = 0; i < int'(N); i++) c_hd = c_hd + ($clog2(N+1))'(pat[i] ^ prev[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      out_valid   <= 1'b0;
      out_pat     <= '0;
      sa          <= '0;
      hd          <= '0;
      td          <= '0;
      td_prob     <= '0;
      prev        <= '0;
      have_prev   <= 1'b0;
      total_intra <= '0;
      total_inter <= '0;
      total_ones  <= '0;
      n_patterns  <= '0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        out_pat     <= pat;
        sa          <= c_sa;
        hd          <= c_hd;
        td          <= c_td;
        td_prob     <= c_tdp;
        prev        <= pat;
        have_prev   <= 1'b1;
        total_intra <= total_intra + 32'(c_sa);
        total_inter <= total_inter + 32'(c_hd);
        total_ones  <= total_ones + 32'(c_ones);
        n_patterns  <= n_patterns + 1;
      end
    end
  end

endmodule
