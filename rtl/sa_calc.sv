// Switching activity and transition density of one N-bit pattern.
// The pattern is read as a bit sequence from its MSB (first bit) to its LSB
// (last bit). The block follows the four-theorem method:
//   * count the ones, and the runs of ones g; the sequence of runs and gaps
//     forms a 1 x c row matrix with r = 1 and c = 2g + 1;
//   * take alpha from the end bits: 1 for LSB = MSB = 0, 2 when exactly one
//     of them is 1, 3 when both are 1;
//   * SA = c - alpha * r, the number of 0->1 and 1->0 changes between
//     neighbouring bits (e.g. 0110 -> 2, 0111 -> 1, 1001 -> 2).
// td is TD = SA / N in percent times 100, rounded down (11 of 16 -> 6875),
// and td_prob is the probabilistic TD 2*P1*(1-P1), P1 = ones/N, in the same
// units. Reading the theorems' matrix as the row of runs (c = 2g + 1) is this
// design's interpretation. Purely combinational.
module sa_calc
  import tpg_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]         pat,
  output logic [$clog2(N+1)-1:0] ones,
  output logic                 lsb,
  output logic                 msb,
  output logic [1:0]           alpha,
  output logic [$clog2(N+1)-1:0] sa,
  output logic [TD_W-1:0]      td,
  output logic [TD_W-1:0]      td_prob
);

  localparam int unsigned CW = $clog2(N + 2) + 1;  // holds c = 2g + 1

  logic [CW-1:0] runs;   // g: runs of ones
  logic [CW-1:0] c;      // columns of the row matrix
  logic [CW-1:0] sa_w;
  logic [63:0]   td_w, tdp_w;

  assign lsb = pat[0];
  assign msb = pat[N-1];

  always_comb begin
    ones = '0;
    runs = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      ones = ones + ($clog2(N+1))'(pat[i]);
      // a run of ones starts where a 1 follows a 0 or opens the sequence
      if (pat[i] && (i == int'(N) - 1 || !pat[(i + 1) % int'(N)]))
        runs = runs + 1'b1;
    end
    c     = (runs << 1) + 1'b1;
    alpha = 2'd1 + {1'b0, lsb} + {1'b0, msb};
    sa_w  = c - CW'(alpha);
    sa    = sa_w[$clog2(N+1)-1:0];
  end

  always_comb begin
    td_w    = (64'(sa) * 64'd10000) / 64'(N);
    tdp_w   = (64'd2 * 64'(ones) * (64'(N) - 64'(ones)) * 64'd10000) / (64'(N) * 64'(N));
    td      = td_w[TD_W-1:0];
    td_prob = tdp_w[TD_W-1:0];
  end

endmodule
