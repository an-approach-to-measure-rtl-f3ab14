// X-filler: turns a test cube into a fully specified seed vector.
// cube_care marks the specified bits (1) and the don't-care bits X (0);
// cube_val gives the specified values. The don't-care bits are filled by
//   FILL_ZERO : 0
//   FILL_ONE  : 1
//   FILL_ADJ  : the nearest specified bit before it, in Q1..Qn order (MSB
//               first); X bits ahead of the first specified bit take that
//               first specified value, and a cube with no specified bit
//               fills with 0.
// The three fill styles come from the design description; the exact rule
// for adjacent fill and for the leading X bits is this design's choice.
// Purely combinational.
module x_filler
  import tpg_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] cube_val,
  input  logic [N-1:0] cube_care,
  input  fill_mode_t   mode,
  output logic [N-1:0] seed
);

  logic         first_val;   // value of the first specified bit, MSB first
  logic         found;
  logic         carry;
  logic [N-1:0] adj;

  always_comb begin
    first_val = 1'b0;
    found     = 1'b0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (cube_care[i] && !found) begin
        first_val = cube_val[i];
        found     = 1'b1;
      end
    end
    // Walk from Q1 (MSB) to Qn, carrying the last specified value.
    carry = first_val;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (cube_care[i]) carry = cube_val[i];
      adj[i] = carry;
    end
  end

  always_comb begin
    unique case (mode)
      FILL_ONE: seed = cube_val | ~cube_care;
      FILL_ADJ: seed = adj;
      default:  seed = cube_val & cube_care;
    endcase
  end

endmodule
