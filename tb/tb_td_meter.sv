// Self-checking test of the transition-density meter (N = 5).
// 1. The 31-pattern LFSR sequence (seed 11111, D1 <= Q3 ^ Q5), generated
//    here, must total 64 in-pattern transitions.
// 2. The 32-pattern Gray sequence must total 31 pattern-to-pattern changes.
//    Over a full period each stage holds 16 ones, so the ones total 80.
// 3. Random patterns with random gaps in valid: every registered sa, hd, td
//    and td_prob, and the totals, against a reference computed here.
module tb_td_meter;
  import tpg_pkg::*;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  logic [N-1:0] pat = '0, out_pat;
  logic out_valid;
  logic [$clog2(N+1)-1:0] sa, hd;
  logic [TD_W-1:0] td, td_prob;
  logic [31:0] total_intra, total_inter, total_ones, n_patterns;
  int checks = 0, failures = 0;

  td_meter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int nsa(input logic [N-1:0] p);
    int t = 0;
    for (int i = 0; i < N - 1; i++) t += int'(p[i] != p[i+1]);
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] s, prev;
    int ti, tx, np, to;
    bit havep;
    @(negedge clk); rst_n = 1;
    // ---- LFSR sequence ----
    clr = 1; @(negedge clk); clr = 0;
    s = '1;
    for (int k = 0; k < 31; k++) begin
      valid = 1; pat = s;
      @(negedge clk);
      s = {s[2] ^ s[0], s[4:1]};
    end
    valid = 0; @(negedge clk);
    chk(total_intra == 64, $sformatf("LFSR in-pattern total %0d, expected 64", total_intra));
    chk(n_patterns == 31, "LFSR pattern count");
    chk(total_ones == 80, "LFSR ones: 16 in each bit position over the period");
    // ---- Gray sequence ----
    clr = 1; @(negedge clk); clr = 0;
    for (int k = 0; k < 32; k++) begin
      valid = 1; pat = N'(k ^ (k >> 1));
      @(negedge clk);
    end
    valid = 0; @(negedge clk);
    chk(total_inter == 31, $sformatf("Gray pattern-to-pattern total %0d, expected 31", total_inter));
    // ---- random ----
    clr = 1; @(negedge clk); clr = 0;
    ti = 0; tx = 0; np = 0; to = 0; havep = 0; prev = '0;
    for (int k = 0; k < 500; k++) begin
      int esa, ehd, ones;
      valid = 1'($urandom_range(0, 3) != 0);
      pat = N'($urandom);
      esa = nsa(pat);
      ehd = havep ? $countones(pat ^ prev) : 0;
      ones = $countones(pat);
      @(negedge clk);
      chk(out_valid == valid, "out_valid");
      if (valid) begin
        ti += esa; tx += ehd; np++; to += ones;
        chk(int'(sa) == esa, $sformatf("sa %0d exp %0d", sa, esa));
        chk(int'(hd) == ehd, $sformatf("hd %0d exp %0d", hd, ehd));
        chk(int'(td) == esa * 10000 / N, "td");
        chk(int'(td_prob) == 2 * ones * (N - ones) * 10000 / (N * N), "td_prob");
        chk(out_pat == pat, "out_pat");
        prev = pat; havep = 1;
      end
      chk(total_intra == 32'(ti) && total_inter == 32'(tx) && n_patterns == 32'(np) && total_ones == 32'(to), "totals");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
