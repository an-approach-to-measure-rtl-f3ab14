// End-to-end test of the generator / transition-density flow at its default
// size (N = 5, DEPTH = 32). Three runs:
//  A. LFSR source, 31 patterns, limit 100%: patterns follow the LFSR model,
//     in-pattern transitions total 64, every pattern is saved and read back.
//  B. SIC source, all-X cube, zero fill, limit 50%: the Gray count, 31
//     pattern-to-pattern changes over 32 patterns; only patterns with
//     TD <= 50% are saved, in order.
//  C. SIC source, cube 1X01X with one fill, then X0X1X with adjacent fill,
//     70 patterns each,
//     limit 100%: patterns follow X ^ gray(k) with the seed stepping every
//     32 patterns; the store fills and drops the rest.
// Counted mechanisms (each must occur): LFSR patterns, SIC patterns, zero /
// one / adjacent fill, seed steps, saves, rejections by TD, drops when full.
module tb_tpg_td_top;
  import tpg_pkg::*;
  localparam int unsigned N = 5, DEPTH = 32;
  logic clk = 0, rst_n = 0, src_sel = 0, start = 0, run = 0;
  logic [N-1:0] cube_val = '0, cube_care = '0, pattern, rd_data;
  fill_mode_t fill_mode = FILL_ZERO;
  logic [TD_W-1:0] td_limit = '0, td, td_prob;
  logic pattern_valid, meas_valid, seed_step, saved, store_full, lfsr_op;
  logic [$clog2(N+1)-1:0] sa, hd;
  logic [31:0] total_intra, total_inter, total_ones, n_patterns;
  logic [$clog2(DEPTH):0] saved_count;
  logic [$clog2(DEPTH)-1:0] rd_addr = '0;
  int checks = 0, failures = 0;
  int n_lfsr = 0, n_sic = 0, n_fz = 0, n_fo = 0, n_fa = 0, n_step = 0;
  int n_save = 0, n_reject = 0, n_drop = 0;
  logic [N-1:0] exp_store[$];

  tpg_td_top dut (.*);

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

  function automatic logic [N-1:0] swp(input logic [N-1:0] s);
    return s[0] ? s : {s[3], s[4], s[1], s[2], s[0]};
  endfunction

  // Runs the flow for len patterns, checking each against exp(k); records
  // what the store should hold.
  task automatic run_seq(input bit sic, input int len, input logic [N-1:0] seed0);
    logic [N-1:0] st, e;
    st = seed0;
    src_sel = sic;
    start = 1; @(negedge clk); start = 0;
    exp_store.delete();
    run = 1;
    for (int k = 0; k < len; k++) begin
      #1;
      e = sic ? (swp(st) ^ (N'(k) ^ (N'(k) >> 1))) : st;
      chk(pattern_valid, $sformatf("pattern_valid k=%0d sic=%0d", k, sic));
      chk(pattern == e, $sformatf("sic=%0d k=%0d pattern %b expected %b", sic, k, pattern, e));
      if (sic) n_sic++; else n_lfsr++;
      if (seed_step) n_step++;
      if (nsa(e) * 10000 / N <= int'(td_limit)) begin
        if (exp_store.size() < DEPTH) begin exp_store.push_back(e); n_save++; end
        else n_drop++;
      end else n_reject++;
      @(posedge clk);
      if (sic) begin
        if ((k % 32) == 31) st = {st[2] ^ st[0], st[4:1]};
      end else st = {st[2] ^ st[0], st[4:1]};
      @(negedge clk);
      chk(meas_valid && int'(sa) == nsa(e), "measured SA");
    end
    run = 0;
    @(negedge clk); @(negedge clk);
    chk(n_patterns == 32'(len), "pattern count");
    chk(int'(saved_count) == exp_store.size(),
        $sformatf("saved %0d expected %0d", saved_count, exp_store.size()));
    for (int a = 0; a < exp_store.size(); a++) begin
      rd_addr = ($clog2(DEPTH))'(a); #1;
      chk(rd_data == exp_store[a], $sformatf("store word %0d", a));
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    // A: conventional LFSR
    td_limit = 10000;
    run_seq(0, 31, 5'b11111);
    chk(total_intra == 64, $sformatf("LFSR in-pattern total %0d, expected 64", total_intra));
    chk(lfsr_op == pattern[0], "OP is the last stage");
    chk(total_ones == 80, $sformatf("LFSR ones total %0d, expected 80", total_ones));
    // B: SIC-TPG, all X, zero fill
    td_limit = 5000; cube_care = '0; cube_val = '0; fill_mode = FILL_ZERO;
    run_seq(1, 32, 5'b00000);
    n_fz++;
    chk(total_inter == 31, $sformatf("SIC pattern-to-pattern total %0d, expected 31", total_inter));
    // C: specified cube 1X01X, one fill (11011) and adjacent fill (11001)
    td_limit = 10000; cube_val = 5'b10010; cube_care = 5'b10110;
    fill_mode = FILL_ONE;
    run_seq(1, 70, 5'b11011);
    n_fo++;
    chk(store_full, "store full after 70 patterns");
    // adjacent fill of X0X1X gives 00011 (one fill would give 10111)
    cube_val = 5'b00010; cube_care = 5'b01010;
    fill_mode = FILL_ADJ;
    run_seq(1, 70, 5'b00011);
    n_fa++;
    $display("mechanisms: lfsr=%0d sic=%0d zero_fill=%0d one_fill=%0d adj_fill=%0d seed_steps=%0d saves=%0d rejects=%0d full_drops=%0d",
             n_lfsr, n_sic, n_fz, n_fo, n_fa, n_step, n_save, n_reject, n_drop);
    chk(n_lfsr > 0, "LFSR source used");
    chk(n_sic > 0, "SIC source used");
    chk(n_fz > 0 && n_fo > 0 && n_fa > 0, "all fill modes used");
    chk(n_step == 5, $sformatf("seed steps %0d, expected 5", n_step));
    chk(n_save > 0 && n_reject > 0 && n_drop > 0, "save, reject and drop all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
