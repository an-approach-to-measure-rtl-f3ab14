// Self-checking test of the pattern store (N = 5, DEPTH = 8 for a short
// run): patterns with td <= td_limit are kept in arrival order, others are
// passed over, nothing is written once full, and clr empties the store.
module tb_pattern_store;
  import tpg_pkg::*;
  localparam int unsigned N = 5, DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  logic [N-1:0] pat = '0, rd_data;
  logic [TD_W-1:0] td = '0, td_limit = '0;
  logic saved, full;
  logic [$clog2(DEPTH):0] count;
  logic [$clog2(DEPTH)-1:0] rd_addr = '0;
  int checks = 0, failures = 0, fulls = 0, rejects = 0;
  logic [N-1:0] q[$];

  pattern_store #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    chk(count == 0 && !full, "empty after reset");
    for (int round = 0; round < 6; round++) begin
      clr = 1; @(negedge clk); clr = 0;
      q.delete();
      td_limit = (round < 2) ? TD_W'(9500) : TD_W'($urandom_range(2000, 8000));
      for (int k = 0; k < 20; k++) begin
        bit w;
        valid = 1'($urandom_range(0, 3) != 0);
        pat = N'($urandom);
        td = TD_W'($urandom_range(0, 10000));
        w = valid && (td <= td_limit) && (q.size() < DEPTH);
        if (valid && td > td_limit) rejects++;
        if (valid && q.size() == DEPTH) fulls++;
        @(negedge clk);
        if (w) q.push_back(pat);
        chk(saved == w, $sformatf("saved flag round %0d k %0d", round, k));
        chk(int'(count) == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
        chk(full == (q.size() == DEPTH), "full flag");
      end
      valid = 0;
      for (int a = 0; a < q.size(); a++) begin
        rd_addr = ($clog2(DEPTH))'(a); #1;
        chk(rd_data == q[a], $sformatf("word %0d = %b exp %b", a, rd_data, q[a]));
      end
      @(negedge clk);
    end
    chk(rejects > 0 && fulls > 0, "both reject and full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
