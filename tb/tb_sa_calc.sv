// Self-checking test of the switching-activity / transition-density unit.
// Worked examples: 0110 -> SA 2 (alpha 1), 0111 -> SA 1 (alpha 2),
// 1001 -> SA 2 (alpha 3), 10111 -> 2, 10110 -> 3. Then random patterns
// against a direct count of neighbouring-bit changes, and the published
// SA/TD table for N = 4 .. 256: for each row a pattern with the listed LSB,
// MSB and SA is built and TD (percent x100) must be 5000, 6250, 6875, 7500,
// 7500, 7421 and 7421. td_prob is checked against 2*P1*(1-P1).
module tb_sa_calc;
  import tpg_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one instance per table size; RW is the width of ones/sa
`define SA_INST(NN) \
  logic [NN-1:0] p``NN; \
  logic [$clog2(NN+1)-1:0] o``NN, s``NN; \
  logic l``NN, m``NN; \
  logic [1:0] a``NN; \
  logic [TD_W-1:0] t``NN, q``NN; \
  sa_calc #(.N(NN)) u``NN (.pat(p``NN), .ones(o``NN), .lsb(l``NN), .msb(m``NN), \
                           .alpha(a``NN), .sa(s``NN), .td(t``NN), .td_prob(q``NN));
  `SA_INST(4)
  `SA_INST(5)
  `SA_INST(8)
  `SA_INST(16)
  `SA_INST(32)
  `SA_INST(64)
  `SA_INST(128)
  `SA_INST(256)

  // pattern of n bits (MSB first) starting at msb and toggling sa times
  function automatic logic [255:0] build(input int n, input bit msb, input int sa);
    logic [255:0] r = '0;
    bit cur = msb;
    for (int i = n - 1; i >= 0; i--) begin
      if ((n - 1 - i) >= 1 && (n - 1 - i) <= sa) cur = !cur;
      r[i] = cur;
    end
    return r;
  endfunction

  function automatic int direct_sa(input logic [255:0] p, input int n);
    int t = 0;
    for (int i = 0; i < n - 1; i++) t += int'(p[i] != p[i+1]);
    return t;
  endfunction

  task automatic row(input int n, input bit lsb, input bit msb, input int sa, input int td_exp);
    logic [255:0] p;
    int got_sa, got_td, got_l, got_m;
    p = build(n, msb, sa);
    chk(p[0] == lsb, $sformatf("N=%0d built pattern LSB", n));
    case (n)
      4:   begin p4 = p[3:0];     #1 got_sa = s4;   got_td = t4;   got_l = l4;   got_m = m4;   end
      8:   begin p8 = p[7:0];     #1 got_sa = s8;   got_td = t8;   got_l = l8;   got_m = m8;   end
      16:  begin p16 = p[15:0];   #1 got_sa = s16;  got_td = t16;  got_l = l16;  got_m = m16;  end
      32:  begin p32 = p[31:0];   #1 got_sa = s32;  got_td = t32;  got_l = l32;  got_m = m32;  end
      64:  begin p64 = p[63:0];   #1 got_sa = s64;  got_td = t64;  got_l = l64;  got_m = m64;  end
      128: begin p128 = p[127:0]; #1 got_sa = s128; got_td = t128; got_l = l128; got_m = m128; end
      default: begin p256 = p;    #1 got_sa = s256; got_td = t256; got_l = l256; got_m = m256; end
    endcase
    chk(got_sa == sa, $sformatf("N=%0d SA %0d expected %0d", n, got_sa, sa));
    chk(got_td == td_exp, $sformatf("N=%0d TD %0d expected %0d", n, got_td, td_exp));
    chk(got_l == int'(lsb) && got_m == int'(msb), $sformatf("N=%0d LSB/MSB", n));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p4 = 4'b0110; #1 chk(s4 == 2 && a4 == 1 && o4 == 2, "0110 theorem 1");
    p4 = 4'b0111; #1 chk(s4 == 1 && a4 == 2 && o4 == 3, "0111 theorem 2/3");
    p4 = 4'b1110; #1 chk(s4 == 1 && a4 == 2, "1110 theorem 2/3");
    p4 = 4'b1001; #1 chk(s4 == 2 && a4 == 3, "1001 theorem 4");
    chk(t4 == 5000, "1001 TD 50%");
    chk(q4 == 5000, "1001 td_prob 2*0.5*0.5");
    p5 = 5'b10111; #1 chk(s5 == 2, "10111 SA 2");
    p5 = 5'b10110; #1 chk(s5 == 3, "10110 SA 3");
    chk(t5 == 6000, "10110 TD 60%");
    chk(q5 == 4800, "10110 td_prob 2*0.6*0.4");
    for (int k = 0; k < 2000; k++) begin
      logic [255:0] r;
      int ones, exp_p;
      r = {8{$urandom}};
      p5 = r[4:0]; p16 = r[15:0]; p256 = r; #1;
      chk(int'(s5) == direct_sa(r, 5), $sformatf("N=5 random %b", p5));
      chk(int'(s16) == direct_sa(r, 16), "N=16 random");
      chk(int'(s256) == direct_sa(r, 256), "N=256 random");
      chk(int'(t16) == direct_sa(r, 16) * 10000 / 16, "N=16 TD");
      ones = $countones(p16);
      exp_p = 2 * ones * (16 - ones) * 10000 / 256;
      chk(int'(q16) == exp_p, "N=16 td_prob");
    end
    // SA/TD table rows: N, LSB, MSB, SA, TD (percent x100)
    row(4,   0, 0, 2,   5000);
    row(8,   0, 1, 5,   6250);
    row(16,  1, 0, 11,  6875);
    row(32,  1, 1, 24,  7500);
    row(64,  0, 0, 48,  7500);
    row(128, 0, 1, 95,  7421);
    row(256, 1, 1, 190, 7421);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
