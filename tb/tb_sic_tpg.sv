// Self-checking test of the single-input-change generator (N = 5).
// 1. All-X cube, zero fill: the seed is 00000 and the patterns are the Gray
//    count 00000, 00001, 00011, 00010, ... (first rows of the reference
//    table); 32 patterns give 31 single-bit changes.
// 1b. Cube 00010 (seed output X = 00100 after the swap): clocks 26..31 give
//    the reference table's last rows 10011, 10010, 10110, 10111, 10101,
//    10100.
// 2. A specified cube per fill mode: each pattern must equal X ^ gray(k),
//    with X from an independent model of the filler and the bit-swapping
//    LFSR; the seed must step exactly once every 32 patterns, and every
//    pattern inside one seed period must differ from the one before in
//    exactly one bit.
module tb_sic_tpg;
  import tpg_pkg::*;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  logic [N-1:0] cube_val = '0, cube_care = '0, sg, prev;
  fill_mode_t fill_mode = FILL_ZERO;
  logic seed_step;
  int checks = 0, failures = 0, steps = 0, sic_changes = 0;

  sic_tpg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] swp(input logic [N-1:0] s);
    return s[0] ? s : {s[3], s[4], s[1], s[2], s[0]};
  endfunction

  function automatic logic [N-1:0] fill(input logic [N-1:0] v, input logic [N-1:0] c,
                                        input fill_mode_t md);
    logic [N-1:0] r;
    logic last;
    if (md == FILL_ZERO) return v & c;
    if (md == FILL_ONE) return v | ~c;
    // adjacent: first specified value for the leading X bits
    last = 1'b0;
    for (int i = 0; i < N; i++) if (c[i]) last = v[i];  // ends at the MSB-most
    for (int i = N - 1; i >= 0; i--) begin
      if (c[i]) last = v[i];
      r[i] = last;
    end
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] st;
    int hd_sum;
    @(negedge clk); rst_n = 1;
    // ---- part 1: all-X cube, zero fill ----
    start = 1; @(negedge clk); start = 0; en = 1;
    hd_sum = 0;
    for (int k = 0; k < 32; k++) begin
      case (k)
        0: chk(sg == 5'b00000, "clk 0 00000");
        1: chk(sg == 5'b00001, "clk 1 00001");
        2: chk(sg == 5'b00011, "clk 2 00011");
        3: chk(sg == 5'b00010, "clk 3 00010");
        default: ;
      endcase
      chk(sg == (N'(k) ^ (N'(k) >> 1)), $sformatf("gray k=%0d sg=%b", k, sg));
      if (k > 0) hd_sum += $countones(sg ^ prev);
      prev = sg;
      @(negedge clk);
    end
    chk(hd_sum == 31, $sformatf("pattern-to-pattern changes %0d, expected 31", hd_sum));
    // ---- part 1b: fully specified cube 00010; its last bit is 0, so the
    //      seed output swaps Q3/Q4 and X = 00100. Clocks 26..31 must read
    //      10011, 10010, 10110, 10111, 10101, 10100 (reference table tail) ----
    en = 0;
    cube_val = 5'b00010; cube_care = 5'b11111; fill_mode = FILL_ZERO;
    start = 1; @(negedge clk); start = 0; en = 1;
    for (int k = 0; k < 32; k++) begin
      case (k)
        26: chk(sg == 5'b10011, "seed 00100 clk 26");
        27: chk(sg == 5'b10010, "seed 00100 clk 27");
        28: chk(sg == 5'b10110, "seed 00100 clk 28");
        29: chk(sg == 5'b10111, "seed 00100 clk 29");
        30: chk(sg == 5'b10101, "seed 00100 clk 30");
        31: chk(sg == 5'b10100, "seed 00100 clk 31");
        default: ;
      endcase
      if (seed_step) steps++;
      @(negedge clk);
    end
    // ---- part 2: specified cubes, all three fill modes ----
    for (int md = 0; md < 3; md++) begin
      en = 0;
      cube_val = 5'b10010; cube_care = 5'b10110;  // 1X01X
      fill_mode = fill_mode_t'(md);
      start = 1; @(negedge clk); start = 0; en = 1;
      st = fill(cube_val, cube_care, fill_mode);
      for (int k = 0; k < 100; k++) begin
        chk(sg == (swp(st) ^ (N'(k) ^ (N'(k) >> 1))),
            $sformatf("mode %0d k=%0d sg=%b exp=%b", md, k, sg, swp(st) ^ (N'(k) ^ (N'(k) >> 1))));
        if (k > 0 && (k % 32) != 0) begin
          chk($countones(sg ^ prev) == 1, "single input change");
          sic_changes++;
        end
        chk(seed_step == ((k % 32) == 31), $sformatf("seed_step at k=%0d", k));
        if (seed_step) steps++;
        prev = sg;
        @(posedge clk);
        if ((k % 32) == 31) st = {st[2] ^ st[0], st[4:1]};
        @(negedge clk);
      end
    end
    chk(steps == 10, $sformatf("seed steps %0d, expected 10", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
