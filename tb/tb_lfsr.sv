// Self-checking test of the 5-bit XOR LFSR. After reset (seed 11111) the
// states must follow the reference pattern table rows
// 0:11111 1:01111 2:00111 3:00011 26:00110 27:10011 28:11001 30:11110
// 31:11111, visit all 31 non-zero states once per period, and sum to 64
// in-pattern transitions over clocks 0..30. Loads, hold and the serial
// input IN are also checked against an independent model.
module tb_lfsr;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, en = 0, load = 0, sin = 0;
  logic [N-1:0] seed_in = '0, q;
  logic sout;
  int checks = 0, failures = 0;
  bit seen [32];
  int trans;

  lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ntrans(input logic [N-1:0] p);
    int t = 0;
    for (int i = 0; i < N - 1; i++) t += int'(p[i] != p[i+1]);
    return t;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] m;
    @(negedge clk); rst_n = 1;
    chk(q == 5'b11111, "reset seed");
    en = 1;
    trans = 0;
    for (int t = 0; t <= 31; t++) begin
      case (t)
        0:  chk(q == 5'b11111, "clk 0");
        1:  chk(q == 5'b01111, "clk 1");
        2:  chk(q == 5'b00111, "clk 2");
        3:  chk(q == 5'b00011, "clk 3");
        26: chk(q == 5'b00110, "clk 26");
        27: chk(q == 5'b10011, "clk 27");
        28: chk(q == 5'b11001, "clk 28");
        30: chk(q == 5'b11110, "clk 30");
        31: chk(q == 5'b11111, "clk 31");
        default: ;
      endcase
      chk(sout == q[0], "OP is Q5");
      if (t < 31) begin
        chk(!seen[q], $sformatf("state %b repeated inside period", q));
        seen[q] = 1;
        trans += ntrans(q);
      end
      @(negedge clk);
    end
    chk(trans == 64, $sformatf("in-pattern transitions %0d, expected 64", trans));
    // random load / hold / IN against a model: D1 <= Q3 ^ Q5 ^ IN
    m = q;
    for (int k = 0; k < 300; k++) begin
      en = 1'($urandom);
      load = 1'($urandom_range(0, 15) == 0);
      seed_in = N'($urandom);
      sin = 1'($urandom);
      @(posedge clk);
      if (load) m = seed_in;
      else if (en) m = {m[2] ^ m[0] ^ sin, m[4:1]};
      @(negedge clk);
      chk(q == m, $sformatf("random step %0d q=%b exp=%b", k, q, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
