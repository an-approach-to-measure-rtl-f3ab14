// Self-checking test of the N-bit counter: counting, hold, wrap to zero,
// clear, and that count_next is always count + 1 modulo 2^N.
module tb_nbit_counter;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [N-1:0] count, count_next;
  int checks = 0, failures = 0, m = 0, wraps = 0;

  nbit_counter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      en = 1'($urandom_range(0, 4) != 0);
      clr = 1'($urandom_range(0, 99) == 0);
      checks++;
      if (count_next !== N'(m + 1)) failures++;
      @(posedge clk);
      if (clr) m = 0;
      else if (en) begin
        if (m == (1 << N) - 1) wraps++;
        m = (m + 1) % (1 << N);
      end
      @(negedge clk);
      checks++;
      if (count !== N'(m)) begin
        failures++;
        $display("count=%0d expected %0d", count, m);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
