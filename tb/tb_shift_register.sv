// Self-checking test of the N-bit shift register: random shift, load and
// hold cycles are compared with a reference model kept in the testbench.
module tb_shift_register;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, en = 0, load = 0, sin = 0;
  logic [N-1:0] load_val = '0, q, model;
  int checks = 0, failures = 0;

  shift_register #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    if (q !== '0) failures++;
    checks++;
    for (int k = 0; k < 500; k++) begin
      en = 1'($urandom_range(0, 3) != 0);
      load = 1'($urandom_range(0, 9) == 0);
      load_val = N'($urandom);
      sin = 1'($urandom);
      @(posedge clk);
      if (load) model = load_val;
      else if (en) model = {sin, model[N-1:1]};
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch at %0d: q=%b expected %b", k, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
