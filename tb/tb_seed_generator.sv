// Self-checking test of the bit-swapping seed generator. The reference keeps
// its own LFSR state (D1 <= Q3 ^ Q5) and forms the expected output: pairs
// (Q1,Q2) and (Q3,Q4) swapped when Q5 = 0, unchanged when Q5 = 1.
module tb_seed_generator;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [N-1:0] load_val = '0, x;
  logic [N-1:0] st, expx;
  int checks = 0, failures = 0, swapped = 0, kept = 0;

  seed_generator #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_x(input logic [N-1:0] s);
    // s[4]=Q1 ... s[0]=Q5
    if (s[0]) return s;
    return {s[3], s[4], s[1], s[2], s[0]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    checks++; if (x !== '0) failures++;
    // a worked example: state 10010 (Q5 = 0) must give 01100
    load = 1; load_val = 5'b10010; @(negedge clk); load = 0;
    checks++; if (x !== 5'b01100) begin failures++; $display("swap example x=%b", x); end
    // state 10011 (Q5 = 1) passes unchanged
    load = 1; load_val = 5'b10011; @(negedge clk); load = 0;
    checks++; if (x !== 5'b10011) begin failures++; $display("keep example x=%b", x); end
    st = 5'b10011;
    for (int k = 0; k < 400; k++) begin
      load = 1'($urandom_range(0, 19) == 0);
      step = 1'($urandom);
      load_val = N'($urandom);
      @(posedge clk);
      if (load) st = load_val;
      else if (step) st = {st[2] ^ st[0], st[4:1]};
      @(negedge clk);
      expx = ref_x(st);
      if (st[0]) kept++; else swapped++;
      checks++;
      if (x !== expx) begin failures++; $display("x=%b exp=%b state=%b", x, expx, st); end
    end
    checks++;
    if (swapped == 0 || kept == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
