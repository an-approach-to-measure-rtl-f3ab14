// Self-checking test of the Gray encoder for N = 5 (exhaustive) and N = 8
// (exhaustive): each output is checked bit by bit against
// GC[i] = C[i] ^ C[i+1], GC[n-1] = C[n-1], and consecutive codes, including
// the wrap from all ones to zero, must differ in exactly one bit.
module tb_gray_encoder;
  logic [4:0] c5, g5, p5;
  logic [7:0] c8, g8, p8;
  int checks = 0, failures = 0;

  gray_encoder #(.N(5)) dut5 (.c(c5), .gc(g5));
  gray_encoder #(.N(8)) dut8 (.c(c8), .gc(g8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c5 = 5'd31; #1 p5 = g5;
    for (int v = 0; v < 32; v++) begin
      c5 = 5'(v); #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (g5[i] !== ((i == 4) ? c5[4] : (c5[i] ^ c5[i+1]))) failures++;
      end
      checks++;
      if ($countones(g5 ^ p5) != 1) begin failures++; $display("N=5 step to %0d not single change", v); end
      p5 = g5;
    end
    c8 = 8'd255; #1 p8 = g8;
    for (int v = 0; v < 256; v++) begin
      c8 = 8'(v); #1;
      checks++;
      if (g8 !== (c8 ^ (c8 >> 1))) failures++;
      checks++;
      if ($countones(g8 ^ p8) != 1) failures++;
      p8 = g8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
