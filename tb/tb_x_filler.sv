// Self-checking test of the X-filler: worked examples for the three fill
// modes, then random cubes compared with a reference that, for adjacent fill,
// searches outward from each X bit (towards Q1 first, then towards Qn).
module tb_x_filler;
  import tpg_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] cube_val, cube_care, seed;
  fill_mode_t mode;
  int checks = 0, failures = 0;

  x_filler #(.N(N)) dut (.*);

  function automatic logic [N-1:0] ref_fill(input logic [N-1:0] v, input logic [N-1:0] c,
                                            input fill_mode_t md);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      if (c[i]) r[i] = v[i];
      else if (md == FILL_ONE) r[i] = 1'b1;
      else if (md == FILL_ZERO) r[i] = 1'b0;
      else begin
        bit got = 0;
        r[i] = 1'b0;
        for (int j = i + 1; j < N && !got; j++) if (c[j]) begin r[i] = v[j]; got = 1; end
        for (int j = i - 1; j >= 0 && !got; j--) if (c[j]) begin r[i] = v[j]; got = 1; end
      end
    end
    return r;
  endfunction

  task automatic apply(input logic [N-1:0] v, input logic [N-1:0] c, input fill_mode_t md,
                       input logic [N-1:0] exp);
    cube_val = v; cube_care = c; mode = md; #1;
    checks++;
    if (seed !== exp) begin
      failures++;
      $display("FAIL val=%b care=%b mode=%0d seed=%b exp=%b", v, c, md, seed, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // cube 1X0XX1XX (MSB first)
    apply(8'b10000100, 8'b10100100, FILL_ZERO, 8'b10000100);
    apply(8'b10000100, 8'b10100100, FILL_ONE,  8'b11011111);
    apply(8'b10000100, 8'b10100100, FILL_ADJ,  8'b11000111);
    // leading X bits take the first specified value: XX0XXXX1
    apply(8'b00000001, 8'b00100001, FILL_ADJ,  8'b00000001);
    apply(8'b00000000, 8'b00000000, FILL_ADJ,  8'b00000000);
    apply(8'b00000000, 8'b00000000, FILL_ONE,  8'b11111111);
    for (int k = 0; k < 3000; k++) begin
      logic [N-1:0] v, c;
      fill_mode_t md;
      v = N'($urandom); c = N'($urandom);
      md = fill_mode_t'($urandom_range(0, 2));
      apply(v, c, md, ref_fill(v, c, md));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
