// tb_gf_squarer: checks a^2 mod (x^233 + x^74 + 1) against the reference
// multiplier (a times a) for single-bit, all-ones and random operands.
module tb_gf_squarer;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233, K = 74;
  logic [M-1:0] a, c;
  int checks = 0, failures = 0;

  gf_squarer #(.M(M), .K(K)) dut (.a(a), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t v, e;
    for (int n = 0; n < int'(M) + 301; n++) begin
      if (n < int'(M)) begin v = '0; v[n] = 1'b1; end
      else if (n == int'(M)) v = ref_ones(M);
      else v = ref_rand(M);
      a = v[M-1:0];
      #1;
      e = ref_mul(v, v, M, K);
      checks++;
      if (c !== e[M-1:0]) begin
        failures++;
        if (failures < 5) $display("FAIL a=%h", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
