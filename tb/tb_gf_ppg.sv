// tb_gf_ppg: checks the 8 x 233 partial product generator, p = a * B mod F,
// against the reference multiplier for every single-bit word, all-ones
// and random words; a second instance checks a 16 x 409 generator
// (F = x^409 + x^87 + 1).
module tb_gf_ppg;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233, K = 74, W = 8;
  localparam int unsigned M2 = 409, K2 = 87, W2 = 16;
  logic [W-1:0]  a;
  logic [M-1:0]  b, p;
  logic [W2-1:0] a2;
  logic [M2-1:0] b2, p2;
  int checks = 0, failures = 0;

  gf_ppg #(.M(M),  .K(K),  .W(W))  dut  (.a(a),  .b(b),  .p(p));
  gf_ppg #(.M(M2), .K(K2), .W(W2)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t vb, va, e;
    for (int n = 0; n < 400; n++) begin
      vb = (n % 50 == 0) ? ref_ones(M2) : ref_rand(M2);
      va = '0;
      if (n < 16) va[n] = 1'b1;
      else if (n == 16) va[15:0] = 16'hffff;
      else va[31:0] = $urandom;
      a = va[W-1:0];   b = vb[M-1:0];
      a2 = va[W2-1:0]; b2 = vb[M2-1:0];
      #1;
      e = ref_mul(ref_t'(a), ref_t'(b), M, K);
      checks++;
      if (p !== e[M-1:0]) begin failures++; if (failures < 5) $display("FAIL 8x233 a=%h", a); end
      e = ref_mul(ref_t'(a2), ref_t'(b2), M2, K2);
      checks++;
      if (p2 !== e[M2-1:0]) begin failures++; if (failures < 5) $display("FAIL 16x409 a=%h", a2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
