// tb_gf_const_mult: checks x^S * y mod F for every S = 1..8 in GF(2^233)
// (F = x^233 + x^74 + 1) and for S = 8 in GF(2^409) (F = x^409 + x^87 + 1)
// against the reference multiplier, on random and corner operands.
module tb_gf_const_mult;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233, K = 74;
  localparam int unsigned M2 = 409, K2 = 87;

  logic [M-1:0]          y;
  logic [8:1][M-1:0]     z;
  logic [M2-1:0]         y2, z2;
  int checks = 0, failures = 0;

  for (genvar s = 1; s <= 8; s++) begin : g_s
    gf_const_mult #(.M(M), .K(K), .S(s)) dut (.y(y), .z(z[s]));
  end
  gf_const_mult #(.M(M2), .K(K2), .S(8)) dut2 (.y(y2), .z(z2));

  task automatic check_one(ref_t v);
    ref_t xs, exp;
    y = v[M-1:0];
    y2 = v[M2-1:0];
    #1;
    for (int s = 1; s <= 8; s++) begin
      xs = '0; xs[s] = 1'b1;
      exp = ref_mul(xs, ref_t'(v[M-1:0]), M, K);
      checks++;
      if (z[s] !== exp[M-1:0]) begin
        failures++;
        if (failures < 5) $display("FAIL S=%0d y=%h", s, v[M-1:0]);
      end
    end
    xs = '0; xs[8] = 1'b1;
    exp = ref_mul(xs, ref_t'(v[M2-1:0]), M2, K2);
    checks++;
    if (z2 !== exp[M2-1:0]) begin
      failures++;
      if (failures < 5) $display("FAIL M=409 y=%h", v[M2-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t v;
    check_one(ref_ones(M2));
    for (int i = 0; i < int'(M2); i++) begin
      v = '0; v[i] = 1'b1;
      check_one(v);
    end
    for (int n = 0; n < 300; n++) check_one(ref_rand(M2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
