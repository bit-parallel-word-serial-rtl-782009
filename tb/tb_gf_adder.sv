// tb_gf_adder: checks the GF(2^233) sum bit by bit (GF(2) addition table)
// on random operands and on all-ones / zero corners.
module tb_gf_adder;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233;
  logic [M-1:0] a, b, c;
  int checks = 0, failures = 0;

  gf_adder #(.M(M)) dut (.a(a), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t va, vb;
    for (int n = 0; n < 200; n++) begin
      va = (n == 0) ? ref_ones(M) : ref_rand(M);
      vb = (n == 1) ? ref_ones(M) : ref_rand(M);
      a = va[M-1:0];
      b = vb[M-1:0];
      #1;
      for (int i = 0; i < int'(M); i++) begin
        checks++;
        // GF(2) addition: 0+0=0, 0+1=1, 1+0=1, 1+1=0
        if (c[i] !== ((a[i] != b[i]) ? 1'b1 : 1'b0)) begin
          failures++;
          if (failures < 5) $display("FAIL bit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
