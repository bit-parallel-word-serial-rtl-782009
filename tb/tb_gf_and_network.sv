// tb_gf_and_network: checks c = a * b for both values of the coefficient
// on random and all-ones operands.
module tb_gf_and_network;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233;
  logic a;
  logic [M-1:0] b, c;
  int checks = 0, failures = 0;

  gf_and_network #(.M(M)) dut (.a(a), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t v;
    for (int n = 0; n < 200; n++) begin
      v = (n == 0) ? ref_ones(M) : ref_rand(M);
      b = v[M-1:0];
      a = n[0];
      #1;
      checks++;
      if (c !== (a ? b : '0)) begin
        failures++;
        $display("FAIL a=%b b=%h c=%h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
