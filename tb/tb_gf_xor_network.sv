// tb_gf_xor_network: checks the sum of 8 terms (the design's size) and of
// 5 terms (padded tree) against a sequential XOR of the inputs.
module tb_gf_xor_network;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233;
  logic [7:0][M-1:0] x8;
  logic [4:0][M-1:0] x5;
  logic [M-1:0] z8, z5, e8, e5;
  int checks = 0, failures = 0;

  gf_xor_network #(.M(M), .N(8)) dut8 (.x(x8), .z(z8));
  gf_xor_network #(.M(M), .N(5)) dut5 (.x(x5), .z(z5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t v;
    for (int n = 0; n < 300; n++) begin
      e8 = '0; e5 = '0;
      for (int t = 0; t < 8; t++) begin
        // one-hot pattern for the first tests: each input alone
        if (n < 8) begin
          v = (t == n) ? ref_ones(M) : '0;
        end else begin
          v = ref_rand(M);
        end
        x8[t] = v[M-1:0];
        e8 ^= v[M-1:0];
        if (t < 5) begin
          x5[t] = v[M-1:0];
          e5 ^= v[M-1:0];
        end
      end
      #1;
      checks += 2;
      if (z8 !== e8) begin failures++; $display("FAIL N=8 test %0d", n); end
      if (z5 !== e5) begin failures++; $display("FAIL N=5 test %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
