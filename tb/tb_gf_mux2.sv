// tb_gf_mux2: checks that sel high passes the first input and sel low the
// second, on random operands.
module tb_gf_mux2;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233;
  logic [M-1:0] a, b, c;
  logic sel;
  int checks = 0, failures = 0;

  gf_mux2 #(.M(M)) dut (.a(a), .b(b), .sel(sel), .c(c));

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
      v = ref_rand(M); a = v[M-1:0];
      v = ref_rand(M); b = v[M-1:0];
      sel = n[0];
      #1;
      checks++;
      if (c !== (sel ? a : b)) begin failures++; $display("FAIL sel=%b", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
