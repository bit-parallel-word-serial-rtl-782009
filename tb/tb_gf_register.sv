// tb_gf_register: drives random clr / ld / en / data and compares the
// register with a model of its priority (clr, then ld, then en, else hold).
module tb_gf_register;
  import gf_ref_pkg::*;
  localparam int unsigned WIDTH = 233;
  logic clk = 1'b0;
  logic clr, ld, en;
  logic [WIDTH-1:0] ld_val, d, q, model;
  int checks = 0, failures = 0;
  int n_clr = 0, n_ld = 0, n_en = 0, n_hold = 0;

  always #5 clk = ~clk;

  gf_register #(.WIDTH(WIDTH)) dut (.clk(clk), .clr(clr), .ld(ld), .ld_val(ld_val),
                                    .en(en), .d(d), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t v;
    clr = 1'b1; ld = 1'b0; en = 1'b0; ld_val = '0; d = '0;
    @(posedge clk); #1;
    model = '0;
    for (int n = 0; n < 2000; n++) begin
      clr = ($urandom % 8) == 0;
      ld  = ($urandom % 4) == 0;
      en  = ($urandom % 2) == 0;
      v = ref_rand(WIDTH); ld_val = v[WIDTH-1:0];
      v = ref_rand(WIDTH); d = v[WIDTH-1:0];
      if (clr)      begin model = '0;     n_clr++;  end
      else if (ld)  begin model = ld_val; n_ld++;   end
      else if (en)  begin model = d;      n_en++;   end
      else                                n_hold++;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d clr=%b ld=%b en=%b", n, clr, ld, en);
      end
    end
    checks++;
    if (n_clr == 0 || n_ld == 0 || n_en == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
