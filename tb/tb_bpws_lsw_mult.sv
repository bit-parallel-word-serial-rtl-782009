// tb_bpws_lsw_mult: runs complete LSW-first multiplications and checks the
// product against the reference multiplier, and that it is ready exactly
// after ceil(m/w) words: 30 for the 8 x 233 design, 26 for a 16-bit-word
// GF(2^409) instance (F = x^409 + x^87 + 1). init is applied before every
// multiplication, so back-to-back products also check that it reloads B
// and clears the accumulator.
module tb_bpws_lsw_mult;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233, K = 74, W = 8;
  localparam int unsigned M2 = 409, K2 = 87, W2 = 16;
  localparam int unsigned NW = (M + W - 1) / W;      // 30
  localparam int unsigned NW2 = (M2 + W2 - 1) / W2;  // 26

  logic clk = 1'b0;
  logic init, init2;
  logic [M-1:0]  i1, c;
  logic [W-1:0]  i2;
  logic [M2-1:0] j1, c2;
  logic [W2-1:0] j2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bpws_lsw_mult #(.M(M),  .K(K),  .W(W))  dut  (.clk(clk), .init(init),  .i1(i1), .i2(i2), .c(c));
  bpws_lsw_mult #(.M(M2), .K(K2), .W(W2)) dut2 (.clk(clk), .init(init2), .i1(j1), .i2(j2), .c(c2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run233(ref_t a, ref_t b);
    ref_t e;
    int unsigned words = 0;
    e = ref_mul(a, b, M, K);
    i1 = b[M-1:0];
    init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
    i1 = ~i1;   // B is sampled at init only
    for (int j = 0; j < int'(NW); j++) begin
      i2 = a[j*W +: W];
      words++;
      #1;
      if (j == int'(NW) - 1) begin
        checks++;
        if (c !== e[M-1:0]) begin
          failures++;
          if (failures < 5) $display("FAIL 233: a=%h b=%h c=%h exp=%h", a[M-1:0], b[M-1:0], c, e[M-1:0]);
        end
        checks++;
        if (words != 30) begin failures++; $display("FAIL word count %0d", words); end
      end
      @(posedge clk); #1;
    end
  endtask

  task automatic run409(ref_t a, ref_t b);
    ref_t e;
    e = ref_mul(a, b, M2, K2);
    j1 = b[M2-1:0];
    init2 = 1'b1;
    @(posedge clk); #1;
    init2 = 1'b0;
    for (int j = 0; j < int'(NW2); j++) begin
      j2 = a[j*W2 +: W2];
      #1;
      if (j == int'(NW2) - 1) begin
        checks++;
        if (c2 !== e[M2-1:0]) begin
          failures++;
          if (failures < 5) $display("FAIL 409: a=%h b=%h", a[M2-1:0], b[M2-1:0]);
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    ref_t one;
    init = 1'b0; init2 = 1'b0; i2 = '0; j2 = '0; i1 = '0; j1 = '0;
    one = '0; one[0] = 1'b1;
    @(posedge clk); #1;
    run233(ref_ones(M), ref_ones(M));
    run233(one, ref_ones(M));
    run233(ref_ones(M), one);
    for (int n = 0; n < 200; n++) run233(ref_rand(M), ref_rand(M));
    run409(ref_ones(M2), ref_ones(M2));
    for (int n = 0; n < 100; n++) run409(ref_rand(M2), ref_rand(M2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
