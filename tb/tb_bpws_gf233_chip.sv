// tb_bpws_gf233_chip: end-to-end test of the chip at its default sizes
// (GF(2^233), 8-bit bus, MSW-first multiplier), driven only through its
// pins the way a host would.
//
// Runs 1000 multiplications and 1000 squarings of random operands (plus
// corner operands), each one: write B byte by byte, load the operand
// register, for a product stream the 30 words of A into byte 0, capture
// the result, and read all 32 result bytes back. Every byte is compared
// with the reference multiplier. It also checks that
//   - the product is captured exactly 30 clocks after the first word
//     (and that capturing one clock earlier does not give it),
//   - a squaring is captured one clock after the operand is loaded,
//   - result bytes 30 and 31 read zero,
//   - data_out holds while w is high,
// and counts each of these mechanisms; one that never happened counts as
// a failure.
module tb_bpws_gf233_chip;
  import gf_ref_pkg::*;
  localparam int unsigned M = 233, K = 74, W = 8, ADDR_W = 5;
  localparam int unsigned NW = 30, NB = 32;
  localparam bit LSW = 1'b0;
  localparam int N_MUL = 1000, N_SQR = 1000;

  logic clk = 1'b0;
  logic rst, w, sel, b_load, res_load;
  logic [ADDR_W-1:0] addr;
  logic [W-1:0] data, data_out;
  int checks = 0, failures = 0;
  int n_mul = 0, n_sqr = 0, n_early = 0, n_hold = 0, n_zero_bytes = 0, n_backtoback = 0;

  always #5 clk = ~clk;

  bpws_gf233_chip dut (
    .clk(clk), .rst(rst), .w(w), .addr(addr), .data(data), .sel(sel),
    .b_load(b_load), .res_load(res_load), .data_out(data_out));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic idle();
    w = 1'b1; addr = 5'd31; data = '0;   // harmless write to the unused byte
    rst = 1'b0; b_load = 1'b0; res_load = 1'b0;
  endtask

  task automatic write_b(ref_t b);
    for (int j = 0; j < int'(NW); j++) begin
      idle();
      addr = ADDR_W'(j + 1);
      data = b[j*W +: W];
      tick();
    end
    idle();
    b_load = 1'b1;
    tick();
    idle();
  endtask

  task automatic read_check(ref_t e, string what);
    logic [W-1:0] held;
    for (int j = 0; j < int'(NB); j++) begin
      idle();
      w = 1'b0;
      addr = ADDR_W'(j);
      tick();
      checks++;
      if (data_out !== ((j < int'(NW)) ? e[j*W +: W] : 8'h00)) begin
        failures++;
        if (failures < 8) $display("FAIL %s byte %0d: got %h exp %h", what, j, data_out, e[j*W +: W]);
      end
      if (j >= int'(NW) && data_out === 8'h00) n_zero_bytes++;
    end
    // with w high the output register holds its last byte
    held = data_out;
    idle();
    addr = 5'd3;
    tick();
    checks++;
    if (data_out !== held) begin failures++; $display("FAIL data_out changed while w high"); end
    else n_hold++;
  endtask

  // One multiplication C = A*B through the pins.
  task automatic multiply(ref_t a, ref_t b);
    ref_t e;
    int unsigned cycles = 0;
    e = ref_mul(a, b, M, K);
    write_b(b);
    for (int s = 0; s < int'(NW); s++) begin
      idle();
      rst = (s == 0);   // clear the accumulator on the first word's clock
      addr = '0;
      data = LSW ? a[s*W +: W] : a[(int'(NW) - 1 - s)*W +: W];
      tick();
      cycles++;
    end
    idle();
    sel = 1'b1;
    res_load = 1'b1;
    tick();
    checks++;
    if (cycles != NW) begin failures++; $display("FAIL %0d word clocks", cycles); end
    read_check(e, "mul");
    n_mul++;
  endtask

  // Capturing after only 29 words must not give the product.
  task automatic multiply_early(ref_t a, ref_t b);
    ref_t e;
    e = ref_mul(a, b, M, K);
    write_b(b);
    for (int s = 0; s < int'(NW) - 1; s++) begin
      idle();
      rst = (s == 0);
      addr = '0;
      data = LSW ? a[s*W +: W] : a[(int'(NW) - 1 - s)*W +: W];
      tick();
    end
    idle();
    sel = 1'b1;
    res_load = 1'b1;
    tick();
    idle();
    // read byte 0..29 and compare as a whole
    begin
      ref_t got = '0;
      for (int j = 0; j < int'(NW); j++) begin
        idle(); w = 1'b0; addr = ADDR_W'(j);
        tick();
        got[j*W +: W] = data_out;
      end
      checks++;
      if (got[M-1:0] === e[M-1:0]) begin failures++; $display("FAIL product ready before 30 words"); end
      else n_early++;
    end
  endtask

  task automatic square(ref_t b);
    ref_t e;
    e = ref_mul(b, b, M, K);
    write_b(b);
    idle();
    sel = 1'b0;
    res_load = 1'b1;   // one clock after the operand register was loaded
    tick();
    read_check(e, "sqr");
    n_sqr++;
  endtask

  initial begin
    ref_t one, a, b, a2;
    sel = 1'b0;
    idle();
    tick();
    one = '0; one[0] = 1'b1;
    multiply(ref_ones(M), ref_ones(M));
    multiply(one, ref_ones(M));
    multiply_early(ref_rand(M), ref_rand(M));
    for (int n = 0; n < N_MUL; n++) begin
      a = ref_rand(M); b = ref_rand(M);
      multiply(a, b);
      if (n % 100 == 0) begin
        // back to back with the same B: the accumulator must restart from 0
        a2 = ref_rand(M);
        multiply(a2, b);
        n_backtoback++;
      end
    end
    square(ref_ones(M));
    square(one);
    for (int n = 0; n < N_SQR; n++) square(ref_rand(M));

    $display("mechanisms: multiplications=%0d squarings=%0d early_capture_rejected=%0d hold_while_w=%0d zero_top_bytes=%0d back_to_back=%0d",
             n_mul, n_sqr, n_early, n_hold, n_zero_bytes, n_backtoback);
    checks++; if (n_mul == 0) failures++;
    checks++; if (n_sqr == 0) failures++;
    checks++; if (n_early == 0) failures++;
    checks++; if (n_hold == 0) failures++;
    checks++; if (n_zero_bytes == 0) failures++;
    checks++; if (n_backtoback == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
