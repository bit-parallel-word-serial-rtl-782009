// tb_codecout: reads random byte addresses of a random 256-bit input and
// checks that the byte appears on data_out one clock later while w is
// low, and that data_out holds while w is high.
module tb_codecout;
  localparam int unsigned W = 8, ADDR_W = 5, NB = 1 << ADDR_W;
  logic clk = 1'b0;
  logic w;
  logic [ADDR_W-1:0] addr;
  logic [W*NB-1:0] d;
  logic [W-1:0] data_out, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codecout #(.W(W), .ADDR_W(ADDR_W)) dut (.clk(clk), .w(w), .addr(addr), .d(d), .data_out(data_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = 1'b0; addr = '0;
    for (int i = 0; i < int'(NB); i++) d[i*32 % (W*NB) +: 32] = $urandom;
    @(posedge clk); #1;
    model = d[7:0];
    for (int n = 0; n < 3000; n++) begin
      if (n % 100 == 0)
        for (int i = 0; i < int'(W*NB/32); i++) d[i*32 +: 32] = $urandom;
      w = ($urandom % 4) == 0;
      addr = ADDR_W'($urandom);
      // byte addr of d, picked bit by bit
      if (!w) for (int b = 0; b < int'(W); b++) model[b] = d[int'(addr)*int'(W) + b];
      @(posedge clk); #1;
      checks++;
      if (data_out !== model) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d w=%b addr=%0d", n, w, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
