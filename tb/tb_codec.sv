// tb_codec: random byte writes (w high) and idle cycles (w low) to the
// 32-byte register file, compared after every clock with a byte array
// model: only the addressed byte changes, and only while w is high.
module tb_codec;
  localparam int unsigned W = 8, ADDR_W = 5, NB = 1 << ADDR_W;
  logic clk = 1'b0;
  logic w;
  logic [ADDR_W-1:0] addr;
  logic [W-1:0] data;
  logic [W*NB-1:0] q;
  logic [W-1:0] model [NB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codec #(.W(W), .ADDR_W(ADDR_W)) dut (.clk(clk), .w(w), .addr(addr), .data(data), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every byte first
    for (int i = 0; i < int'(NB); i++) begin
      w = 1'b1; addr = ADDR_W'(i); data = 8'($urandom);
      model[i] = data;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      w = ($urandom % 3) != 0;
      addr = ADDR_W'($urandom);
      data = 8'($urandom);
      if (w) model[addr] = data;
      @(posedge clk); #1;
      for (int i = 0; i < int'(NB); i++) begin
        checks++;
        if (q[i*W +: W] !== model[i]) begin
          failures++;
          if (failures < 5) $display("FAIL byte %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
