// codecout: byte-addressed read-out of the chip's result.
//
// On a rising clock edge with w low, byte addr of d (bits [addr*W +: W])
// is registered onto data_out, so a byte appears one clock after its
// address. With w high (the host is writing operands) data_out holds.
// The chip feeds it the 233-bit result zero-extended to 2^ADDR_W bytes,
// so bytes 0..29 carry the result, LSB first, and 30..31 read zero.
module codecout #(
  parameter int unsigned W      = gf2m_pkg::GF_W,
  parameter int unsigned ADDR_W = gf2m_pkg::ADDR_W
) (
  input  logic                      clk,
  input  logic                      w,
  input  logic [ADDR_W-1:0]         addr,
  input  logic [W*(2**ADDR_W)-1:0]  d,
  output logic [W-1:0]              data_out
);
  always_ff @(posedge clk) begin
    if (!w) data_out <= d[addr*W +: W];
  end
endmodule
