// codec: byte-addressed operand register file of the chip.
//
// The chip has an 8-bit data bus, so a 233-bit operand is written one byte
// at a time. The register file holds 2^ADDR_W bytes (256 bits for the
// default 5-bit address); on a rising clock edge with w high, the byte on
// data is stored at byte addr, i.e. bits [addr*W +: W]. The other bytes
// hold. The chip uses byte 0 as the multiplier's word input and bytes
// 1..30 (bits 240:8) as operand B, as the original chip does.
// There is no reset: every byte is written before it is used.
module codec #(
  parameter int unsigned W      = gf2m_pkg::GF_W,
  parameter int unsigned ADDR_W = gf2m_pkg::ADDR_W
) (
  input  logic                      clk,
  input  logic                      w,
  input  logic [ADDR_W-1:0]         addr,
  input  logic [W-1:0]              data,
  output logic [W*(2**ADDR_W)-1:0]  q
);
  always_ff @(posedge clk) begin
    if (w) q[addr*W +: W] <= data;
  end
endmodule
