// gf_register: WIDTH-bit register with synchronous clear, load and enable.
//
// Priority on each rising clock edge: clr (state := 0), then ld
// (state := ld_val), then en (state := d); otherwise the state holds.
// It serves as the accumulator M4 of the MSW-first multiplier (clr, en),
// as the shifting operand register M2 (ld, en) and the accumulator M5
// (clr, en) of the LSW-first multiplier, and as the operand and result
// registers of the chip (en only). The clear is synchronous, like the
// reset of the accumulator in the original chip; load and enable are this
// implementation's single-clock replacement for separately clocked
// registers.
module gf_register #(
  parameter int unsigned WIDTH = gf2m_pkg::GF_M
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             ld,
  input  logic [WIDTH-1:0] ld_val,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)      q <= '0;
    else if (ld)  q <= ld_val;
    else if (en)  q <= d;
  end
endmodule
