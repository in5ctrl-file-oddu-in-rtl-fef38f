// jtag_check_reg: JTAG status readout register (the design's CHECK_n cells).
//
// Clocked by the JTAG data-register clock. The register is active only while
// its opcode is decoded (dvcenb) and the USER2 chain is selected (sel2); the
// design forms this enable as DVCENB AND SEL2. While active with shift low it
// captures the parallel status word; with shift high it shifts right, TDI
// entering at the top and bit 0 appearing on TDO, so the status comes out LSB
// first. Asynchronous clear on reset. The width is a parameter (the design uses
// 10, 12, 16, 24 and 32 bits). The capture/shift roles of SHIFT and the bit
// order are this implementation's reading of the schematic cell.
module jtag_check_reg #(
  parameter int unsigned W = 16
) (
  input  logic         drck,    // JTAG data-register clock
  input  logic         rst,
  input  logic         dvcenb,  // this register's opcode is selected
  input  logic         sel2,    // USER2 chain selected
  input  logic         shift,   // 0: capture, 1: shift
  input  logic         tdi,
  input  logic [W-1:0] status,
  output logic         tdo
);
  logic [W-1:0] sr;
  logic         clkena;

  assign clkena = dvcenb & sel2;
  assign tdo    = sr[0];

  always_ff @(posedge drck or posedge rst) begin
    if (rst)         sr <= '0;
    else if (clkena) begin
      if (shift)     sr <= {tdi, sr[W-1:1]};
      else           sr <= status;
    end
  end
endmodule
