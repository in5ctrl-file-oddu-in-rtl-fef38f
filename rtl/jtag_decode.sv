// jtag_decode: JTAG opcode decoder and TDO selector.
//
// A 5-bit opcode, held in the JTAG instruction register outside this block,
// is decoded into 32 one-hot register selects F0..F31 (the design's 5-to-32
// "Decode 32E" macro, enabled by en). The same opcode steers a 32-to-1 bussed
// multiplexer with enable ("M32E5BUS") that picks the TDO of the addressed
// readout register; when disabled the output is 0. Purely combinational.
module jtag_decode (
  input  logic        en,
  input  logic [4:0]  op,
  input  logic [31:0] tdo_in,  // TDO of the register for each opcode
  output logic [31:0] f,       // one-hot opcode selects
  output logic        tdo
);
  always_comb begin
    f = '0;
    if (en) f[op] = 1'b1;
  end
  assign tdo = en & tdo_in[op];
endmodule
