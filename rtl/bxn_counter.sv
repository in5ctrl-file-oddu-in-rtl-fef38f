// bxn_counter: bunch-crossing number.
//
// Counts one per clock from 0 to BX_MAX and clears after BX_MAX, following
// the accelerator orbit (the design's default 923 = 0x39B, the SPS cycle).
// A BC0 (bunch-crossing-zero) strobe clears it to 0 on the next clock so the
// count stays in step with the machine. Asynchronous reset to 0.
module bxn_counter #(
  parameter int unsigned BX_MAX = 923
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  output logic [11:0] bxn
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)                        bxn <= '0;
    else if (bc0)                   bxn <= '0;
    else if (bxn == 12'(BX_MAX))    bxn <= '0;
    else                            bxn <= bxn + 12'd1;
  end
endmodule
