// sticky_err_reg: sticky error monitor register.
//
// Each bit sets when its error input is high on a clock edge and then holds
// until reset: the register's D input is the OR of the error inputs with its
// own output, clock enable tied high, asynchronous clear on reset. This is the
// structure of the design's "RX Error" (8 bits) and "Full FIFO" (12 bits)
// monitors; the width is a parameter. The output follows an input edge by one
// clock.
module sticky_err_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,     // asynchronous clear, active high
  input  logic [W-1:0] err_in,
  output logic [W-1:0] err_q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) err_q <= '0;
    else     err_q <= err_q | err_in;
  end
endmodule
