// diag_mux: diagnostic multiplexer onto the logic-analyser and LED pins.
//
// A 4-bit mode selects what the board shows: MODE[2:0] picks one of eight
// 16-bit buses for the logic-analyser outputs and one of eight 8-bit buses for
// the LEDs, and MODE[3] enables both multiplexers (disabled outputs are 0).
// The 16-bit result is registered in the output flip-flops on the system
// clock before it reaches the pins (one clock of latency); the LED result is
// registered the same way. This follows the design's MUX8_16B, MUX8_8B and
// OFD16 cells; what each input carries is decided by the instantiating level.
module diag_mux (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       mode,
  input  logic [7:0][15:0] la_in,
  input  logic [7:0][7:0]  led_in,
  output logic [15:0]      la_out,
  output logic [7:0]       led_out
);
  logic [15:0] la_d;
  logic [7:0]  led_d;

  always_comb begin
    la_d  = mode[3] ? la_in[mode[2:0]]  : '0;
    led_d = mode[3] ? led_in[mode[2:0]] : '0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      la_out  <= '0;
      led_out <= '0;
    end else begin
      la_out  <= la_d;
      led_out <= led_d;
    end
  end
endmodule
