// fiber_led: status LEDs of one fiber input.
//
// FOK LED: lit while the link is present and ready, blinking while it is
// present but not ready, off when no link is present. DAV LED: lit while data
// is being transferred. The blink is made from a slow clock: a prescaler
// gives an enable once every DIV clocks (2.5 MHz / 65536 is the design's
// ~38 Hz BCLK_EN), and the blink toggles every SHIFT enables (13 gives the
// design's ~1.5 Hz, 5 about 4 Hz). Outputs are registered.
module fiber_led #(
  parameter int unsigned DIV   = 65536,
  parameter int unsigned SHIFT = 13
) (
  input  logic clk,        // slow clock
  input  logic rst,
  input  logic present,    // optical signal present
  input  logic ready,      // link synchronised and OK
  input  logic dav,        // data being transferred
  output logic fok_led,
  output logic dav_led
);
  logic [$clog2(DIV)-1:0]   pre;
  logic [$clog2(SHIFT+1)-1:0] bcnt;
  logic                     bclk_en, blink;

  assign bclk_en = (pre == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pre     <= '0;
      bcnt    <= '0;
      blink   <= 1'b0;
      fok_led <= 1'b0;
      dav_led <= 1'b0;
    end else begin
      pre <= (pre == $bits(pre)'(DIV - 1)) ? '0 : pre + 1'b1;
      if (bclk_en) begin
        if (bcnt == $bits(bcnt)'(SHIFT - 1)) begin
          bcnt  <= '0;
          blink <= ~blink;
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
      fok_led <= present & (ready | blink);
      dav_led <= dav;
    end
  end
endmodule
