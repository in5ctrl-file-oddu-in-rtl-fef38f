// tb_fiber_led: with a short prescaler (DIV=4, SHIFT=3) checks that the FOK
// LED is lit for a ready link, off with no link, and blinks with a half period
// of DIV*SHIFT clocks for a present but not ready link; DAV follows dav by one
// clock.
module tb_fiber_led;
  localparam int DIV = 4, SHIFT = 3;
  logic clk = 0, rst = 1, present = 0, ready = 0, dav = 0;
  logic fok_led, dav_led;
  int checks = 0, failures = 0;

  fiber_led #(.DIV(DIV), .SHIFT(SHIFT)) dut (.clk, .rst, .present, .ready, .dav, .fok_led, .dav_led);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges, last_edge, half;
    logic prev;
    repeat (2) @(negedge clk);
    rst = 0;
    // no link
    repeat (50) begin @(negedge clk); checks++; if (fok_led !== 1'b0) failures++; end
    // link ready
    present = 1; ready = 1;
    @(negedge clk);
    repeat (50) begin @(negedge clk); checks++; if (fok_led !== 1'b1) failures++; end
    // present, not ready: blinking
    ready = 0;
    @(negedge clk);
    edges = 0; last_edge = -1; prev = fok_led;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (fok_led !== prev) begin
        if (last_edge >= 0) begin
          half = n - last_edge;
          checks++;
          if (half != DIV*SHIFT) begin failures++; $display("blink half period %0d", half); end
        end
        last_edge = n; edges++;
      end
      prev = fok_led;
    end
    checks++;
    if (edges < 10) begin failures++; $display("only %0d blink edges", edges); end
    // DAV
    for (int n = 0; n < 50; n++) begin
      dav = $urandom_range(1);
      @(negedge clk);
      checks++; if (dav_led !== dav) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
