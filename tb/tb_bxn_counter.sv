// tb_bxn_counter: runs the bunch-crossing counter over three orbits at its
// default length (0..923) with a BC0 in the middle, comparing every clock with
// a reference count; also checks the orbit period of 924 clocks.
module tb_bxn_counter;
  logic clk = 0, rst = 1, bc0 = 0;
  logic [11:0] bxn;
  int checks = 0, failures = 0, ref_bx = 0, wraps = 0;

  bxn_counter dut (.clk, .rst, .bc0, .bxn);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_zero = -1, period = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      bc0 = (n == 1500);
      @(posedge clk);
      if (bc0) ref_bx = 0;
      else if (ref_bx == 923) begin ref_bx = 0; wraps++; end
      else ref_bx++;
      #1 checks++;
      if (bxn !== 12'(ref_bx)) begin failures++; $display("n=%0d bxn=%0d expected %0d", n, bxn, ref_bx); end
      if (bxn == 0) begin
        if (last_zero >= 0) period = n - last_zero;
        last_zero = n;
      end
      @(negedge clk);
    end
    checks++;
    if (period != 924) begin failures++; $display("orbit period %0d, expected 924", period); end
    if (wraps == 0) begin failures++; $display("never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
