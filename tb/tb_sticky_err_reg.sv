// tb_sticky_err_reg: drives random error pulses into a 12-bit sticky error
// register and compares it every clock with a reference OR-accumulator;
// checks that reset clears it and that bits hold after their input drops.
module tb_sticky_err_reg;
  localparam int W = 12;
  logic clk = 0, rst = 1;
  logic [W-1:0] err_in = '0, err_q, ref_q;
  int checks = 0, failures = 0;

  sticky_err_reg #(.W(W)) dut (.clk, .rst, .err_in, .err_q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (err_q !== '0) failures++;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      // sparse pulses: each bit set with probability 1/32
      err_in = '0;
      for (int b = 0; b < W; b++) if ($urandom_range(31) == 0) err_in[b] = 1'b1;
      if (n == 150) begin
        rst = 1; ref_q = '0;
        #1 checks++; if (err_q !== '0) begin failures++; $display("reset did not clear"); end
        @(posedge clk); #1 rst = 0;
        continue;
      end
      @(posedge clk);
      ref_q = ref_q | err_in;
      #1 checks++;
      if (err_q !== ref_q) begin
        failures++;
        $display("cycle %0d: err_q=%h expected %h", n, err_q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
