// tb_l1a_counter: fills the event counter at its default depth (8192) with
// L1As, reading some back, and compares the L1A number, the event count and
// the almost-full (>= 7680) and full (8192) flags each clock with a reference.
module tb_l1a_counter;
  logic clk = 0, rst = 1, l1a = 0, evt_done = 0;
  logic [23:0] l1a_num;
  logic [13:0] n_evt;
  logic almost_full, full;
  int checks = 0, failures = 0, ref_n = 0, ref_l1a = 0, saw_af = 0, saw_full = 0;

  l1a_counter dut (.clk, .rst, .l1a, .evt_done, .l1a_num, .n_evt, .almost_full, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 20000; n++) begin
      // phase 1: mostly L1As, phase 2: mostly reads
      if (n < 12000) begin l1a = ($urandom_range(9) != 0); evt_done = ($urandom_range(9) == 0); end
      else           begin l1a = ($urandom_range(9) == 0); evt_done = ($urandom_range(9) != 0); end
      @(posedge clk);
      if (l1a) ref_l1a++;
      if (l1a && !evt_done && ref_n < 8192) ref_n++;
      else if (!l1a && evt_done && ref_n > 0) ref_n--;
      #1;
      checks++;
      if (n_evt !== 14'(ref_n) || l1a_num !== 24'(ref_l1a)) begin
        failures++; $display("n=%0d n_evt=%0d/%0d l1a=%0d/%0d", n, n_evt, ref_n, l1a_num, ref_l1a);
      end
      checks++;
      if (almost_full !== (ref_n >= 7680) || full !== (ref_n >= 8192)) begin
        failures++; $display("n=%0d flags af=%b full=%b count=%0d", n, almost_full, full, ref_n);
      end
      if (almost_full) saw_af++;
      if (full) saw_full++;
      @(negedge clk);
    end
    checks++;
    if (saw_af == 0 || saw_full == 0) begin failures++; $display("flags never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
