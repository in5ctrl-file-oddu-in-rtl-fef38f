// tb_diag_mux: for every mode checks, one clock after it is applied, that
// the logic-analyser and LED outputs show the selected inputs (modes 8..15)
// or 0 (modes 0..7, multiplexer disabled).
module tb_diag_mux;
  logic clk = 0, rst = 1;
  logic [3:0] mode;
  logic [7:0][15:0] la_in;
  logic [7:0][7:0] led_in;
  logic [15:0] la_out;
  logic [7:0] led_out;
  int checks = 0, failures = 0;

  diag_mux dut (.clk, .rst, .mode, .la_in, .led_in, .la_out, .led_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 0; la_in = '0; led_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] el; logic [7:0] ed;
      mode = 4'(n);
      for (int k = 0; k < 8; k++) begin la_in[k] = 16'($urandom); led_in[k] = 8'($urandom); end
      el = mode[3] ? la_in[mode[2:0]] : '0;
      ed = mode[3] ? led_in[mode[2:0]] : '0;
      @(negedge clk);
      checks++;
      if (la_out !== el || led_out !== ed) begin
        failures++; $display("mode %0d: la %h/%h led %h/%h", mode, la_out, el, led_out, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
