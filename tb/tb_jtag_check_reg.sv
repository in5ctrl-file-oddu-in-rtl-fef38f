// tb_jtag_check_reg: captures random status words into a 24-bit readout
// register and shifts them out, checking the TDO bit stream LSB first, that
// the TDI bits follow the status, and that nothing moves while the register
// is not selected (dvcenb or sel2 low).
module tb_jtag_check_reg;
  localparam int W = 24;
  logic drck = 0, rst = 1, dvcenb = 0, sel2 = 0, shift = 0, tdi = 0;
  logic [W-1:0] status;
  logic tdo;
  int checks = 0, failures = 0;

  jtag_check_reg #(.W(W)) dut (.drck, .rst, .dvcenb, .sel2, .shift, .tdi, .status, .tdo);

  always #5 drck = ~drck;

  initial begin
    repeat (5000) @(posedge drck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    logic [W-1:0] s, tin;
    status = '0;
    repeat (2) @(negedge drck);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      s = W'($urandom); tin = W'($urandom);
      status = s;
      // capture
      @(negedge drck); dvcenb = 1; sel2 = 1; shift = 0;
      @(negedge drck); status = ~s; shift = 1;
      // shift out W bits, then W more that must be the TDI bits
      for (int b = 0; b < 2*W; b++) begin
        check(tdo, b < W ? s[b] : tin[b-W], "tdo");
        tdi = (b < W) ? tin[b] : 1'b0;
        if (b == 5) begin
          // deselected: no shifting
          sel2 = 0; @(negedge drck); check(tdo, s[b], "hold sel2"); sel2 = 1;
          dvcenb = 0; @(negedge drck); check(tdo, s[b], "hold dvcenb"); dvcenb = 1;
        end
        @(negedge drck);
      end
      dvcenb = 0; sel2 = 0; shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
