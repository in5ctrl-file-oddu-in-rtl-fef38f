// tb_jtag_decode: for every opcode checks that exactly the matching select
// is high and that TDO follows that register's TDO input; with the enable
// low all selects and TDO must be 0.
module tb_jtag_decode;
  logic en;
  logic [4:0] op;
  logic [31:0] tdo_in, f;
  logic tdo;
  int checks = 0, failures = 0;

  jtag_decode dut (.en, .op, .tdo_in, .f, .tdo);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int o = 0; o < 32; o++) begin
        for (int k = 0; k < 4; k++) begin
          en = e[0]; op = 5'(o); tdo_in = $urandom;
          #1;
          checks++;
          if (f !== (e ? (32'd1 << o) : 32'd0)) begin failures++; $display("op %0d en %0d: f=%h", o, e, f); end
          checks++;
          if (tdo !== (e ? tdo_in[o] : 1'b0)) begin failures++; $display("op %0d en %0d: tdo=%b", o, e, tdo); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
