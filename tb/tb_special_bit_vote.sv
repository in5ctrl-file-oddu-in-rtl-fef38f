// tb_special_bit_vote: random four-word groups (many with one corrupted
// copy) are checked against a reference popcount: vote = (>= 2 copies AND
// andcom) OR orcom, notall = some but not all copies set. All ANDCOM/ORCOM
// combinations are exercised.
module tb_special_bit_vote;
  logic [3:0][15:0] w;
  logic andcom, orcom;
  logic [15:0] vote, notall;
  int checks = 0, failures = 0;

  special_bit_vote dut (.w, .andcom, .orcom, .vote, .notall);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] base, ev, en;
      base = 16'($urandom);
      for (int k = 0; k < 4; k++) w[k] = base;
      if (n % 2 == 0) w[$urandom_range(3)][$urandom_range(15)] ^= 1'b1;  // one upset
      else for (int k = 0; k < 4; k++) w[k] = 16'($urandom);
      andcom = (n % 4) != 3;
      orcom  = (n % 7) == 6;
      #1;
      for (int b = 0; b < 16; b++) begin
        int c;
        c = int'(w[0][b]) + int'(w[1][b]) + int'(w[2][b]) + int'(w[3][b]);
        ev[b] = ((c >= 2) && andcom) || orcom;
        en[b] = (c != 0) && (c != 4);
      end
      checks++;
      if (vote !== ev)   begin failures++; $display("n=%0d vote=%h expected %h", n, vote, ev); end
      checks++;
      if (notall !== en) begin failures++; $display("n=%0d notall=%h expected %h", n, notall, en); end
      // with a single upset and no forcing, the vote recovers the original
      if (n % 2 == 0 && andcom && !orcom) begin
        checks++;
        if (vote !== base) begin failures++; $display("n=%0d single upset not corrected", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
