// tb_sfifo18_36x1024: checks the input FIFO at its default size (1024 rows).
//  * The RAM layout functions: each logical bit lands on the RAM bit the
//    byte-and-parity table gives, and the two functions invert each other.
//  * Empty latency: a row completed by a write at clock t shows (empty low)
//    after clock t+1, not before.
//  * Random traffic against a reference queue of half-rows: dout must always
//    be the oldest complete row, count the half-rows held.
//  * Filling: almost_full from 2048-120 half-rows, full at 2048, writes while
//    full are dropped, and the whole content reads back in order.
module tb_sfifo18_36x1024;
  import in5ctrl_pkg::*;
  logic clk = 0, rst = 1, we = 0, oe = 1, rd_en = 0;
  half_t din;
  logic [35:0] dout;
  logic empty, almost_full, full;
  logic [11:0] count;
  int checks = 0, failures = 0;
  half_t hq[$];

  sfifo18_36x1024 dut (.clk, .rst, .we, .din, .oe, .rd_en, .dout, .empty, .almost_full, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // One clock with the given controls; updates the reference on the edge.
  task automatic step(input logic w, input half_t d, input logic r);
    logic do_rd, do_wr;
    we = w; din = d; rd_en = r;
    do_rd = r && oe && !empty;
    do_wr = w && !full;
    @(posedge clk);
    if (do_rd) begin void'(hq.pop_front()); void'(hq.pop_front()); end
    if (do_wr) hq.push_back(d);
    @(negedge clk);
    we = 0; rd_en = 0;
  endtask

  task automatic check_state();
    chk(count == 12'(hq.size()), $sformatf("count %0d expected %0d", count, hq.size()));
    if (!empty) begin
      chk(hq.size() >= 2, "not empty without a complete row");
      if (hq.size() >= 2)
        chk(dout == {hq[1], hq[0]}, $sformatf("dout %h expected %h", dout, {hq[1], hq[0]}));
    end
    chk(full == (hq.size() >= 2048), "full flag");
    chk(almost_full == (hq.size() >= 2048 - 120), "almost_full flag");
  endtask

  function automatic half_t rnd();
    return half_t'(18'($urandom));
  endfunction

  initial begin
    int n_af = 0;
    // RAM layout table
    for (int b = 0; b < 36; b++) begin
      logic [35:0] one, d;
      int exp_pos;
      one = 36'd1 << b;
      d = row_to_bram(one);
      if      (b <= 7)  exp_pos = b;
      else if (b == 8)  exp_pos = 16;
      else if (b <= 16) exp_pos = b + 9;
      else if (b == 17) exp_pos = 34;
      else if (b <= 25) exp_pos = b - 10;
      else if (b == 26) exp_pos = 17;
      else if (b <= 34) exp_pos = b - 1;
      else              exp_pos = 35;
      chk(d == (36'd1 << exp_pos), $sformatf("layout of row bit %0d", b));
      chk(bram_to_row(d) == one, $sformatf("inverse for row bit %0d", b));
    end

    din = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(empty && count == 0, "empty after reset");

    // empty latency
    step(1, rnd(), 0);
    chk(empty, "half row is not readable");
    step(1, rnd(), 0);
    chk(empty, "empty one clock after the row completes");
    step(0, '0, 0);
    chk(!empty, "row visible one clock later");
    check_state();

    // random traffic
    for (int n = 0; n < 20000; n++) begin
      oe = ($urandom_range(7) != 0);
      step($urandom_range(2) != 0, rnd(), $urandom_range(1));
      check_state();
    end
    oe = 1;

    // drain, then fill to full
    while (!empty) begin step(0, '0, 1); check_state(); end
    for (int n = 0; n < 2100; n++) begin
      step(1, rnd(), 0);
      if (almost_full) n_af++;
    end
    check_state();
    chk(full && hq.size() == 2048, "full after 2048 half-rows");
    chk(n_af > 0, "almost_full seen");
    // simultaneous write and read at full: write dropped, one row read
    step(1, rnd(), 1);
    check_state();
    while (!empty) begin step(0, '0, 1); check_state(); end
    chk(hq.size() == 0 && count == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
