// tb_inunit: checks the fiber input unit.
//  * Directed cases, one per row of the LAST-flag tables: normal trailer,
//    1, 2 and 3 words lost, first trailer word lost, damaged first and second
//    E-code. For each the written half-rows, their FILL flags and their LAST
//    flags are compared with the expected 8-word (two 64-bit group) picture.
//  * Random events with idle and errored words mixed in and occasional FIFO
//    back-pressure, compared with a reference built from the rule: skip
//    non-data words, end at the fourth E-code, pad the final group of four
//    with fill words, LAST on the group's second word, and on its first word
//    too when a fill word is in the last row.
//  * Counts of event starts, ends, padded ends and receive errors.
module tb_inunit;
  import in5ctrl_pkg::*;
  logic clk = 0, rst = 1, en = 1, rx_k = 1, rx_err = 0, force_end = 0, fifo_full = 0;
  logic [15:0] rx_data = IDLE_WORD;
  logic wr_en, evt_start, evt_end, filled, rxerr_o, ovfl;
  half_t wr_data;
  int checks = 0, failures = 0;
  half_t got[$], exp[$];
  int n_start = 0, n_end = 0, n_filled = 0, n_rxerr = 0, n_ovfl = 0;
  int exp_events = 0, exp_filled = 0, exp_rxerr = 0;

  inunit dut (.clk, .rst, .en, .rx_data, .rx_k, .rx_err, .force_end, .fifo_full,
              .wr_en, .wr_data, .evt_start, .evt_end, .filled, .rxerr_o, .ovfl);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (wr_en) got.push_back(wr_data);
    n_start  += int'(evt_start);
    n_end    += int'(evt_end);
    n_filled += int'(filled);
    n_rxerr  += int'(rxerr_o);
    n_ovfl   += int'(ovfl);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic send_data(input logic [15:0] w);
    rx_data = w; rx_k = 0; rx_err = 0;
    @(negedge clk);
    rx_data = IDLE_WORD; rx_k = 1;
  endtask

  task automatic send_idle(input int n);
    repeat (n) begin rx_data = IDLE_WORD; rx_k = 1; rx_err = 0; @(negedge clk); end
  endtask

  task automatic send_err();
    rx_data = 16'($urandom); rx_k = 0; rx_err = 1; @(negedge clk);
    rx_data = IDLE_WORD; rx_k = 1; rx_err = 0;
    exp_rxerr++;
  endtask

  function automatic half_t h(input logic [15:0] d, input bit l, input bit f);
    return '{last: l, fill: f, data: d};
  endfunction

  // Compare and clear the collected output.
  task automatic compare(input string name);
    repeat (12) @(negedge clk);
    chk(got.size() == exp.size(), $sformatf("%s: %0d half-rows written, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("%s: word %0d got %h expected %h", name, i, got[i], exp[i]));
    got.delete(); exp.delete();
  endtask

  // A table case: the words sent (then idle) and the expected eight
  // half-rows w0..w7 with their LAST and FILL flags (bit i for word i).
  task automatic table_case(input string name, input logic [15:0] in_w[$],
                            input logic [15:0] exp_w[8], input bit [7:0] l_mask, input bit [7:0] f_mask);
    foreach (in_w[i]) send_data(in_w[i]);
    send_idle(3);
    for (int i = 0; i < 8; i++) exp.push_back(h(exp_w[i], l_mask[i], f_mask[i]));
    exp_events++;
    if (f_mask != 0) exp_filled++;
    compare(name);
  endtask

  // Reference for a random event.
  task automatic random_event(input int len, input int ncodes);
    int nwords;
    logic [15:0] words[$];
    for (int i = 0; i < len; i++) words.push_back(16'h2000 + 16'($urandom_range(16'h9FFF)));
    for (int i = 0; i < ncodes; i++) words.push_back(16'hEF00 + 16'(i));
    // send with idles and errors mixed into the body
    foreach (words[i]) begin
      if (i < len) begin
        if ($urandom_range(3) == 0) send_idle($urandom_range(1, 3));
        if ($urandom_range(15) == 0) send_err();
      end
      fifo_full = ($urandom_range(15) == 0);
      send_data(words[i]);
    end
    fifo_full = 0;
    send_idle($urandom_range(1, 6));
    nwords = words.size();
    begin
      int nf, base;
      nf = (4 - nwords % 4) % 4;
      base = exp.size() + nwords + nf - 4;   // index of the final group's first word
      foreach (words[i]) exp.push_back(h(words[i], 0, 0));
      for (int i = 0; i < nf; i++) exp.push_back(h(FILL_WORD, 0, 1));
      exp[base + 1].last = 1;
      if (nf != 0) exp[base].last = 1;
      exp_events++;
      if (nf != 0) exp_filled++;
    end
  endtask

  initial begin
    logic [15:0] t[$];
    repeat (3) @(negedge clk);
    rst = 0;
    send_idle(4);
    // Words: X0..X3 = 1000..1003, E1..E4 = E001..E004, F = fill word.
    // normal event sync: X X X X | E E E E, LAST on w5
    table_case("normal", '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE001, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE001, 16'hE002, 16'hE003, 16'hE004},
               8'b0010_0000, 8'b0000_0000);
    // lost 1 word: X X X E | E E E F, LAST on w4, w5
    table_case("lost 1", '{16'h1000, 16'h1001, 16'h1002, 16'hE001, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'h1002, 16'hE001, 16'hE002, 16'hE003, 16'hE004, FILL_WORD},
               8'b0011_0000, 8'b1000_0000);
    // lost 2 words: X X E E | E E F F
    table_case("lost 2", '{16'h1000, 16'h1001, 16'hE001, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'hE001, 16'hE002, 16'hE003, 16'hE004, FILL_WORD, FILL_WORD},
               8'b0011_0000, 8'b1100_0000);
    // lost 3 words: X E E E | E F F F, LAST on w4 (E) and w5 (fill)
    table_case("lost 3", '{16'h1000, 16'hE001, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'hE001, 16'hE002, 16'hE003, 16'hE004, FILL_WORD, FILL_WORD, FILL_WORD},
               8'b0011_0000, 8'b1110_0000);
    // lose first E word: X X X X | E E E F, LAST on w4, w5
    table_case("lose 1st E", '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE002, 16'hE003, 16'hE004, FILL_WORD},
               8'b0011_0000, 8'b1000_0000);
    // bad first E code: X X X X | X E E E, LAST on w5
    table_case("bad 1st E", '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'h6001, 16'hE002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'h6001, 16'hE002, 16'hE003, 16'hE004},
               8'b0010_0000, 8'b0000_0000);
    // bad second E code: X X X X | E X E E, LAST on w5 (the damaged word)
    table_case("bad 2nd E", '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE001, 16'h6002, 16'hE003, 16'hE004},
               '{16'h1000, 16'h1001, 16'h1002, 16'h1003, 16'hE001, 16'h6002, 16'hE003, 16'hE004},
               8'b0010_0000, 8'b0000_0000);

    // random events
    for (int n = 0; n < 300; n++) random_event($urandom_range(0, 40), ($urandom_range(3) == 0) ? $urandom_range(1, 3) : 4);
    compare("random");

    // end timeout closes an open event
    send_data(16'h3001); send_data(16'h3002); send_data(16'h3003);
    @(negedge clk); force_end = 1; @(negedge clk); force_end = 0;
    exp.push_back(h(16'h3001, 1, 0)); exp.push_back(h(16'h3002, 1, 0));
    exp.push_back(h(16'h3003, 0, 0)); exp.push_back(h(FILL_WORD, 0, 1));
    exp_events++; exp_filled++;
    compare("force_end");

    chk(n_start == exp_events, $sformatf("event starts %0d expected %0d", n_start, exp_events));
    chk(n_end == exp_events, $sformatf("event ends %0d expected %0d", n_end, exp_events));
    chk(n_filled == exp_filled, $sformatf("padded ends %0d expected %0d", n_filled, exp_filled));
    chk(n_rxerr == exp_rxerr && exp_rxerr > 0, $sformatf("rx errors %0d expected %0d", n_rxerr, exp_rxerr));
    chk(n_ovfl == 0, "no queue overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
