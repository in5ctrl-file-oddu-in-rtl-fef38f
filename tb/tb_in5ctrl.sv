// tb_in5ctrl: end-to-end test of the input-control FPGA at its full size.
//
// Eight fibers: 0..5 live, 6 absent, 7 present but not ready. A reader drains
// the FIFOs and compares every 36-bit row with rows built from the data sent
// (words grouped by four, fill words at the end, LAST on the final group's
// first row). Along the way the test provokes each mechanism once or more and
// counts it: fill padding, LAST rows, receive errors, fiber-OK change,
// start timeout, end-wait and end-active timeouts (which close the open
// event), FIFO almost full and full, the trailer vote and its special-word
// error, the event counter's almost-full
// and full flags, bunch-crossing wrap and BC0, the blinking FOK LED, the
// diagnostic multiplexer, and JTAG readout of every status register.
module tb_in5ctrl;
  import in5ctrl_pkg::*;

  logic clk = 0, slow_clk = 0, rst = 1;
  logic [NFIB-1:0][15:0] rx_data;
  logic [NFIB-1:0] rx_k, rx_err, fiber_present, fiber_ok;
  logic l1a = 0, bc0 = 0, cal_mode = 0, evt_done = 0;
  logic [NFIB-1:0] fifo_oe, fifo_rd;
  logic [NFIB-1:0][35:0] fifo_dout;
  logic [NFIB-1:0] fifo_empty, fifo_af, fifo_full, evt_busy, inunit_ovfl;
  logic [23:0] l1a_num;
  logic [13:0] n_evt;
  logic evt_af, evt_full;
  logic [11:0] bxn;
  logic [2:0] vote_sel = 0;
  logic [15:0] lvb;
  logic spwd_err;
  logic drck = 0, sel2 = 0, jshift = 0, tdi = 0, tdo;
  logic [4:0] jtag_op = 0;
  logic [3:0] mode = 0;
  logic [15:0] la_out;
  logic [7:0] led_out;
  logic [NFIB-1:0] fok_led, dav_led;

  in5ctrl dut (.*);

  always #5 clk = ~clk;
  always #1 slow_clk = ~slow_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_fill = 0, m_last = 0, m_rxerr = 0, m_stmo = 0, m_etmo = 0, m_af = 0, m_full = 0;
  int m_vote = 0, m_spwd = 0, m_evt_af = 0, m_evt_full = 0, m_bx_wrap = 0, m_bc0 = 0;
  int m_blink = 0, m_jtag = 0, m_diag = 0, m_rows = 0;

  logic [35:0] exp_rows [NFIB][$];
  logic [NFIB-1:0] rd_allow = '1;
  logic [NFIB-1:0] ignore_extra = '0;   // rows beyond the expected ones are not checked
  int m_ovfl = 0, m_eact = 0, m_ferr = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- reader
  assign fifo_oe = '1;
  always_comb for (int i = 0; i < NFIB; i++) fifo_rd[i] = rd_allow[i] && !fifo_empty[i];

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NFIB; i++) begin
      if (fifo_rd[i]) begin
        if (exp_rows[i].size() == 0 && ignore_extra[i]) begin
          // not compared
        end else if (exp_rows[i].size() == 0) begin
          checks++; failures++; $display("FAIL @%0t: fiber %0d unexpected row %h", $time, i, fifo_dout[i]);
        end else begin
          logic [35:0] e;
          e = exp_rows[i].pop_front();
          checks++;
          if (fifo_dout[i] !== e) begin
            failures++;
            if (failures < 30) $display("FAIL @%0t: fiber %0d row %h expected %h", $time, i, fifo_dout[i], e);
          end
          m_rows++;
          if (e[17] | e[35]) m_last++;
        end
      end
    end
    if (fifo_af != 0) m_af++;
    if (fifo_full != 0) m_full++;
    if (evt_af) m_evt_af++;
    if (inunit_ovfl != 0) m_ovfl++;
    if (evt_full) m_evt_full++;
    if (bxn == 12'd923) m_bx_wrap++;
  end

  logic prev_fok7 = 0;
  always @(posedge slow_clk) begin
    if (fok_led[7] != prev_fok7) m_blink++;
    prev_fok7 <= fok_led[7];
  end

  // ------------------------------------------------------------- senders
  function automatic half_t h(input logic [15:0] d, input bit l, input bit f);
    return '{last: l, fill: f, data: d};
  endfunction

  // Expected half-rows of one event (words as the fiber sends them, without
  // the idles), turned into rows for the reader.
  task automatic expect_event(input int f, input logic [15:0] words[$]);
    half_t hs[$];
    int nf, base;
    foreach (words[i]) hs.push_back(h(words[i], 0, 0));
    nf = (4 - words.size() % 4) % 4;
    for (int i = 0; i < nf; i++) hs.push_back(h(FILL_WORD, 0, 1));
    base = hs.size() - 4;
    hs[base + 1].last = 1;
    if (nf != 0) begin hs[base].last = 1; m_fill++; end
    for (int i = 0; i < hs.size(); i += 2) exp_rows[f].push_back({hs[i+1], hs[i]});
  endtask

  // Send the given words on several fibers in parallel, one per clock,
  // with optionally one receive-error word inserted on one fiber after the
  // third word (the other fibers see an idle there, still inside their data).
  task automatic send_words(input logic [NFIB-1:0] mask, input logic [15:0] words[NFIB][$],
                            input int err_fiber);
    int maxlen = 0;
    for (int f = 0; f < NFIB; f++) if (mask[f] && words[f].size() > maxlen) maxlen = words[f].size();
    for (int n = 0; n < maxlen; n++) begin
      for (int f = 0; f < NFIB; f++) begin
        rx_k[f] = 1; rx_err[f] = 0; rx_data[f] = IDLE_WORD;
        if (mask[f] && n < words[f].size()) begin rx_k[f] = 0; rx_data[f] = words[f][n]; end
      end
      @(negedge clk);
      if (err_fiber >= 0 && n == 2) begin
        for (int f = 0; f < NFIB; f++) begin rx_k[f] = 1; rx_data[f] = IDLE_WORD; end
        rx_k[err_fiber] = 0; rx_err[err_fiber] = 1; rx_data[err_fiber] = 16'h1234;
        @(negedge clk);
        rx_err[err_fiber] = 0;
      end
    end
    for (int f = 0; f < NFIB; f++) begin rx_k[f] = 1; rx_err[f] = 0; rx_data[f] = IDLE_WORD; end
    repeat (4) @(negedge clk);
  endtask

  task automatic pulse_l1a();
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
  endtask

  // --------------------------------------------------------------- JTAG
  task automatic jtag_read(input logic [4:0] op, input int width, output logic [31:0] val);
    val = '0;
    @(negedge drck); jtag_op = op; sel2 = 1; jshift = 0;
    @(negedge drck); jshift = 1;            // captured on the edge between
    for (int b = 0; b < width; b++) begin
      val[b] = tdo;
      @(negedge drck);
    end
    sel2 = 0; jshift = 0;
    m_jtag++;
  endtask

  always #7 drck = ~drck;

  // ----------------------------------------------------------------- main
  initial begin
    logic [15:0] w[NFIB][$];
    logic [31:0] v;
    int t0;
    rx_k = '1; rx_err = '0;
    for (int f = 0; f < NFIB; f++) rx_data[f] = IDLE_WORD;
    fiber_present = 8'b1011_1111;
    fiber_ok      = 8'b0011_1111;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // 1. events on fibers 0..5, varied lengths and trailers
    for (int e = 0; e < 12; e++) begin
      pulse_l1a();
      for (int f = 0; f < NFIB; f++) begin
        w[f].delete();
        if (f < 6) begin
          int len;
          len = 3 + ((e * 7 + f * 3) % 37);
          for (int i = 0; i < len; i++) w[f].push_back(16'h1000 + 16'((f << 8) + i));
          for (int i = 0; i < 4; i++) w[f].push_back(16'hEF00 + 16'(i));
          // fiber 0, event 3 (a multiple of four words): damaged first trailer code
          if (f == 0 && e == 3) w[f][len] = 16'h6F00;
          expect_event(f, w[f]);
        end
      end
      send_words(8'b0011_1111, w, (e == 3) ? 1 : -1);
      if (e == 3) m_rxerr++;
      repeat (40) @(negedge clk);
      if (spwd_err) m_spwd++;
      if (lvb[15:12] == 4'hE) m_vote++;
    end
    repeat (200) @(negedge clk);
    for (int f = 0; f < 6; f++) chk(exp_rows[f].size() == 0, $sformatf("fiber %0d: %0d rows not read", f, exp_rows[f].size()));
    chk(m_spwd > 0, "special-word error seen on the damaged trailer");
    chk(m_vote > 0, "trailer vote gave the E nibble");

    // 2. start timeout on fiber 2: an L1A that no data follows on fiber 2
    pulse_l1a();
    for (int f = 0; f < NFIB; f++) begin
      w[f].delete();
      if (f < 6 && f != 2) begin
        for (int i = 0; i < 5; i++) w[f].push_back(16'h2000 + 16'(i));
        for (int i = 0; i < 4; i++) w[f].push_back(16'hEF00 + 16'(i));
        expect_event(f, w[f]);
      end
    end
    send_words(8'b0011_1011, w, -1);
    repeat (300) @(negedge clk);
    jtag_read(OP_TMO_START, 8, v);
    chk(v[7:0] == 8'b0000_0100, $sformatf("start timeout register %b", v[7:0]));
    if (v[2]) m_stmo++;

    // 3. end timeouts: fiber 3 sends an event without trailer and falls idle
    // (end-wait); fiber 5 does the same but then keeps sending errored,
    // non-idle characters (end-active)
    pulse_l1a();
    for (int f = 0; f < NFIB; f++) begin
      w[f].delete();
      if (f < 6) begin
        for (int i = 0; i < 6; i++) w[f].push_back(16'h3000 + 16'(i));
        if (f != 3 && f != 5) for (int i = 0; i < 4; i++) w[f].push_back(16'hEF00 + 16'(i));
        expect_event(f, w[f]);
      end
    end
    t0 = $time;
    send_words(8'b0011_1111, w, -1);
    rx_k[5] = 0; rx_err[5] = 1; rx_data[5] = 16'h1234;
    repeat (19100) @(negedge clk);
    rx_k[5] = 1; rx_err[5] = 0; rx_data[5] = IDLE_WORD;
    jtag_read(OP_TMO_END_WAIT, 8, v);
    chk(v[7:0] == 8'b0000_1000, $sformatf("end-wait timeout register %b", v[7:0]));
    if (v[3]) m_etmo++;
    jtag_read(OP_TMO_END_ACT, 8, v);
    chk(v[7:0] == 8'b0010_0000, $sformatf("end-active timeout register %b", v[7:0]));
    if (v[5]) m_eact++;
    for (int f = 0; f < 6; f++) chk(exp_rows[f].size() == 0, $sformatf("fiber %0d: %0d rows left after timeout", f, exp_rows[f].size()));

    // 4. RX error register
    jtag_read(OP_RX_ERR, 8, v);
    chk(v[7:0] == 8'b0010_0010, $sformatf("rx error register %b", v[7:0]));
    jtag_read(OP_FIBER_OK, 8, v);
    chk(v[7:0] == fiber_ok, $sformatf("fiber ok register %b", v[7:0]));
    jtag_read(OP_FIBER_ERR, 8, v);
    chk(v[7:0] == 8'h00, $sformatf("fiber error register before any change %b", v[7:0]));

    // 5. FIFO full on fiber 4: reading stopped, one long event
    rd_allow[4] = 0;
    for (int f = 0; f < NFIB; f++) w[f].delete();
    for (int i = 0; i < 2100; i++) w[4].push_back(16'h4000 + 16'(i % 4096));
    for (int i = 0; i < 4; i++) w[4].push_back(16'hEF00 + 16'(i));
    pulse_l1a();
    send_words(8'b0001_0000, w, -1);
    repeat (10) @(negedge clk);
    chk(fifo_full[4], "fiber 4 FIFO full");
    jtag_read(OP_FULL_FIFO, 12, v);
    chk(v[11:0] == 12'h010, $sformatf("full FIFO register %h", v[11:0]));
    jtag_read(OP_EMPTY, 10, v);
    chk(v[4] == 1'b0 && v[0] == 1'b1, $sformatf("empty register %b", v[9:0]));
    // the first 2048 half-rows were kept; read them back
    for (int i = 0; i < 2048; i += 2)
      exp_rows[4].push_back({h(w[4][i+1], 0, 0), h(w[4][i], 0, 0)});
    rd_allow[4] = 1;
    ignore_extra[4] = 1;
    repeat (1100) @(negedge clk);
    // the words that arrived while the FIFO was full were partly held in the
    // input unit's queue and partly dropped (reported as overflow); what the
    // queue held is written once space frees and is not compared
    chk(exp_rows[4].size() == 0, "fiber 4 rows read back");
    chk(m_ovfl > 0, "input unit reported dropped words");
    repeat (20) @(negedge clk);
    for (int f = 0; f < NFIB; f++) exp_rows[f].delete();

    // 6. diagnostic multiplexer, mode 8: status bus and inverted version
    mode = 4'd8;
    repeat (3) @(negedge clk);
    // start timeouts: fiber 2 (step 2) and the fibers silent in step 5
    chk(la_out[7:0] == 8'b0010_1111 && la_out[15:8] == 8'b0010_0010, $sformatf("diag status %h", la_out));
    chk(led_out == ~VERSION, $sformatf("diag LEDs %h", led_out));
    if (led_out == ~VERSION) m_diag++;
    mode = 4'd0;
    repeat (2) @(negedge clk);
    chk(la_out == 0, "diag disabled");

    // 7. L1A number and event buffer almost full / full
    jtag_read(OP_L1A_NUM, 24, v);
    chk(v[23:0] == l1a_num && l1a_num == 24'd15, $sformatf("L1A number %0d / %0d", v[23:0], l1a_num));
    @(negedge clk); l1a = 1;
    repeat (8200) @(negedge clk);
    l1a = 0;
    chk(evt_full && n_evt == 14'd8192, $sformatf("event counter full, n=%0d", n_evt));
    evt_done = 1;
    repeat (300) @(negedge clk);
    evt_done = 0;
    @(negedge clk);
    chk(evt_af && !evt_full && n_evt == 14'd7892, $sformatf("event counter almost full after 300 reads, n=%0d", n_evt));
    jtag_read(OP_FULL_FIFO, 12, v);
    chk(v[8] == 1'b1, "event-full bit in full register");

    // 8. bunch crossing: BC0 clears the counter
    @(negedge clk); bc0 = 1; @(negedge clk); bc0 = 0;
    chk(bxn == 0, "BC0 clears bxn");
    if (bxn == 0) m_bc0++;
    repeat (10) @(negedge clk);
    chk(bxn == 10, $sformatf("bxn %0d after 10 clocks", bxn));

    // 9. LEDs: fiber 0 lit, 6 off, 7 blinking
    chk(fok_led[0] == 1'b1 && fok_led[6] == 1'b0, "FOK LEDs");
    while (m_blink < 2 && $time < 64'd6000000) @(negedge clk);
    chk(m_blink >= 2, "FOK LED blinked while fiber 7 was not ready");
    // fiber 7 (present, not ready) comes up briefly: a fiber-OK change
    fiber_ok[7] = 1; repeat (3) @(negedge clk); fiber_ok[7] = 0;
    repeat (3) @(negedge clk);
    jtag_read(OP_FIBER_ERR, 8, v);
    chk(v[7:0] == 8'b1000_0000, $sformatf("fiber error register %b", v[7:0]));
    if (v[7]) m_ferr++;

    // ------------------------------------------------------------ summary
    chk(m_fill > 0, "fill padding");
    chk(m_last > 0, "LAST rows");
    chk(m_rxerr > 0, "rx errors");
    chk(m_stmo > 0, "start timeout");
    chk(m_etmo > 0, "end-wait timeout");
    chk(m_eact > 0, "end-active timeout");
    chk(m_ferr > 0, "fiber-OK change");
    chk(m_af > 0, "FIFO almost full");
    chk(m_full > 0, "FIFO full");
    chk(m_evt_af > 0, "event almost full");
    chk(m_evt_full > 0, "event full");
    chk(m_bx_wrap > 0, "bxn wrap");
    chk(m_bc0 > 0, "BC0");
    chk(m_blink >= 2, "FOK blink");
    chk(m_jtag > 0, "JTAG reads");
    chk(m_diag > 0, "diag mux");
    chk(m_ovfl > 0, "input overflow");
    $display("mechanisms: fill=%0d last=%0d rxerr=%0d stmo=%0d etmo=%0d eact=%0d ferr=%0d af=%0d full=%0d vote=%0d spwd=%0d evt_af=%0d evt_full=%0d bxwrap=%0d bc0=%0d blink=%0d jtag=%0d diag=%0d ovfl=%0d rows=%0d",
             m_fill, m_last, m_rxerr, m_stmo, m_etmo, m_eact, m_ferr, m_af, m_full, m_vote, m_spwd, m_evt_af, m_evt_full, m_bx_wrap, m_bc0, m_blink, m_jtag, m_diag, m_ovfl, m_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
