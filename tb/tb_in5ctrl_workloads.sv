// tb_in5ctrl_workloads: DMB event sizes through the full-size input FPGA.
//
// A DMB with k cathode front-end boards and 8 time samples sends
// 25*8*k + 4 64-bit words (DDU word count 6 + 25*Nts*nCFEB + 4*nDMB, less
// the DDU's own 6 words), i.e. 4*(200k + 4) 16-bit words ending in four
// E-code words. For each case the top is reset, one such event is sent on
// each of the first nDMB fibers with the reader stopped, and the test checks
// that every FIFO then holds the whole event without reaching full (so one
// fixed FIFO per fiber buffers a complete event), reads it back and
// compares every row. Cases: 1 DMB/1 CFEB, 1 DMB/2 CFEB, 2 DMB/1 CFEB,
// 2 DMB/2 CFEB, 3, 4, 7 and 8 DMB with 1 CFEB. A last case, 1 DMB with
// 3 CFEB (2416 words), does not fit one FIFO: the test checks that the FIFO
// reports full and the input unit reports dropped words.
module tb_in5ctrl_workloads;
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
  always #50 slow_clk = ~slow_clk;

  int checks = 0, failures = 0;
  int m_cases = 0, m_overflow_case = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reader: drains the enabled fibers and compares with the expected rows.
  logic [35:0] exp_rows [NFIB][$];
  logic [NFIB-1:0] rd_allow = '0;
  logic [NFIB-1:0] seen_full = '0, seen_ovfl = '0;
  int rows_read = 0;

  assign fifo_oe = '1;
  always_comb for (int i = 0; i < NFIB; i++) fifo_rd[i] = rd_allow[i] && !fifo_empty[i];

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NFIB; i++) begin
      if (fifo_full[i]) seen_full[i] = 1'b1;
      if (inunit_ovfl[i]) seen_ovfl[i] = 1'b1;
      if (fifo_rd[i]) begin
        rows_read++;
        checks++;
        if (exp_rows[i].size() == 0) begin
          failures++; $display("FAIL @%0t: fiber %0d unexpected row %h", $time, i, fifo_dout[i]);
        end else begin
          logic [35:0] e;
          e = exp_rows[i].pop_front();
          if (fifo_dout[i] !== e) begin
            failures++;
            if (failures < 30) $display("FAIL @%0t: fiber %0d row %h expected %h", $time, i, fifo_dout[i], e);
          end
        end
      end
    end
  end

  // One DMB event of k CFEBs: 4*(200k+4) words, data words never start with
  // the E nibble, the last four are E-codes.
  function automatic void make_event(input int f, input int k, ref logic [15:0] words[$]);
    int n = 4 * (200 * k + 4);
    words.delete();
    for (int i = 0; i < n - 4; i++) words.push_back({4'(i % 14), 12'((f << 8) ^ i)});
    for (int i = 0; i < 4; i++) words.push_back(16'hEF00 + 16'(i));
  endfunction

  task automatic run_case(input int ndmb, input int k, input bit expect_fit);
    logic [15:0] w[NFIB][$];
    int maxlen = 0;
    rst = 1; rd_allow = '0; seen_full = '0; seen_ovfl = '0;
    for (int f = 0; f < NFIB; f++) exp_rows[f].delete();
    rx_k = '1; rx_err = '0;
    for (int f = 0; f < NFIB; f++) rx_data[f] = IDLE_WORD;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int f = 0; f < ndmb; f++) begin
      make_event(f, k, w[f]);
      if (w[f].size() > maxlen) maxlen = w[f].size();
      // whole event, no fill words: LAST on the second word of the final group
      for (int i = 0; i < w[f].size(); i += 2) begin
        logic last;
        last = (i == w[f].size() - 4);
        exp_rows[f].push_back({last, 1'b0, w[f][i+1], 1'b0, 1'b0, w[f][i]});
      end
    end
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    for (int n = 0; n < maxlen; n++) begin
      for (int f = 0; f < NFIB; f++) begin
        rx_k[f] = 1; rx_data[f] = IDLE_WORD;
        if (f < ndmb && n < w[f].size()) begin rx_k[f] = 0; rx_data[f] = w[f][n]; end
      end
      @(negedge clk);
    end
    rx_k = '1;
    for (int f = 0; f < NFIB; f++) rx_data[f] = IDLE_WORD;
    repeat (30) @(negedge clk);
    if (expect_fit) begin
      for (int f = 0; f < ndmb; f++) begin
        chk(!seen_full[f] && !seen_ovfl[f], $sformatf("%0d DMB/%0d CFEB: fiber %0d filled up", ndmb, k, f));
        chk(!fifo_empty[f], $sformatf("%0d DMB/%0d CFEB: fiber %0d holds data", ndmb, k, f));
        chk(evt_busy[f] == 1'b0, $sformatf("%0d DMB/%0d CFEB: fiber %0d event closed", ndmb, k, f));
      end
      rd_allow = '1;
      repeat (w[0].size() / 2 + 20) @(negedge clk);
      for (int f = 0; f < ndmb; f++)
        chk(exp_rows[f].size() == 0, $sformatf("%0d DMB/%0d CFEB: fiber %0d has %0d rows unread", ndmb, k, f, exp_rows[f].size()));
      chk(fifo_empty == '1, "all FIFOs drained");
      m_cases++;
    end else begin
      chk(seen_full[0], $sformatf("1 DMB/%0d CFEB: FIFO full", k));
      chk(seen_ovfl[0], $sformatf("1 DMB/%0d CFEB: words dropped", k));
      if (seen_full[0] && seen_ovfl[0]) m_overflow_case++;
    end
    $display("case %0d DMB x %0d CFEB: %0d words per fiber, checks %0d failures %0d",
             ndmb, k, w[0].size(), checks, failures);
  endtask

  initial begin
    fiber_present = '1;
    fiber_ok      = '1;
    run_case(1, 1, 1);
    run_case(1, 2, 1);
    run_case(2, 1, 1);
    run_case(2, 2, 1);
    run_case(3, 1, 1);
    run_case(4, 1, 1);
    run_case(7, 1, 1);
    run_case(8, 1, 1);
    run_case(1, 3, 0);
    chk(m_cases == 8, "all fitting cases completed");
    chk(m_overflow_case == 1, "overflow case seen");
    $display("cases fitted=%0d overflow=%0d rows=%0d", m_cases, m_overflow_case, rows_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
