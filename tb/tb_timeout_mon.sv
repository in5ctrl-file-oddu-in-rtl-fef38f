// tb_timeout_mon: at the default limits checks that the start timeout
// fires exactly 128 clocks after an L1A (256 in calibration mode) plus the one
// output register, that an event starting in time raises none, that an event
// that does not end within 18945 clocks raises the end timeout at the right
// clock, that a second L1A during an event is served afterwards, the exact
// on-time/late boundary in both modes, a queue of three L1As, and reset.
module tb_timeout_mon;
  logic clk = 0, rst = 1, l1a = 0, cal_mode = 0, evt_start = 0, evt_end = 0;
  logic busy, start_timeout, end_timeout;
  int checks = 0, failures = 0, cyc = 0, st_at = -1, et_at = -1, n_st = 0, n_et = 0;

  timeout_mon dut (.clk, .rst, .l1a, .cal_mode, .evt_start, .evt_end, .busy, .start_timeout, .end_timeout);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start_timeout) begin st_at <= cyc; n_st <= n_st + 1; end
    if (end_timeout)   begin et_at <= cyc; n_et <= n_et + 1; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cyc %0d)", msg, cyc); end
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    // 1: start timeout, normal run
    @(negedge clk); l1a = 1; t0 = cyc; @(negedge clk); l1a = 0;
    repeat (300) @(negedge clk);
    chk(n_st == 1, "one start timeout");
    chk(st_at - t0 == 128 + 1, $sformatf("start timeout latency %0d", st_at - t0));
    chk(!busy, "idle after start timeout");
    // 2: calibration mode
    cal_mode = 1;
    @(negedge clk); l1a = 1; t0 = cyc; @(negedge clk); l1a = 0;
    repeat (400) @(negedge clk);
    chk(n_st == 2, "second start timeout");
    chk(st_at - t0 == 256 + 1, $sformatf("cal start timeout latency %0d", st_at - t0));
    cal_mode = 0;
    // 3: on-time event, with a second L1A queued
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (50) @(negedge clk);
    pulse(evt_start);
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (100) @(negedge clk);
    pulse(evt_end);
    @(negedge clk);   // one idle clock between events
    chk(busy, "queued L1A served");
    repeat (20) @(negedge clk);
    pulse(evt_start);
    repeat (20) @(negedge clk);
    pulse(evt_end);
    repeat (5) @(negedge clk);
    chk(n_st == 2 && n_et == 0, "no timeout for on-time events");
    chk(!busy, "idle after events");
    // 4: end timeout
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (10) @(negedge clk);
    @(negedge clk); evt_start = 1; t0 = cyc; @(negedge clk); evt_start = 0;
    repeat (19100) @(negedge clk);
    chk(n_et == 1, "one end timeout");
    chk(et_at - t0 == 18945 + 1, $sformatf("end timeout latency %0d", et_at - t0));
    chk(!busy, "idle after end timeout");
    // 5: start boundary: an event whose first word arrives d clocks after the
    // L1A is on time up to d = limit, late after that
    for (int cm = 0; cm < 2; cm++) begin
      int lim;
      cal_mode = cm[0];
      lim = cm ? 256 : 128;
      for (int d = lim - 4; d <= lim + 4; d++) begin
        int n0;
        n0 = n_st;
        @(negedge clk); l1a = 1; t0 = cyc; @(negedge clk); l1a = 0;
        while (cyc < t0 + d) @(negedge clk);
        evt_start = 1; @(negedge clk); evt_start = 0;
        repeat (3) @(negedge clk);
        chk((n_st - n0) == (d > lim ? 1 : 0), $sformatf("cal=%0d start after %0d clocks: %0d timeouts", cm, d, n_st - n0));
        if (busy) begin pulse(evt_end); @(negedge clk); end
        chk(!busy, "idle after boundary case");
      end
    end
    cal_mode = 0;
    // 6: three L1As queued behind an event: each is served in turn and, with
    // no data, times out 128 clocks after it is taken up
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (5) @(negedge clk);
    pulse(evt_start);
    repeat (3) begin @(negedge clk); l1a = 1; @(negedge clk); l1a = 0; end
    repeat (10) @(negedge clk);
    begin
      int n0, c0;
      n0 = n_st;
      pulse(evt_end);
      c0 = cyc;
      repeat (3 * 131) @(negedge clk);
      chk(n_st - n0 == 3, $sformatf("queued L1As timed out %0d times", n_st - n0));
      chk(st_at - c0 >= 3 * 128 && st_at - c0 <= 3 * 130, $sformatf("third queued timeout after %0d clocks", st_at - c0));
      repeat (10) @(negedge clk);
      chk(!busy, "queue drained");
    end
    // 7: reset in the middle of a wait clears everything
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (20) @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    begin
      int n0;
      n0 = n_st;
      chk(!busy, "reset clears the wait");
      repeat (200) @(negedge clk);
      chk(n_st == n0, "no timeout after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
