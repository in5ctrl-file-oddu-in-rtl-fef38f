// in5ctrl: input-control FPGA of the DDU (detector-dependent unit).
//
// Eight DMB fibers arrive as 16-bit parallel words from the FPGA's serial
// receivers. For each fiber an input unit (inunit) drops idle and errored
// words, groups the data into 64-bit units, pads each event end with fill words
// and flags the next-to-last row with LAST, and writes the result into that
// fiber's block-RAM FIFO (sfifo18_36x1024), which the read controller empties
// 36 bits at a time through the fifo_* ports. Around this data path sit:
//  * timeout_mon per fiber: start timeout after each L1A (128 clocks, 256 in
//    calibration) and end timeout (18945 clocks); an end timeout closes the
//    open event in the input unit;
//  * sticky monitors (sticky_err_reg) of receive errors, fiber-OK changes,
//    full FIFOs, start timeouts and end timeouts, the last split into
//    end-wait (the fiber was idle when the timeout fired) and end-active
//    (it was still sending);
//  * l1a_counter (L1A number, events held, almost full at 7680, full at 8192)
//    and bxn_counter (bunch crossing, 0..923, cleared by BC0);
//  * JTAG readout: the opcode selects one of the status registers
//    (jtag_check_reg) through jtag_decode; captured on the USER2 data
//    register clock drck, shifted out LSB first on tdo;
//  * special_bit_vote on the read stream of the fiber chosen by vote_sel:
//    for the final 64-bit group of an event (the group whose first row carries
//    LAST) it takes a per-bit 2-of-4 vote over the four trailer words and flags
//    disagreeing copies of the E-code nibble (spwd_err) unless the group holds
//    fill words;
//  * fiber_led per fiber on the slow clock, and diag_mux onto the
//    logic-analyser and LED pins.
// All status is in the clk domain; the JTAG registers sample it on drck. The
// sticky values change rarely and are read while quiet, so no synchroniser is
// placed on that crossing. Reset is asynchronous and active high for all.
// Which status goes to which JTAG opcode and diagnostic mode follows the
// design's opcode table and mux inputs where those are unambiguous; the rest is
// this implementation's choice.
module in5ctrl
  import in5ctrl_pkg::*;
(
  input  logic                  clk,
  input  logic                  slow_clk,      // 2.5 MHz LED clock
  input  logic                  rst,
  // fiber receivers
  input  logic [NFIB-1:0][15:0] rx_data,
  input  logic [NFIB-1:0]       rx_k,
  input  logic [NFIB-1:0]       rx_err,
  input  logic [NFIB-1:0]       fiber_present,
  input  logic [NFIB-1:0]       fiber_ok,
  // trigger
  input  logic                  l1a,
  input  logic                  bc0,
  input  logic                  cal_mode,
  input  logic                  evt_done,      // read controller finished an event
  // FIFO read side
  input  logic [NFIB-1:0]       fifo_oe,
  input  logic [NFIB-1:0]       fifo_rd,
  output logic [NFIB-1:0][35:0] fifo_dout,
  output logic [NFIB-1:0]       fifo_empty,
  output logic [NFIB-1:0]       fifo_af,
  output logic [NFIB-1:0]       fifo_full,
  // event bookkeeping
  output logic [23:0]           l1a_num,
  output logic [13:0]           n_evt,
  output logic                  evt_af,
  output logic                  evt_full,
  output logic [11:0]           bxn,
  output logic [NFIB-1:0]       evt_busy,
  output logic [NFIB-1:0]       inunit_ovfl,
  // trailer check
  input  logic [2:0]            vote_sel,
  output logic [15:0]           lvb,
  output logic                  spwd_err,
  // JTAG USER2 chain
  input  logic                  drck,
  input  logic                  sel2,
  input  logic                  jshift,
  input  logic                  tdi,
  input  logic [4:0]            jtag_op,
  output logic                  tdo,
  // front panel
  input  logic [3:0]            mode,
  output logic [15:0]           la_out,
  output logic [7:0]            led_out,
  output logic [NFIB-1:0]       fok_led,
  output logic [NFIB-1:0]       dav_led
);
  half_t           wr_data   [NFIB];
  logic [NFIB-1:0] wr_en, evt_start, evt_end, filled, rxerr, start_tmo, end_tmo;
  logic [NFIB-1:0] lrxerr, lstart_tmo, lend_tmo, lend_wait, lend_act;
  logic [11:0]     lffull;
  logic [NFIB-1:0] fok_q, fok_chg, lfiber_err;
  logic            fok_armed;

  // ---------------------------------------------------------------- fibers
  for (genvar i = 0; i < NFIB; i++) begin : g_fib
    logic [11:0] cnt_unused;

    inunit u_in (
      .clk, .rst,
      .en        (fiber_ok[i]),
      .rx_data   (rx_data[i]),
      .rx_k      (rx_k[i]),
      .rx_err    (rx_err[i]),
      .force_end (end_tmo[i]),
      .fifo_full (fifo_full[i]),
      .wr_en     (wr_en[i]),
      .wr_data   (wr_data[i]),
      .evt_start (evt_start[i]),
      .evt_end   (evt_end[i]),
      .filled    (filled[i]),
      .rxerr_o   (rxerr[i]),
      .ovfl      (inunit_ovfl[i])
    );

    sfifo18_36x1024 u_fifo (
      .clk, .rst,
      .we          (wr_en[i]),
      .din         (wr_data[i]),
      .oe          (fifo_oe[i]),
      .rd_en       (fifo_rd[i]),
      .dout        (fifo_dout[i]),
      .empty       (fifo_empty[i]),
      .almost_full (fifo_af[i]),
      .full        (fifo_full[i]),
      .count       (cnt_unused)
    );

    timeout_mon u_tmo (
      .clk, .rst,
      .l1a           (l1a & fiber_ok[i]),
      .cal_mode,
      .evt_start     (evt_start[i]),
      .evt_end       (evt_end[i]),
      .busy          (evt_busy[i]),
      .start_timeout (start_tmo[i]),
      .end_timeout   (end_tmo[i])
    );

    fiber_led u_led (
      .clk     (slow_clk),
      .rst,
      .present (fiber_present[i]),
      .ready   (fiber_ok[i]),
      .dav     (!fifo_empty[i]),
      .fok_led (fok_led[i]),
      .dav_led (dav_led[i])
    );
  end

  // ------------------------------------------------------- status monitors
  sticky_err_reg #(.W(NFIB)) u_rxerr (.clk, .rst, .err_in(rxerr),     .err_q(lrxerr));
  sticky_err_reg #(.W(12))   u_ffull (.clk, .rst,
    .err_in({3'b000, evt_full, fifo_full}), .err_q(lffull));
  sticky_err_reg #(.W(NFIB)) u_stmo  (.clk, .rst, .err_in(start_tmo), .err_q(lstart_tmo));
  // An end timeout is an end-wait timeout when the fiber is sending idles at
  // that moment (the event stopped without its trailer), and an end-active
  // timeout when it is still sending non-idle characters.
  sticky_err_reg #(.W(NFIB)) u_ewait (.clk, .rst, .err_in(end_tmo & rx_k),  .err_q(lend_wait));
  sticky_err_reg #(.W(NFIB)) u_eact  (.clk, .rst, .err_in(end_tmo & ~rx_k), .err_q(lend_act));
  assign lend_tmo = lend_wait | lend_act;

  l1a_counter u_l1a (
    .clk, .rst, .l1a, .evt_done,
    .l1a_num, .n_evt, .almost_full(evt_af), .full(evt_full)
  );

  bxn_counter u_bxn (.clk, .rst, .bc0, .bxn);

  // Fiber-OK changes: any change of a fiber's OK status after reset is
  // latched as a fiber error (the first clock after reset only loads the
  // reference).
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      fok_q     <= '0;
      fok_armed <= 1'b0;
    end else begin
      fok_q     <= fiber_ok;
      fok_armed <= 1'b1;
    end
  end
  assign fok_chg = fok_armed ? (fiber_ok ^ fok_q) : '0;
  sticky_err_reg #(.W(NFIB)) u_ferr (.clk, .rst, .err_in(fok_chg), .err_q(lfiber_err));

  // ------------------------------------------------- trailer special bits
  logic        vrd, even_out, golddat, grp_fill;
  logic [35:0] vrow, prev_row;
  logic [3:0][15:0] vwords;
  logic [15:0] vote, notall;

  assign vrd  = fifo_oe[vote_sel] & fifo_rd[vote_sel] & !fifo_empty[vote_sel];
  assign vrow = fifo_dout[vote_sel];
  // Words in time order: first row low, first row high, second row low, high.
  assign vwords = {vrow[33:18], vrow[15:0], prev_row[33:18], prev_row[15:0]};
  assign golddat  = prev_row[17] | prev_row[35];
  assign grp_fill = prev_row[16] | prev_row[34] | vrow[16] | vrow[34];

  special_bit_vote u_vote (
    .w(vwords), .andcom(vrd & even_out & golddat), .orcom(1'b0),
    .vote, .notall
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      even_out <= 1'b0;
      prev_row <= '0;
      lvb      <= '0;
      spwd_err <= 1'b0;
    end else if (vrd) begin
      even_out <= ~even_out;
      prev_row <= vrow;
      if (even_out && golddat) begin
        lvb      <= vote;
        spwd_err <= (|notall[15:12]) & ~grp_fill;
      end
    end
  end

  // ---------------------------------------------------------- JTAG readout
  logic [31:0] fsel, jtdo;

  jtag_decode u_jdec (.en(sel2), .op(jtag_op), .tdo_in(jtdo), .f(fsel), .tdo);

  logic tdo_l1a, tdo_fok, tdo_stmo, tdo_ewait, tdo_eact, tdo_rxerr, tdo_full, tdo_empty, tdo_ferr;

  jtag_check_reg #(.W(24)) u_j_l1a   (.drck, .rst, .dvcenb(fsel[OP_L1A_NUM]),   .sel2, .shift(jshift), .tdi, .status(l1a_num),             .tdo(tdo_l1a));
  jtag_check_reg #(.W(8))  u_j_fok   (.drck, .rst, .dvcenb(fsel[OP_FIBER_OK]),  .sel2, .shift(jshift), .tdi, .status(fiber_ok),            .tdo(tdo_fok));
  jtag_check_reg #(.W(8))  u_j_stmo  (.drck, .rst, .dvcenb(fsel[OP_TMO_START]), .sel2, .shift(jshift), .tdi, .status(lstart_tmo),          .tdo(tdo_stmo));
  jtag_check_reg #(.W(8))  u_j_ewait (.drck, .rst, .dvcenb(fsel[OP_TMO_END_WAIT]), .sel2, .shift(jshift), .tdi, .status(lend_wait),         .tdo(tdo_ewait));
  jtag_check_reg #(.W(8))  u_j_eact  (.drck, .rst, .dvcenb(fsel[OP_TMO_END_ACT]),  .sel2, .shift(jshift), .tdi, .status(lend_act),          .tdo(tdo_eact));
  jtag_check_reg #(.W(8))  u_j_rxerr (.drck, .rst, .dvcenb(fsel[OP_RX_ERR]),    .sel2, .shift(jshift), .tdi, .status(lrxerr),              .tdo(tdo_rxerr));
  jtag_check_reg #(.W(12)) u_j_full  (.drck, .rst, .dvcenb(fsel[OP_FULL_FIFO]), .sel2, .shift(jshift), .tdi, .status(lffull),              .tdo(tdo_full));
  jtag_check_reg #(.W(8))  u_j_ferr  (.drck, .rst, .dvcenb(fsel[OP_FIBER_ERR]), .sel2, .shift(jshift), .tdi, .status(lfiber_err),          .tdo(tdo_ferr));
  jtag_check_reg #(.W(10)) u_j_empty (.drck, .rst, .dvcenb(fsel[OP_EMPTY]),     .sel2, .shift(jshift), .tdi, .status({evt_af, evt_full, fifo_empty}), .tdo(tdo_empty));

  always_comb begin
    jtdo = '0;
    jtdo[OP_L1A_NUM]   = tdo_l1a;
    jtdo[OP_FIBER_OK]  = tdo_fok;
    jtdo[OP_TMO_START] = tdo_stmo;
    jtdo[OP_TMO_END_WAIT] = tdo_ewait;
    jtdo[OP_TMO_END_ACT]  = tdo_eact;
    jtdo[OP_RX_ERR]    = tdo_rxerr;
    jtdo[OP_FULL_FIFO] = tdo_full;
    jtdo[OP_EMPTY]     = tdo_empty;
    jtdo[OP_FIBER_ERR] = tdo_ferr;
  end

  // ------------------------------------------------------ diagnostic pins
  logic [7:0][15:0] la_in;
  logic [7:0][7:0]  led_in;

  always_comb begin
    la_in[0] = {lrxerr, lstart_tmo};                  // status
    la_in[1] = {lend_tmo, evt_busy};                  // read-control view
    la_in[2] = {wr_en, evt_start};                    // input control
    la_in[3] = {evt_end, filled};
    la_in[4] = {fifo_af, fifo_full};                  // fiber-0 diagnostics
    la_in[5] = {fifo_oe, fifo_empty};                 // output enables
    la_in[6] = fifo_dout[0][15:0];                    // FIFO data out
    la_in[7] = rx_data[0];                            // fiber-0 data
    led_in[0] = ~VERSION;
    led_in[1] = lrxerr;
    led_in[2] = lstart_tmo;
    led_in[3] = lend_tmo;
    led_in[4] = fifo_full;
    led_in[5] = fifo_af;
    led_in[6] = ~fifo_empty;
    led_in[7] = {evt_full, evt_af, spwd_err, 5'b0};
  end

  diag_mux u_diag (.clk, .rst, .mode, .la_in, .led_in, .la_out, .led_out);
endmodule
