// inunit: fiber input unit.
//
// Takes the 16-bit parallel words of one DMB fiber receiver and writes them,
// one 18-bit half-row per clock, into the fiber's input FIFO, so that every
// event occupies a whole number of 64-bit groups (four words, two FIFO rows)
// and the row before the last of each event carries the LAST flag.
//
// Input words: a word with a K character (rx_k, e.g. the 0x50BC idle pair) or
// a receive error (rx_err) is not data and is skipped; rx_err is reported on
// rxerr_o. Data words are counted into 4-word groups. An event ends when four
// E-code words (top nibble 4'hE) have arrived in a row, or when an idle word
// follows at least one E-code (a lost or damaged trailer word), or when
// force_end is raised (end timeout) while a group is open. At the end the open
// group is completed with fill words (0xC000 with the FILL flag), and LAST is
// set on the first row of that final group: always on its second word, and on
// its first word too when the last row holds a fill word. This reproduces the
// design's LAST-flag tables for the normal trailer, for 1, 2 or 3 words lost
// or extra, and for a damaged first or second E-code, and keeps LAST correct
// when one trailer word is damaged.
//
// Words wait in a QDEPTH-entry (16) queue until their group is closed (the next word
// opens a new group, or the event ends), because LAST may still be added to
// them; closed groups drain at one half-row per clock while the FIFO is not
// full. A word that finds no room is dropped and reported on ovfl. Latency
// from input to FIFO write is therefore up to about five clocks.
// en is the fiber-OK enable: while low the unit accepts nothing.
// The grouping, flags and fill code follow the design; the queue, the
// idle-terminated trailer and the exact end conditions are this
// implementation's choices.
module inunit
  import in5ctrl_pkg::*;
#(
  parameter int unsigned QDEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,          // fiber OK
  input  logic [15:0] rx_data,
  input  logic        rx_k,        // word holds a K character (idle, comma)
  input  logic        rx_err,      // receiver code or disparity error
  input  logic        force_end,   // close the open event (timeout)
  input  logic        fifo_full,
  output logic        wr_en,
  output half_t       wr_data,
  output logic        evt_start,   // first data word of an event accepted
  output logic        evt_end,     // event closed and padded
  output logic        filled,      // fill words were added at this end
  output logic        rxerr_o,
  output logic        ovfl
);
  localparam int unsigned QW = $clog2(QDEPTH);

  half_t          q      [QDEPTH];
  half_t          q_n    [QDEPTH];
  logic [QW-1:0]  head, tail, obase;
  logic [QW:0]    cnt;
  logic [2:0]     ocnt;          // words in the open group, 0..4
  logic [2:0]     erun;          // consecutive E-codes
  logic           in_evt;

  logic           dv, pop, accept, do_end, e_word;
  logic [QW-1:0]  tail_n, obase_n, head_n;
  logic [QW:0]    cnt_n;
  logic [2:0]     ocnt_n, erun_n, nfill;
  logic [QW:0]    room;

  assign dv     = en && !rx_k && !rx_err;
  assign e_word = is_ecode(rx_data[15:12]);
  assign pop    = (cnt != (QW+1)'(ocnt)) && !fifo_full;
  assign wr_en  = pop;
  assign wr_data = q[head];

  always_comb begin
    q_n     = q;
    head_n  = pop ? head + 1'b1 : head;
    tail_n  = tail;
    obase_n = obase;
    ocnt_n  = ocnt;
    erun_n  = erun;
    cnt_n   = cnt - (QW+1)'(pop);
    accept  = 1'b0;
    do_end  = 1'b0;
    nfill   = '0;
    room    = (QW+1)'(QDEPTH) - cnt_n;

    if (dv) begin
      // Room for the word and the worst-case three fill words.
      if (room >= (QW+1)'(4)) begin
        accept = 1'b1;
        if (ocnt_n == 3'd4) begin      // previous group is closed
          obase_n = tail_n;
          ocnt_n  = '0;
        end
        q_n[tail_n] = '{last: 1'b0, fill: 1'b0, data: rx_data};
        tail_n = tail_n + 1'b1;
        cnt_n  = cnt_n + 1'b1;
        ocnt_n = ocnt_n + 3'd1;
        erun_n = e_word ? erun_n + 3'd1 : 3'd0;
        if (erun_n == 3'd4) do_end = 1'b1;
      end
    end else if (en && rx_k && erun != 0) begin
      do_end = 1'b1;                   // idle after a (short) trailer
    end
    if (force_end && ocnt_n != 0) do_end = 1'b1;

    if (do_end) begin
      nfill = 3'd4 - ocnt_n;
      for (int j = 0; j < 3; j++) begin
        if (3'(j) < nfill) begin
          q_n[tail_n] = '{last: 1'b0, fill: 1'b1, data: FILL_WORD};
          tail_n = tail_n + 1'b1;
          cnt_n  = cnt_n + 1'b1;
        end
      end
      q_n[obase_n + QW'(1)].last = 1'b1;
      if (nfill != 0) q_n[obase_n].last = 1'b1;
      obase_n = tail_n;
      ocnt_n  = '0;
      erun_n  = '0;
    end
  end

  always_ff @(posedge clk) begin
    q <= q_n;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      head      <= '0;
      tail      <= '0;
      obase     <= '0;
      cnt       <= '0;
      ocnt      <= '0;
      erun      <= '0;
      in_evt    <= 1'b0;
      evt_start <= 1'b0;
      evt_end   <= 1'b0;
      filled    <= 1'b0;
      rxerr_o   <= 1'b0;
      ovfl      <= 1'b0;
    end else begin
      head      <= head_n;
      tail      <= tail_n;
      obase     <= obase_n;
      cnt       <= cnt_n;
      ocnt      <= ocnt_n;
      erun      <= erun_n;
      evt_start <= accept && !in_evt;
      evt_end   <= do_end;
      filled    <= do_end && nfill != 0;
      rxerr_o   <= en && rx_err;
      ovfl      <= dv && !accept;
      if (do_end)      in_evt <= 1'b0;
      else if (accept) in_evt <= 1'b1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) cnt <= (QW+1)'(QDEPTH));
endmodule
