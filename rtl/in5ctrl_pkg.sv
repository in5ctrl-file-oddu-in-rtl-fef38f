// in5ctrl_pkg: types and constants shared by the DDU input-control FPGA.
//
// The fiber data path carries 16-bit DMB words. In the input FIFO each word
// becomes an 18-bit half-row: bit 16 is the FILL flag and bit 17 the LAST flag
// (bits 34 and 35 for the upper half of a 36-bit row), as the design notes give
// them. Two half-rows make one 36-bit FIFO row; two rows make one 64-bit DDU
// word group. The block-RAM stores a 36-bit row in a byte-and-parity layout;
// the two functions below give that bit mapping in both directions, taken from
// the design's "MemIn-MemOut" tables. The idle word, the fill word and the
// E-code test are choices of this implementation where the notes are terse.
package in5ctrl_pkg;

  // Fiber inputs served by one input-control FPGA.
  localparam int unsigned NFIB = 8;

  // FPGA version shown (inverted) on the diagnostic LEDs.
  localparam logic [7:0] VERSION = 8'd23;

  // JTAG opcodes of the status registers built here.
  localparam logic [4:0] OP_L1A_NUM   = 5'd2;
  localparam logic [4:0] OP_FIBER_OK  = 5'd7;
  localparam logic [4:0] OP_FIBER_ERR = 5'd6;
  localparam logic [4:0] OP_TMO_START = 5'd13;
  localparam logic [4:0] OP_TMO_END_WAIT = 5'd14;
  localparam logic [4:0] OP_TMO_END_ACT  = 5'd15;
  localparam logic [4:0] OP_RX_ERR    = 5'd17;
  localparam logic [4:0] OP_FULL_FIFO = 5'd21;
  localparam logic [4:0] OP_EMPTY     = 5'd25;

  // 18-bit FIFO half-row: LAST, FILL, 16-bit DMB word.
  typedef struct packed {
    logic        last;
    logic        fill;
    logic [15:0] data;
  } half_t;

  // Idle pair sent by the DMB transmitter: K28.5 then D16.2. The low byte is
  // the first in time, so the parallel 16-bit word is 0x50BC.
  localparam logic [15:0] IDLE_WORD = 16'h50BC;

  // Filler word: code "C" in the top nibble; the FILL flag marks it.
  localparam logic [15:0] FILL_WORD = 16'hC000;

  // A DMB trailer word ("E-code") has 4'hE in its top nibble; the argument
  // is that nibble, w[15:12].
  function automatic logic is_ecode(input logic [3:0] top_nibble);
    return top_nibble == 4'hE;
  endfunction

  // Block-RAM layout (DO) to logical row (Dout). Logical row: the first
  // written half-row in [17:0], the second in [35:18].
  function automatic logic [35:0] bram_to_row(input logic [35:0] d);
    logic [35:0] r;
    r[35]    = d[35];
    r[17]    = d[34];
    r[34:27] = d[33:26];
    r[16:9]  = d[25:18];
    r[26]    = d[17];
    r[8]     = d[16];
    r[25:18] = d[15:8];
    r[7:0]   = d[7:0];
    return r;
  endfunction

  // Logical row to block-RAM layout, the inverse of bram_to_row.
  function automatic logic [35:0] row_to_bram(input logic [35:0] r);
    logic [35:0] d;
    d[35]    = r[35];
    d[33:26] = r[34:27];
    d[17]    = r[26];
    d[15:8]  = r[25:18];
    d[34]    = r[17];
    d[25:18] = r[16:9];
    d[16]    = r[8];
    d[7:0]   = r[7:0];
    return d;
  endfunction

endpackage
