// sfifo18_36x1024: input FIFO, written 18 bits at a time, read 36 at a time.
//
// One block RAM holds DEPTH rows of 36 bits. The write side takes one 18-bit
// half-row per clock (16-bit DMB word plus FILL and LAST flags); the first
// half-row of a row lands in row bits [17:0], the second in [35:18]. Inside the
// RAM a row is kept in the byte-and-parity layout given by the design's
// MemIn-MemOut tables (in5ctrl_pkg::row_to_bram / bram_to_row), so the read
// side sees the logical row again.
//
// Read side, first-word-fall-through: when empty is low, dout already holds
// the oldest complete row; asserting rd_en with oe consumes it. The empty flag
// is the design's circuit: a preset flip-flop whose D input is MT (no complete
// row waiting in the RAM) and whose clock enable is (NOT MT) OR (OE AND
// RD_EN); a row is fetched from the RAM into the output register whenever MT is
// low and the output register is empty or being read. A row written at clock t
// is visible (empty low) after clock t+1. Only complete rows can be read; an
// odd half-row waits for its partner. The read address is a 10-bit counter
// enabled by each fetch.
//
// Occupancy is counted in half-rows by an up/down counter: a write adds 1, a
// read removes 2, both together remove 1, as the design's UP/DOWN counter
// note gives it. full is set at 2*DEPTH half-rows; almost_full AF_MARGIN
// half-rows earlier (the design notes "only 120 writes from FULL"). Writes
// while full are dropped. In the design the EMPTY output goes through a
// three-state buffer enabled by OE onto a bus shared by many FIFOs; here the
// flag is a plain output and bus sharing is left to the instantiating level.
module sfifo18_36x1024
  import in5ctrl_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,  // 36-bit rows
  parameter int unsigned AF_MARGIN = 120    // half-rows
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      we,
  input  half_t                     din,
  input  logic                      oe,
  input  logic                      rd_en,
  output logic [35:0]               dout,
  output logic                      empty,
  output logic                      almost_full,
  output logic                      full,
  output logic [$clog2(DEPTH)+1:0]  count   // half-rows held
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [35:0]   mem [DEPTH];
  logic [AW:0]   wptr;        // half-row write pointer
  logic [AW-1:0] raddr;       // row read address
  logic [AW:0]   rows_wr;     // complete rows written, modulo 2*DEPTH
  logic [AW:0]   rows_rd;     // rows fetched
  logic [35:0]   dq;
  logic          mt, rd, fetch, wr;
  logic [35:0]   wval, wmask;

  assign wr    = we && !full;
  assign rd    = oe && rd_en && !empty;
  assign mt    = (rows_wr == rows_rd);
  assign fetch = !mt && (empty || rd);

  // Place the half-row in its lane of the RAM word.
  always_comb begin
    if (!wptr[0]) begin
      wval  = row_to_bram({18'b0, din});
      wmask = row_to_bram({18'b0, {18{1'b1}}});
    end else begin
      wval  = row_to_bram({din, 18'b0});
      wmask = row_to_bram({{18{1'b1}}, 18'b0});
    end
  end

  always_ff @(posedge clk) begin
    if (wr) begin
      for (int i = 0; i < 36; i++)
        if (wmask[i]) mem[wptr[AW:1]][i] <= wval[i];
    end
    if (fetch) dq <= mem[raddr];
  end

  assign dout = bram_to_row(dq);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wptr    <= '0;
      rows_wr <= '0;
      rows_rd <= '0;
      raddr   <= '0;
      empty   <= 1'b1;
      count   <= '0;
    end else begin
      if (wr) begin
        wptr <= (wptr == (AW+1)'(2*DEPTH - 1)) ? '0 : wptr + 1'b1;
        if (wptr[0]) rows_wr <= rows_wr + 1'b1;
      end
      if (fetch) begin
        raddr   <= raddr + 1'b1;
        rows_rd <= rows_rd + 1'b1;
      end
      if (!mt || rd) empty <= mt;
      // UP: +1, UP.DOWN: -1, DOWN: -2
      unique case ({wr, rd})
        2'b10:   count <= count + 1'b1;
        2'b11:   count <= count - 1'b1;
        2'b01:   count <= count - ($bits(count))'(2);
        default: ;
      endcase
    end
  end

  assign full        = (count >= ($bits(count))'(2*DEPTH));
  assign almost_full = (count >= ($bits(count))'(2*DEPTH - AF_MARGIN));

  // The occupancy never exceeds the RAM.
  a_count_range: assert property (@(posedge clk) disable iff (rst)
    count <= ($bits(count))'(2*DEPTH + 2));
endmodule
