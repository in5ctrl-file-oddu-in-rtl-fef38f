// l1a_counter: Level-1 accept number and count of events held.
//
// l1a_num is a 24-bit scaler of accepts (the "Current DDU L1A Number" read
// over JTAG). n_evt counts events accepted but not yet read out: +1 on l1a,
// -1 on evt_done, both together leave it unchanged; it does not go below 0 or
// above DEPTH. The flags are registered with n_evt: almost_full when at least
// DEPTH-AF_MARGIN events are held, full at DEPTH. The defaults are the
// design's numbers (almost full at 8192-512 = 7680 events, full at 8192).
module l1a_counter #(
  parameter int unsigned DEPTH     = 8192,
  parameter int unsigned AF_MARGIN = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     l1a,
  input  logic                     evt_done,
  output logic [23:0]              l1a_num,
  output logic [$clog2(DEPTH):0]   n_evt,
  output logic                     almost_full,
  output logic                     full
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  logic [CW-1:0] n_next;

  always_comb begin
    n_next = n_evt;
    if (l1a && !evt_done && n_evt != CW'(DEPTH)) n_next = n_evt + 1'b1;
    if (!l1a && evt_done && n_evt != '0)          n_next = n_evt - 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      l1a_num     <= '0;
      n_evt       <= '0;
      almost_full <= 1'b0;
      full        <= 1'b0;
    end else begin
      if (l1a) l1a_num <= l1a_num + 24'd1;
      n_evt       <= n_next;
      almost_full <= n_next >= CW'(DEPTH - AF_MARGIN);
      full        <= n_next >= CW'(DEPTH);
    end
  end
endmodule
