// special_bit_vote: error-tolerant check of the special bits of a word group.
//
// A 64-bit group holds four 16-bit DMB words. For every bit position the
// block forms, from the four copies of that bit:
//   vote   = (two or more copies set AND andcom) OR orcom
//   notall = some but not all copies set (ANY xor ALL)
// so a single corrupted copy cannot flip the vote, and notall flags the
// disagreement. This is the design's 2ORMORE cell (with its ANDCOM and ORCOM
// inputs) and its ANY/ALL/NOTALL gates, applied per bit. Combinational.
module special_bit_vote (
  input  logic [3:0][15:0] w,       // the four words of the group
  input  logic             andcom,  // qualifies the vote
  input  logic             orcom,   // forces the vote
  output logic [15:0]      vote,
  output logic [15:0]      notall
);
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      logic b0, b1, b2, b3, two, any_s, all_s;
      b0 = w[0][b]; b1 = w[1][b]; b2 = w[2][b]; b3 = w[3][b];
      two   = (b0 & b1) | (b0 & b2) | (b0 & b3) | (b1 & b2) | (b1 & b3) | (b2 & b3);
      any_s = b0 | b1 | b2 | b3;
      all_s = b0 & b1 & b2 & b3;
      vote[b]   = (two & andcom) | orcom;
      notall[b] = any_s ^ all_s;
    end
  end
endmodule
