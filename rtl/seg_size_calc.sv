// seg_size_calc -- size of the next variable-size multipacket segment.
//
// Given the backlog B of a virtual output queue (bytes of complete packets
// waiting), returns the payload size of the segment to send next:
//   B >= MAX_SEG + MIN_SEG       : MAX_SEG        (a full block)
//   MAX_SEG < B < MAX_SEG+MIN_SEG: B - MIN_SEG    (leave exactly MIN_SEG
//                                                  behind, so the last
//                                                  segment is never short)
//   B <= MAX_SEG                 : B              (everything, multipacket)
// So all segments but the last two of a queue are MAX_SEG bytes and none is
// below MIN_SEG (while packets are at least MIN_SEG long). The rule follows
// the minimum-segment-size scheme of the source design (its example: 280
// bytes with a 256-byte maximum leave as 240 + 40). Purely combinational.
module seg_size_calc #(
  parameter int unsigned MAX_SEG = 512,
  parameter int unsigned MIN_SEG = 40,
  parameter int unsigned BW      = 20     // backlog width
) (
  input  logic [BW-1:0] backlog,
  output logic [15:0]   seg_len
);
  localparam logic [BW-1:0] MAXB = BW'(MAX_SEG);
  localparam logic [BW-1:0] MINB = BW'(MIN_SEG);
  logic [BW-1:0] len_w;

  always_comb begin
    if (backlog >= MAXB + MINB)  len_w = MAXB;
    else if (backlog > MAXB)     len_w = backlog - MINB;
    else                         len_w = backlog;
    seg_len = 16'(len_w);
  end
endmodule
