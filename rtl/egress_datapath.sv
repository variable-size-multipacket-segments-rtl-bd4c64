// egress_datapath -- egress line-card datapath: reassembles packets from
// the variable-size multipacket segments of one crossbar output.
//
// Segments arrive from the crossbar with a 4-byte header naming the source
// input and the payload length (layout in cicq_pkg). Payload bytes of
// source s go into reassembly region s of an on-chip SRAM, a ring of
// REGION bytes. The source design sizes the reassembly memory at
// N x MaxPktSize per egress port (one priority level), shared among the
// sources. This design instead gives every source a fixed region, and a
// fixed region must hold one packet being reassembled plus one complete
// packet waiting for the port, so the switch sets REGION to twice the
// maximum packet size (2 x N x MaxPktSize in all).
//
// Packet boundaries are found from the packets themselves: bytes 2..3 of
// each packet hold its length (IP total length). A packet becomes ready for
// transmission as soon as it is known that the segment now arriving holds
// its last byte: at the segment header if its length is already known,
// else when its length bytes arrive. This is the cut-through at the
// last-segment level of the source design: the packet starts to leave while
// its last segment is still arriving. Ready packets wait in a FIFO and are
// sent one at a time, one byte per clock, with sop/eop marks. There is no
// flow control towards the crossbar; an overflow of a region or of the ready
// FIFO sets the sticky `overflow` output.
//
// Timing: a packet popped from the ready FIFO in cycle t leaves on pkt_data
// from t+1, one byte per clock; the pop may coincide with the last byte of
// the previous packet, so packets leave back to back at full line rate. Transmission never overtakes reception: the
// ready decision is taken when at least four bytes of the packet are stored
// or the segment header is still arriving, and both sides move one byte
// per clock.
module egress_datapath
  import cicq_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned REGION    = 3000,
  parameter int unsigned RDY_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  // segments from the crossbar output
  input  logic       seg_valid,
  input  logic [7:0] seg_data,
  // packets to the egress port
  output logic       pkt_valid,
  output logic [7:0] pkt_data,
  output logic       pkt_sop,
  output logic       pkt_eop,
  output logic       overflow,
  // events, one pulse each
  output logic       ev_ready_early   // packet ready before its last byte arrived
);
  localparam int unsigned IW  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW  = $clog2(REGION);
  localparam int unsigned OW  = $clog2(REGION + 1);
  localparam int unsigned FW  = $clog2(RDY_DEPTH);

  typedef struct packed {
    logic [IW-1:0] src;
    logic [PW-1:0] start;
    logic [15:0]   len;
  } rdy_t;

  function automatic logic [PW-1:0] wrap_inc(logic [PW-1:0] p);
    return (int'(p) == REGION - 1) ? '0 : p + 1'b1;
  endfunction

  logic [7:0] mem [N * REGION];

  // per-source reassembly state
  logic [PW-1:0] wptr [N], pstart [N];
  logic [15:0]   ppos [N], plen [N];
  logic [7:0]    lhi [N];
  logic [N-1:0]  known, readied;
  logic [OW-1:0] occ [N];

  // segment parser
  logic [1:0]    hc;
  logic          in_pay;
  logic [IW-1:0] src;
  logic [7:0]    slen_hi;
  logic [15:0]   seg_left;

  // ready FIFO
  rdy_t          rq [RDY_DEPTH];
  logic [FW-1:0] rq_w, rq_r;
  logic [FW:0]   rq_n;
  logic          rq_push, rq_pop;
  rdy_t          rq_in;

  // transmitter
  logic          tx_busy, tx_v, tx_sop, tx_eop, tx_first;
  logic [IW-1:0] tx_src;
  logic [PW-1:0] tx_ptr;
  logic [15:0]   tx_left;

  // ---------------------------------------------------- receive decisions
  logic          hdr_done, pay_byte, len_byte, pkt_end;
  logic [15:0]   seg_len_now, new_len, pos;
  logic [IW-1:0] s;

  assign s           = src;
  assign hdr_done    = seg_valid && !in_pay && hc == 2'd3;
  assign pay_byte    = seg_valid && in_pay;
  assign seg_len_now = {slen_hi, seg_data};
  assign pos         = ppos[s];
  assign len_byte    = pay_byte && int'(pos) == PKT_LEN_LO;
  assign new_len     = {lhi[s], seg_data};
  assign pkt_end     = pay_byte && ((known[s] && pos + 16'd1 == plen[s]) ||
                                    (len_byte && new_len == 16'd4));

  always_comb begin
    rq_push = 1'b0;
    rq_in   = '0;
    if (hdr_done && known[s] && !readied[s] && (plen[s] - ppos[s]) <= seg_len_now) begin
      rq_push = 1'b1;
      rq_in   = '{src: s, start: pstart[s], len: plen[s]};
    end else if (len_byte && (new_len - 16'd4) <= (seg_left - 16'd1)) begin
      rq_push = 1'b1;
      rq_in   = '{src: s, start: pstart[s], len: new_len};
    end
  end

  assign ev_ready_early = rq_push && !pkt_end;

  // --------------------------------------------------------- state update
  // the next packet may start right after the last byte of the current one
  assign rq_pop = (!tx_busy || tx_left == 16'd1) && (rq_n != '0);

  always_ff @(posedge clk) begin
    if (pay_byte) mem[int'(s) * REGION + int'(wptr[s])] <= seg_data;
    pkt_data <= mem[int'(tx_src) * REGION + int'(tx_ptr)];
    if (rq_push) rq[rq_w] <= rq_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc       <= '0;
      in_pay   <= 1'b0;
      src      <= '0;
      slen_hi  <= '0;
      seg_left <= '0;
      known    <= '0;
      readied  <= '0;
      rq_w     <= '0;
      rq_r     <= '0;
      rq_n     <= '0;
      tx_busy  <= 1'b0;
      tx_v     <= 1'b0;
      tx_sop   <= 1'b0;
      tx_eop   <= 1'b0;
      tx_first <= 1'b0;
      tx_src   <= '0;
      tx_ptr   <= '0;
      tx_left  <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < N; i++) begin
        wptr[i]   <= '0;
        pstart[i] <= '0;
        ppos[i]   <= '0;
        plen[i]   <= '0;
        lhi[i]    <= '0;
        occ[i]    <= '0;
      end
    end else begin
      // ---- segment header
      if (seg_valid && !in_pay) begin
        hc <= hc + 1'b1;
        if (hc == 2'd0) src     <= IW'(seg_data);
        if (hc == 2'd2) slen_hi <= seg_data;
        if (hc == 2'd3) begin
          seg_left <= seg_len_now;
          in_pay   <= (seg_len_now != 16'd0);
        end
      end
      // ---- segment payload
      if (pay_byte) begin
        seg_left <= seg_left - 16'd1;
        if (seg_left == 16'd1) in_pay <= 1'b0;
        wptr[s] <= wrap_inc(wptr[s]);
        if (pos == 16'd0) begin
          pstart[s]  <= wptr[s];
          known[s]   <= 1'b0;
          readied[s] <= 1'b0;
        end
        if (int'(pos) == PKT_LEN_HI) lhi[s] <= seg_data;
        if (len_byte) begin
          plen[s]  <= new_len;
          known[s] <= 1'b1;
        end
        ppos[s] <= pkt_end ? 16'd0 : pos + 16'd1;
      end
      if (rq_push) readied[s] <= 1'b1;
      if (pkt_end) begin
        readied[s] <= 1'b0;
        known[s]   <= 1'b0;
      end

      // ---- ready FIFO
      if (rq_push) rq_w <= (int'(rq_w) == RDY_DEPTH - 1) ? '0 : rq_w + 1'b1;
      if (rq_pop)  rq_r <= (int'(rq_r) == RDY_DEPTH - 1) ? '0 : rq_r + 1'b1;
      rq_n <= rq_n + (FW+1)'(rq_push) - (FW+1)'(rq_pop);
      if (rq_push && !rq_pop && int'(rq_n) == RDY_DEPTH) overflow <= 1'b1;

      // ---- transmitter
      tx_v   <= tx_busy;
      tx_sop <= tx_busy && tx_first;
      tx_eop <= tx_busy && tx_left == 16'd1;
      if (rq_pop) begin
        tx_busy  <= 1'b1;
        tx_first <= 1'b1;
        tx_src   <= rq[rq_r].src;
        tx_ptr   <= rq[rq_r].start;
        tx_left  <= rq[rq_r].len;
      end else if (tx_busy) begin
        tx_first <= 1'b0;
        tx_ptr   <= wrap_inc(tx_ptr);
        tx_left  <= tx_left - 16'd1;
        if (tx_left == 16'd1) tx_busy <= 1'b0;
      end

      // ---- region occupancy
      for (int i = 0; i < N; i++) begin
        occ[i] <= occ[i] + OW'(pay_byte && int'(s) == i) - OW'(tx_busy && int'(tx_src) == i);
        if (pay_byte && int'(s) == i && !(tx_busy && int'(tx_src) == i) && int'(occ[i]) == REGION)
          overflow <= 1'b1;
      end
    end
  end

  assign pkt_valid = tx_v;
  assign pkt_sop   = tx_sop;
  assign pkt_eop   = tx_eop;
endmodule
