// buffered_crossbar -- N x N crossbar with a segment buffer at every
// crosspoint (combined input-crosspoint queueing).
//
// Each input link carries segments: a 4-byte header (output ID, payload
// length) and the payload, one byte per clock. The input side reads the
// header, enters the length into the descriptor FIFO of crosspoint
// (input, output) and writes the payload into its buffer. The crossbar does
// not look inside a payload: where packets begin or end is unknown to it.
// Each output has a round-robin scheduler over the crosspoints of its
// column; it forwards one whole segment at a time, with the header
// rewritten to carry the source input instead of the output. Forwarding is
// cut-through: a segment may leave as soon as its header and first byte
// have arrived. Every byte that leaves crosspoint (i,j) returns one credit
// to input i for output j (credit_ret[i][j]); the ingress uses the credits
// so that a buffer never overflows. Crosspoint buffers, credits,
// round-robin output service and segment-level cut-through follow the
// source design; the header rewrite and the timing are this design's.
//
// Timing (output j): grant in cycle t0, header on out_data in t0+1..t0+4,
// payload from t0+5 without gaps. The scheduler is idle again in the cycle
// of the last payload byte, so the next header follows it directly.
module buffered_crossbar
  import cicq_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned XP_BUF  = 512,
  parameter int unsigned MIN_SEG = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  input  logic [7:0]   in_data    [N],
  output logic [N-1:0] out_valid,
  output logic [7:0]   out_data   [N],
  output logic [N-1:0] credit_ret [N],    // [input][output]
  output logic [N-1:0] ev_contend         // an output chose among >1 inputs
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned OCW = $clog2(XP_BUF + 1);
  localparam int unsigned DESC_DEPTH = XP_BUF / MIN_SEG + 2;

  typedef enum logic [1:0] {I_HDR, I_PAY} in_state_t;
  typedef enum logic [1:0] {O_IDLE, O_HDR, O_PAY} out_state_t;

  // crosspoint signals, [input][output]
  logic [N-1:0]   xp_wr     [N];
  logic [N-1:0]   xp_push   [N];
  logic [N-1:0]   xp_rd     [N];
  logic [N-1:0]   xp_pop    [N];
  logic [N-1:0]   xp_dval   [N];
  logic [N-1:0]   xp_nz     [N];
  logic [15:0]    xp_dlen   [N][N];
  logic [7:0]     xp_q      [N][N];
  logic [OCW-1:0] xp_occ    [N][N];
  logic [15:0]    in_len    [N];

  // ------------------------------------------------------------ inputs
  for (genvar i = 0; i < N; i++) begin : g_in
    in_state_t     st;
    logic [1:0]    hc;
    logic [IW-1:0] dst;
    logic [7:0]    len_hi;
    logic [15:0]   left;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st     <= I_HDR;
        hc     <= '0;
        dst    <= '0;
        len_hi <= '0;
        left   <= '0;
      end else if (in_valid[i]) begin
        if (st == I_HDR) begin
          hc <= hc + 1'b1;
          if (hc == 2'd0) dst    <= IW'(in_data[i]);
          if (hc == 2'd2) len_hi <= in_data[i];
          if (hc == 2'd3) begin
            left <= {len_hi, in_data[i]};
            st   <= I_PAY;
          end
        end else begin
          left <= left - 16'd1;
          if (left == 16'd1) st <= I_HDR;
        end
      end
    end

    assign in_len[i] = {len_hi, in_data[i]};
    always_comb begin
      xp_wr[i]   = '0;
      xp_push[i] = '0;
      if (in_valid[i] && st == I_HDR && hc == 2'd3) xp_push[i][dst] = 1'b1;
      if (in_valid[i] && st == I_PAY)               xp_wr[i][dst]   = 1'b1;
    end
  end

  // ------------------------------------------------------- crosspoints
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      crosspoint_buffer #(.DEPTH(XP_BUF), .DESC_DEPTH(DESC_DEPTH)) u_xp (
        .clk, .rst_n,
        .wr_en(xp_wr[i][j]), .wr_data(in_data[i]),
        .desc_push(xp_push[i][j]), .desc_len_in(in_len[i]),
        .rd_en(xp_rd[i][j]), .rd_data(xp_q[i][j]),
        .desc_pop(xp_pop[i][j]), .desc_valid(xp_dval[i][j]), .desc_len(xp_dlen[i][j]),
        .occ(xp_occ[i][j]));
      assign xp_nz[i][j] = (xp_occ[i][j] != '0);
      assign credit_ret[i][j] = xp_rd[i][j];
    end
  end

  // ----------------------------------------------------------- outputs
  for (genvar j = 0; j < N; j++) begin : g_out
    out_state_t    st;
    logic [N-1:0]  req;
    logic          g_any, grant, rd_act, rd_q;
    logic [IW-1:0] g_idx, src;
    seg_hdr_t      hdr;
    logic [1:0]    hc;
    logic [15:0]   left;

    always_comb
      for (int i = 0; i < N; i++) req[i] = xp_dval[i][j] && xp_nz[i][j];

    assign grant  = g_any && (st == O_IDLE);
    assign rd_act = (st == O_HDR && hc == 2'd3) || (st == O_PAY);

    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n, .req, .accept(grant), .gnt_any(g_any), .gnt_idx(g_idx));

    always_comb
      for (int i = 0; i < N; i++) begin
        xp_pop[i][j] = grant && int'(g_idx) == i;
        xp_rd[i][j]  = rd_act && int'(src) == i;
      end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st   <= O_IDLE;
        src  <= '0;
        hdr  <= '0;
        hc   <= '0;
        left <= '0;
        rd_q <= 1'b0;
      end else begin
        rd_q <= rd_act;
        if (st == O_HDR) begin
          hc <= hc + 1'b1;
          if (hc == 2'd3) begin
            // first payload byte is read in this cycle
            st   <= (hdr.len == 16'd1) ? O_IDLE : O_PAY;
            left <= hdr.len - 16'd1;
          end
        end else if (st == O_PAY) begin
          left <= left - 16'd1;
          if (left == 16'd1) st <= O_IDLE;
        end
        if (grant) begin
          st       <= O_HDR;
          src      <= g_idx;
          hdr.port <= 8'(g_idx);
          hdr.len  <= xp_dlen[g_idx][j];
          hc       <= '0;
        end
      end
    end

    always_comb begin
      out_valid[j] = 1'b0;
      out_data[j]  = '0;
      if (st == O_HDR) begin
        out_valid[j] = 1'b1;
        out_data[j]  = hdr_byte(hdr, int'(hc));
      end
      if (rd_q) begin
        out_valid[j] = 1'b1;
        out_data[j]  = xp_q[src][j];
      end
    end

    assign ev_contend[j] = grant && ($countones(req) > 1);
  end
endmodule
