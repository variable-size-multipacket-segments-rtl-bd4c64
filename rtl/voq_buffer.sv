// voq_buffer -- virtual output queues of an ingress line card, kept as
// linked lists of fixed-size blocks split between on-chip SRAM and an
// off-chip DRAM.
//
// Each of the NQ queues (one per crossbar output) is a byte stream: the
// packets for that output are written one after another with no padding, so
// a block may hold several packets or pieces of them. Blocks are BLK bytes,
// the maximum segment size. New data always goes into the tail block, which
// is in SRAM. When a queue holds more than TAIL_SRAM blocks in SRAM, its
// oldest SRAM block is copied to a free DRAM block (migration) and relinked
// in place, so a long queue has its head blocks in DRAM and only its last
// TAIL_SRAM blocks in SRAM, while a short queue stays entirely in SRAM.
// Head blocks are never copied back: segments are read straight out of DRAM
// towards the crossbar. All of this follows the source design; the rest
// (free lists as bitmaps, one migration at a time, one reader at a time)
// is this design's choice.
//
// Block identifiers: 0..SRAM_BLKS-1 name SRAM blocks, SRAM_BLKS and up name
// DRAM blocks. Per queue the SRAM blocks are always the last ones of the
// list (a suffix), so migration takes the first SRAM block and links it
// behind the last DRAM block.
//
// Interface and timing
//  * Write side: one byte per clock when in_valid && in_ready. in_q (the
//    destination given by header processing) is sampled with in_sop. A
//    packet is added to `backlog` (bytes available for segments) at in_eop.
//    in_ready is low only when a new block is needed and SRAM has none free.
//  * Read side: rd_start with rd_q/rd_len (1 <= rd_len <= backlog) reads
//    rd_len bytes from the head of the queue, one per clock from that cycle
//    on, without gaps. Each byte appears on out_data with out_valid exactly
//    RD_LAT clocks after it was addressed; RD_LAT is the DRAM read latency,
//    and SRAM data is delayed to match. rd_busy is high while bytes remain.
//  * q_lock[q] is high while queue q is being migrated: no read may start
//    on it then. No migration starts on a queue being read, nor on one
//    whose mig_hold bit is set (a read about to start).
//  * DRAM port: byte-wide, write at the clock edge, read data valid RD_LAT
//    clocks after dram_rd_en.
module voq_buffer #(
  parameter int unsigned NQ        = 32,
  parameter int unsigned BLK       = 512,
  parameter int unsigned SRAM_BLKS = 96,
  parameter int unsigned DRAM_BLKS = 256,
  parameter int unsigned TAIL_SRAM = 2,
  parameter int unsigned RD_LAT    = 4,
  parameter int unsigned QW        = (NQ > 1) ? $clog2(NQ) : 1,
  parameter int unsigned BW        = $clog2((SRAM_BLKS + DRAM_BLKS) * BLK + 1),
  parameter int unsigned DAW       = $clog2(DRAM_BLKS * BLK)
) (
  input  logic            clk,
  input  logic            rst_n,
  // packet input
  input  logic            in_valid,
  input  logic [7:0]      in_data,
  input  logic            in_sop,
  input  logic            in_eop,
  input  logic [QW-1:0]   in_q,
  output logic            in_ready,
  // queue state
  output logic [BW-1:0]   backlog [NQ],
  output logic [NQ-1:0]   q_lock,
  input  logic [NQ-1:0]   mig_hold,
  // segment read
  input  logic            rd_start,
  input  logic [QW-1:0]   rd_q,
  input  logic [15:0]     rd_len,
  output logic            rd_busy,
  output logic            out_valid,
  output logic [7:0]      out_data,
  // off-chip DRAM
  output logic            dram_wr_en,
  output logic [DAW-1:0]  dram_wr_addr,
  output logic [7:0]      dram_wr_data,
  output logic            dram_rd_en,
  output logic [DAW-1:0]  dram_rd_addr,
  input  logic [7:0]      dram_rd_data,
  // events, one pulse each
  output logic            ev_migrate,     // a block has moved to DRAM
  output logic            ev_dram_read    // a byte was read from DRAM
);
  localparam int unsigned NB  = SRAM_BLKS + DRAM_BLKS;
  localparam int unsigned IDW = $clog2(NB);
  localparam int unsigned OW  = $clog2(BLK + 1);
  localparam int unsigned SAW = $clog2(SRAM_BLKS * BLK);
  localparam int unsigned SW  = $clog2(SRAM_BLKS + 1);
  localparam int unsigned DW  = $clog2(DRAM_BLKS + 1);
  localparam int unsigned DIW = (DRAM_BLKS > 1) ? $clog2(DRAM_BLKS) : 1;
  typedef logic [IDW-1:0] id_t;
  typedef logic [OW-1:0]  off_t;

  // ---------------------------------------------------------------- storage
  logic [7:0]  sram [SRAM_BLKS * BLK];
  id_t         link [NB];

  // per-queue state
  id_t           head [NQ], tail [NQ], sram_first [NQ], dram_last [NQ];
  off_t          head_off [NQ], tail_off [NQ];
  logic [SW-1:0] sram_blks [NQ];
  logic [DW-1:0] dram_blks [NQ];

  // free lists
  logic [SRAM_BLKS-1:0] sram_free;
  logic [DRAM_BLKS-1:0] dram_free;
  logic                 sram_any, dram_any;
  logic [IDW-1:0]       sram_pick;
  logic [DIW-1:0]       dram_pick;

  always_comb begin
    sram_any  = 1'b0;
    sram_pick = '0;
    for (int i = SRAM_BLKS - 1; i >= 0; i--)
      if (sram_free[i]) begin sram_any = 1'b1; sram_pick = IDW'(i); end
    dram_any  = 1'b0;
    dram_pick = '0;
    for (int i = DRAM_BLKS - 1; i >= 0; i--)
      if (dram_free[i]) begin dram_any = 1'b1; dram_pick = DIW'(i); end
  end

  function automatic logic is_dram(id_t id);
    return int'(id) >= SRAM_BLKS;
  endfunction

  // ----------------------------------------------------------------- writer
  logic [QW-1:0] cur_q, wq;
  logic [15:0]   cur_cnt;
  logic          w_empty, need_alloc, wr_fire, alloc;
  id_t           w_id;
  off_t          w_off;

  assign wq         = in_sop ? in_q : cur_q;
  assign w_empty    = (sram_blks[wq] == '0) && (dram_blks[wq] == '0);
  assign need_alloc = w_empty || (int'(tail_off[wq]) == BLK);
  assign in_ready   = !need_alloc || sram_any;
  assign wr_fire    = in_valid && in_ready;
  assign alloc      = wr_fire && need_alloc;
  assign w_id       = need_alloc ? sram_pick : tail[wq];
  assign w_off      = need_alloc ? '0 : tail_off[wq];

  // ----------------------------------------------------------------- reader
  logic          r_act, r_last, r_free, r_multi;
  logic [QW-1:0] rq, rq_reg;
  logic [15:0]   rem, r_rem_next;
  id_t           r_id, r_next;
  off_t          r_off;

  assign r_act      = rd_start || rd_busy;
  assign rq         = rd_start ? rd_q : rq_reg;
  assign r_rem_next = (rd_start ? rd_len : rem) - 16'd1;
  assign r_id       = head[rq];
  assign r_off      = head_off[rq];
  assign r_last     = (int'(r_off) == BLK - 1);
  assign r_free     = r_act && r_last;
  assign r_multi    = (32'(sram_blks[rq]) + 32'(dram_blks[rq])) > 1;
  // next head after freeing: the successor, or a block the writer links to
  // this very queue in the same cycle
  assign r_next     = r_multi ? link[r_id] : sram_pick;

  // ------------------------------------------------------------- migration
  logic          mig_busy, mig_wv, mig_done;
  logic [QW-1:0] mig_q;
  id_t           mig_src;
  logic [DIW-1:0] mig_dst;
  logic [OW-1:0] mig_cnt;
  logic [OW-1:0] mig_wa;
  logic [7:0]    mig_data;
  logic [NQ-1:0] mreq;
  logic          m_any, m_start;
  logic [QW-1:0] m_idx;
  id_t           mig_did;

  always_comb
    for (int q = 0; q < NQ; q++)
      mreq[q] = (int'(sram_blks[q]) > TAIL_SRAM) && !(r_act && int'(rq) == q) && !mig_hold[q];

  assign m_start  = !mig_busy && dram_any && m_any;
  assign mig_done = mig_wv && (int'(mig_wa) == BLK - 1);
  assign mig_did  = IDW'(SRAM_BLKS) + IDW'(mig_dst);

  rr_arbiter #(.N(NQ)) u_mig_arb (
    .clk, .rst_n, .req(mreq), .accept(m_start), .gnt_any(m_any), .gnt_idx(m_idx));

  always_comb
    for (int q = 0; q < NQ; q++) q_lock[q] = mig_busy && (int'(mig_q) == q);

  // ------------------------------------------------------------ datapath
  logic [SAW-1:0] s_rd_addr;
  assign s_rd_addr = SAW'(int'(r_id) * BLK + int'(r_off));

  logic [RD_LAT-1:0] p_vld, p_dram;
  logic [7:0]        p_sd [RD_LAT];

  always_ff @(posedge clk) begin
    if (wr_fire) sram[int'(w_id) * BLK + int'(w_off)] <= in_data;
    p_sd[0] <= sram[s_rd_addr];
    for (int k = 1; k < RD_LAT; k++) p_sd[k] <= p_sd[k-1];
    if (mig_busy && int'(mig_cnt) < BLK)
      mig_data <= sram[int'(mig_src) * BLK + int'(mig_cnt)];
  end

  assign dram_rd_en   = r_act && is_dram(r_id);
  assign dram_rd_addr = DAW'((int'(r_id) - SRAM_BLKS) * BLK + int'(r_off));
  assign dram_wr_en   = mig_wv;
  assign dram_wr_addr = DAW'(int'(mig_dst) * BLK + int'(mig_wa));
  assign dram_wr_data = mig_data;
  assign out_valid    = p_vld[RD_LAT-1];
  assign out_data     = p_dram[RD_LAT-1] ? dram_rd_data : p_sd[RD_LAT-1];
  assign ev_migrate   = mig_done;
  assign ev_dram_read = dram_rd_en;

  // ------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_free <= '1;
      dram_free <= '1;
      cur_q     <= '0;
      cur_cnt   <= '0;
      rd_busy   <= 1'b0;
      rq_reg    <= '0;
      rem       <= '0;
      p_vld     <= '0;
      p_dram    <= '0;
      mig_busy  <= 1'b0;
      mig_wv    <= 1'b0;
      mig_q     <= '0;
      mig_src   <= '0;
      mig_dst   <= '0;
      mig_cnt   <= '0;
      mig_wa    <= '0;
      for (int q = 0; q < NQ; q++) begin
        head[q]       <= '0;
        tail[q]       <= '0;
        sram_first[q] <= '0;
        dram_last[q]  <= '0;
        head_off[q]   <= '0;
        tail_off[q]   <= '0;
        sram_blks[q]  <= '0;
        dram_blks[q]  <= '0;
        backlog[q]    <= '0;
      end
      for (int b = 0; b < NB; b++) link[b] <= '0;
    end else begin
      // ---- writer
      if (wr_fire) begin
        cur_q       <= wq;
        cur_cnt     <= in_sop ? 16'd1 : cur_cnt + 16'd1;
        tail[wq]    <= w_id;
        tail_off[wq] <= w_off + 1'b1;
        if (alloc) begin
          sram_free[SW'(sram_pick)] <= 1'b0;
          if (w_empty) head[wq] <= sram_pick;
          else         link[tail[wq]] <= sram_pick;
          if (sram_blks[wq] == '0) sram_first[wq] <= sram_pick;
        end
      end

      // ---- reader
      rd_busy <= r_act && (r_rem_next != 16'd0);
      if (r_act) begin
        rq_reg <= rq;
        rem    <= r_rem_next;
        if (r_free) begin
          head_off[rq] <= '0;
          head[rq]     <= r_next;
          if (is_dram(r_id)) dram_free[DIW'(int'(r_id) - SRAM_BLKS)] <= 1'b1;
          else begin
            sram_free[SW'(r_id)] <= 1'b1;
            sram_first[rq]  <= r_next;
          end
        end else begin
          head_off[rq] <= r_off + 1'b1;
        end
      end
      p_vld[0]  <= r_act;
      p_dram[0] <= r_act && is_dram(r_id);
      for (int k = 1; k < RD_LAT; k++) begin
        p_vld[k]  <= p_vld[k-1];
        p_dram[k] <= p_dram[k-1];
      end

      // ---- migration
      if (m_start) begin
        mig_busy           <= 1'b1;
        mig_q              <= m_idx;
        mig_src            <= sram_first[m_idx];
        mig_dst            <= dram_pick;
        dram_free[dram_pick] <= 1'b0;
        mig_cnt            <= '0;
      end else if (mig_busy) begin
        if (int'(mig_cnt) < BLK) begin
          mig_wv  <= 1'b1;
          mig_wa  <= mig_cnt;
          mig_cnt <= mig_cnt + 1'b1;
        end else begin
          mig_wv  <= 1'b0;
        end
        if (mig_done) begin
          mig_busy         <= 1'b0;
          mig_wv           <= 1'b0;
          link[mig_did]    <= link[mig_src];
          if (dram_blks[mig_q] == '0) head[mig_q] <= mig_did;
          else                        link[dram_last[mig_q]] <= mig_did;
          dram_last[mig_q]  <= mig_did;
          sram_first[mig_q] <= link[mig_src];
          sram_free[SW'(mig_src)] <= 1'b1;
        end
      end

      // ---- per-queue counters
      for (int q = 0; q < NQ; q++) begin
        sram_blks[q] <= sram_blks[q] + SW'(alloc && int'(wq) == q)
                        - SW'(r_free && int'(rq) == q && !is_dram(r_id))
                        - SW'(mig_done && int'(mig_q) == q);
        dram_blks[q] <= dram_blks[q] + DW'(mig_done && int'(mig_q) == q)
                        - DW'(r_free && int'(rq) == q && is_dram(r_id));
        backlog[q]   <= backlog[q]
                        + ((wr_fire && in_eop && int'(wq) == q) ? BW'(in_sop ? 16'd1 : 16'(cur_cnt + 16'd1)) : '0)
                        - ((rd_start && int'(rd_q) == q) ? BW'(rd_len) : '0);
      end
    end
  end

  // ------------------------------------------------------------ checks
  a_rd_len:   assert property (@(posedge clk) disable iff (!rst_n)
                rd_start |-> (rd_len != 0 && 32'(rd_len) <= 32'(backlog[rd_q]) && !rd_busy));
  a_rd_lock:  assert property (@(posedge clk) disable iff (!rst_n)
                rd_start |-> !q_lock[rd_q]);
  a_mig_excl: assert property (@(posedge clk) disable iff (!rst_n)
                mig_busy |-> !(r_act && rq == mig_q));
endmodule
