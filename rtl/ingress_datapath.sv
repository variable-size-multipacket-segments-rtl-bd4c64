// ingress_datapath -- ingress line-card datapath: VOQ buffering and the
// transmission of variable-size multipacket segments to the crossbar.
//
// Arriving packets (already classified: in_dest comes from header
// processing) are written into the virtual output queue of their output in
// voq_buffer. For every queue the next segment size follows seg_size_calc
// from the queue's backlog, so a segment packs as many whole or partial
// packets as fit, up to MAX_SEG, and never leaves less than MIN_SEG behind.
// A queue is eligible when it has backlog, is not being migrated to DRAM,
// and holds credit for the whole segment at its crosspoint (credit flow
// control: one credit per crosspoint buffer byte, XP_BUF at reset, one
// returned per credit_ret pulse). The eligible queues are served
// round-robin. The 4-byte header (output ID, segment length; layout in
// cicq_pkg) is sent, then the payload straight out of SRAM or DRAM.
// Segment sizing, the header, credit flow control and round-robin input
// service follow the source design; the timing below is this design's.
//
// Timing: grant in cycle t0 (credit taken at once), header bytes on the
// link in t0+1..t0+4, read started so that the payload follows directly
// (for RD_LAT = 4) or after RD_LAT-4 idle cycles, payload contiguous, one
// idle cycle before the next grant. RD_LAT must be at least 1; for
// RD_LAT < 4 the read starts later within the header.
module ingress_datapath
  import cicq_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned MAX_SEG   = 512,
  parameter int unsigned MIN_SEG   = 40,
  parameter int unsigned XP_BUF    = 512,
  parameter int unsigned SRAM_BLKS = 96,
  parameter int unsigned DRAM_BLKS = 256,
  parameter int unsigned TAIL_SRAM = 2,
  parameter int unsigned RD_LAT    = 4,
  parameter int unsigned QW        = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DAW       = $clog2(DRAM_BLKS * MAX_SEG)
) (
  input  logic           clk,
  input  logic           rst_n,
  // packets from the ingress port
  input  logic           in_valid,
  input  logic [7:0]     in_data,
  input  logic           in_sop,
  input  logic           in_eop,
  input  logic [QW-1:0]  in_dest,
  output logic           in_ready,
  // link to the crossbar
  output logic           link_valid,
  output logic [7:0]     link_data,
  input  logic [N-1:0]   credit_ret,
  // off-chip DRAM
  output logic           dram_wr_en,
  output logic [DAW-1:0] dram_wr_addr,
  output logic [7:0]     dram_wr_data,
  output logic           dram_rd_en,
  output logic [DAW-1:0] dram_rd_addr,
  input  logic [7:0]     dram_rd_data,
  // events, one pulse each
  output logic           ev_seg,          // segment granted
  output logic           ev_credit_stall, // backlog waiting for credit
  output logic           ev_migrate,
  output logic           ev_dram_read
);
  localparam int unsigned BW = $clog2((SRAM_BLKS + DRAM_BLKS) * MAX_SEG + 1);
  localparam int unsigned CW = $clog2(XP_BUF + 1);
  localparam int unsigned RD_AT = (RD_LAT >= 4) ? 0 : 4 - RD_LAT;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_t;

  logic [BW-1:0] backlog [N];
  logic [N-1:0]  q_lock, mig_hold, elig;
  logic [15:0]   seg_len [N];
  logic [CW-1:0] credit [N];
  logic          g_any, grant, rd_start, rd_busy, out_valid;
  logic [QW-1:0] g_idx;
  logic [7:0]    out_data;
  state_t        state;
  seg_hdr_t      hdr;
  logic [QW-1:0] cur_q;
  logic [1:0]    hcnt;
  logic [15:0]   pay_left;

  voq_buffer #(
    .NQ(N), .BLK(MAX_SEG), .SRAM_BLKS(SRAM_BLKS), .DRAM_BLKS(DRAM_BLKS),
    .TAIL_SRAM(TAIL_SRAM), .RD_LAT(RD_LAT), .QW(QW), .BW(BW), .DAW(DAW)
  ) u_voq (
    .clk, .rst_n,
    .in_valid, .in_data, .in_sop, .in_eop, .in_q(in_dest), .in_ready,
    .backlog, .q_lock, .mig_hold,
    .rd_start, .rd_q(cur_q), .rd_len(hdr.len), .rd_busy,
    .out_valid, .out_data,
    .dram_wr_en, .dram_wr_addr, .dram_wr_data,
    .dram_rd_en, .dram_rd_addr, .dram_rd_data,
    .ev_migrate, .ev_dram_read);

  for (genvar j = 0; j < N; j++) begin : g_q
    seg_size_calc #(.MAX_SEG(MAX_SEG), .MIN_SEG(MIN_SEG), .BW(BW)) u_sz (
      .backlog(backlog[j]), .seg_len(seg_len[j]));
    assign elig[j] = (backlog[j] != '0) && !q_lock[j]
                     && (32'(credit[j]) >= 32'(seg_len[j]));
  end

  assign grant = (state == S_IDLE) && g_any;

  rr_arbiter #(.N(N)) u_in_arb (
    .clk, .rst_n, .req(elig), .accept(grant), .gnt_any(g_any), .gnt_idx(g_idx));

  always_comb begin
    mig_hold = '0;
    if (grant)              mig_hold[g_idx] = 1'b1;
    else if (state == S_HDR) mig_hold[cur_q] = 1'b1;
  end

  assign rd_start = (state == S_HDR) && (int'(hcnt) == RD_AT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      hdr      <= '0;
      cur_q    <= '0;
      hcnt     <= '0;
      pay_left <= '0;
      for (int j = 0; j < N; j++) credit[j] <= CW'(XP_BUF);
    end else begin
      for (int j = 0; j < N; j++)
        credit[j] <= credit[j] + CW'(credit_ret[j])
                     - ((grant && int'(g_idx) == j) ? CW'(seg_len[j]) : '0);
      case (state)
        S_IDLE: if (grant) begin
          state    <= S_HDR;
          cur_q    <= g_idx;
          hdr.port <= 8'(g_idx);
          hdr.len  <= seg_len[g_idx];
          hcnt     <= '0;
        end
        S_HDR: begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == 2'd3) begin
            state    <= S_PAY;
            pay_left <= hdr.len;
          end
        end
        default: if (out_valid) begin
          pay_left <= pay_left - 16'd1;
          if (pay_left == 16'd1) state <= S_IDLE;
        end
      endcase
    end
  end

  always_comb begin
    link_valid = 1'b0;
    link_data  = '0;
    if (state == S_HDR) begin
      link_valid = 1'b1;
      link_data  = hdr_byte(hdr, int'(hcnt));
    end else if (out_valid) begin
      link_valid = 1'b1;
      link_data  = out_data;
    end
  end

  assign ev_seg          = grant;
  assign ev_credit_stall = (state == S_IDLE) && !g_any && (|(~q_lock & ~elig & backlog_nz()));

  function automatic logic [N-1:0] backlog_nz();
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) v[j] = (backlog[j] != '0);
    return v;
  endfunction

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                  !(state == S_HDR && out_valid));
endmodule
