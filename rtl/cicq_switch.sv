// cicq_switch -- a combined input-crosspoint queued (buffered crossbar)
// switch that carries traffic across the crossbar in variable-size
// multipacket segments.
//
// N ingress datapaths (one per input port) queue packets per output and
// send segments of up to MAX_SEG bytes to one N x N buffered crossbar; N
// egress datapaths (one per output port) reassemble the packets. Each
// ingress datapath has an off-chip DRAM for the head blocks of long queues;
// the DRAM is outside this module, and its ports (one byte-wide port per
// ingress, read latency RD_LAT) are brought out. Header processing is also
// outside: each packet arrives with its output port number on in_dest.
// The links between the chips have no delay here; the crossbar link and
// credit return are wired directly. The partition into ingress datapath,
// crossbar and egress datapath follows the source design.
//
// Interface: per input port i, a byte stream in_valid/in_data with
// in_sop/in_eop packet marks and in_dest valid with in_sop; in_ready
// back-pressures it. Packets must be at least MIN_SEG and at most
// MAX_PKT bytes and carry their length in bytes 2..3. Per output port j,
// reassembled packets leave on out_valid/out_data with out_sop/out_eop.
// All ports move one byte per clock.
module cicq_switch #(
  parameter int unsigned N         = 32,
  parameter int unsigned MAX_SEG   = 512,
  parameter int unsigned MIN_SEG   = 40,
  parameter int unsigned XP_BUF    = 512,
  parameter int unsigned SRAM_BLKS = 96,
  parameter int unsigned DRAM_BLKS = 256,
  parameter int unsigned TAIL_SRAM = 2,
  parameter int unsigned RD_LAT    = 4,
  parameter int unsigned MAX_PKT   = 1500,
  parameter int unsigned QW        = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DAW       = $clog2(DRAM_BLKS * MAX_SEG)
) (
  input  logic           clk,
  input  logic           rst_n,
  // ingress ports
  input  logic [N-1:0]   in_valid,
  input  logic [7:0]     in_data      [N],
  input  logic [N-1:0]   in_sop,
  input  logic [N-1:0]   in_eop,
  input  logic [QW-1:0]  in_dest      [N],
  output logic [N-1:0]   in_ready,
  // per-ingress off-chip DRAM ports
  output logic [N-1:0]   dram_wr_en,
  output logic [DAW-1:0] dram_wr_addr [N],
  output logic [7:0]     dram_wr_data [N],
  output logic [N-1:0]   dram_rd_en,
  output logic [DAW-1:0] dram_rd_addr [N],
  input  logic [7:0]     dram_rd_data [N],
  // egress ports
  output logic [N-1:0]   out_valid,
  output logic [7:0]     out_data     [N],
  output logic [N-1:0]   out_sop,
  output logic [N-1:0]   out_eop,
  output logic [N-1:0]   reasm_overflow
);
  logic [N-1:0] link_valid, xo_valid;
  logic [7:0]   link_data [N];
  logic [7:0]   xo_data   [N];
  logic [N-1:0] credit    [N];
  logic [N-1:0] ev_seg, ev_stall, ev_mig, ev_dram, ev_early, ev_contend;

  for (genvar i = 0; i < N; i++) begin : g_ing
    ingress_datapath #(
      .N(N), .MAX_SEG(MAX_SEG), .MIN_SEG(MIN_SEG), .XP_BUF(XP_BUF),
      .SRAM_BLKS(SRAM_BLKS), .DRAM_BLKS(DRAM_BLKS), .TAIL_SRAM(TAIL_SRAM),
      .RD_LAT(RD_LAT), .QW(QW), .DAW(DAW)
    ) u_ing (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_data(in_data[i]), .in_sop(in_sop[i]),
      .in_eop(in_eop[i]), .in_dest(in_dest[i]), .in_ready(in_ready[i]),
      .link_valid(link_valid[i]), .link_data(link_data[i]),
      .credit_ret(credit[i]),
      .dram_wr_en(dram_wr_en[i]), .dram_wr_addr(dram_wr_addr[i]),
      .dram_wr_data(dram_wr_data[i]), .dram_rd_en(dram_rd_en[i]),
      .dram_rd_addr(dram_rd_addr[i]), .dram_rd_data(dram_rd_data[i]),
      .ev_seg(ev_seg[i]), .ev_credit_stall(ev_stall[i]),
      .ev_migrate(ev_mig[i]), .ev_dram_read(ev_dram[i]));
  end

  buffered_crossbar #(.N(N), .XP_BUF(XP_BUF), .MIN_SEG(MIN_SEG)) u_xbar (
    .clk, .rst_n,
    .in_valid(link_valid), .in_data(link_data),
    .out_valid(xo_valid), .out_data(xo_data),
    .credit_ret(credit), .ev_contend);

  for (genvar j = 0; j < N; j++) begin : g_egr
    egress_datapath #(.N(N), .REGION(2 * MAX_PKT)) u_egr (
      .clk, .rst_n,
      .seg_valid(xo_valid[j]), .seg_data(xo_data[j]),
      .pkt_valid(out_valid[j]), .pkt_data(out_data[j]),
      .pkt_sop(out_sop[j]), .pkt_eop(out_eop[j]),
      .overflow(reasm_overflow[j]), .ev_ready_early(ev_early[j]));
  end
endmodule
