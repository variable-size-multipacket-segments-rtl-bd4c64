// tb_ingress_datapath -- one ingress datapath against a model of the
// crossbar side.
//
// Random packets (40..300 bytes) enter for 4 outputs. The testbench
// parses the link: a 4-byte header, then the payload. Its crosspoint model
// drains each output's bytes at a random rate (slow in some phases) and
// returns one credit per drained byte. Checked:
//  * header byte 0 names an output, byte 1 is zero;
//  * the segment length equals the size rule applied to the backlog the
//    ingress had when it granted the segment (the testbench's own count
//    of complete-packet bytes);
//  * the payload equals the next bytes of that output's queue;
//  * the payload follows the header without a gap;
//  * no crosspoint ever receives more bytes than its buffer holds.
// Mechanisms counted, each required at least once: multipacket segment,
// maximum-size segment, segment that leaves exactly MIN behind, credit
// stall, migration to DRAM, read from DRAM.
module tb_ingress_datapath;
  localparam int N = 4, MAX = 128, MIN = 40, XB = 160, SB = 12, DB = 24, LAT = 4;
  localparam int DAW = $clog2(DB * MAX);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sop, in_eop, in_ready;
  logic [7:0] in_data;
  logic [1:0] in_dest;
  logic link_valid;
  logic [7:0] link_data;
  logic [N-1:0] credit_ret;
  logic dram_wr_en, dram_rd_en;
  logic [DAW-1:0] dram_wr_addr, dram_rd_addr;
  logic [7:0] dram_wr_data, dram_rd_data;
  logic ev_seg, ev_credit_stall, ev_migrate, ev_dram_read;

  ingress_datapath #(.N(N), .MAX_SEG(MAX), .MIN_SEG(MIN), .XP_BUF(XB), .SRAM_BLKS(SB),
                     .DRAM_BLKS(DB), .TAIL_SRAM(2), .RD_LAT(LAT)) dut (.*);
  dram_model #(.DAW(DAW), .LAT(LAT)) u_dram (
    .clk, .wr_en(dram_wr_en), .wr_addr(dram_wr_addr), .wr_data(dram_wr_data),
    .rd_en(dram_rd_en), .rd_addr(dram_rd_addr), .rd_data(dram_rd_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned qb [N][$];     // accepted bytes per output
  bit           qs [N][$];     // marks the first byte of each packet
  int model_bl [N];            // complete-packet bytes not yet granted
  int snap_prev [N];
  int xp_occ [N];
  int pkt_left = 0, pkt_len = 0, pkt_q = 0, pkt_i = 0;
  // link parser
  int hpos = 0, seg_q = 0, seg_len = 0, seg_left = 0, seg_i = 0, seg_starts = 0;
  bit prev_hdr_last = 0;
  int n_multi = 0, n_max = 0, n_split = 0, n_stall = 0, n_mig = 0, n_dram = 0, n_segs = 0;
  byte unsigned hb [4];

  function automatic int rule(int b);
    if (b >= MAX + MIN) return MAX;
    if (b > MAX) return b - MIN;
    return b;
  endfunction

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  initial begin
    int phase;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_dest = 0; credit_ret = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 80000; t++) begin
      @(negedge clk);
      phase = (t >= 70000) ? 1 : (t / 4000) % 3;
      // ---- observe the link in this cycle
      if (link_valid) begin
        if (seg_left == 0) begin
          hb[hpos] = link_data;
          hpos++;
          if (hpos == 1) begin
            // grant happened in the previous cycle
            seg_q = int'(link_data);
            checks++;
            if (seg_q >= N) fail("bad output id");
          end
          if (hpos == 4) begin
            hpos = 0;
            seg_len = {hb[2], hb[3]};
            checks += 2;
            if (hb[1] != 0) fail("reserved header byte not zero");
            if (seg_len != rule(snap_prev[seg_q]))
              fail($sformatf("seg len %0d, backlog %0d expects %0d", seg_len, snap_prev[seg_q], rule(snap_prev[seg_q])));
            model_bl[seg_q] -= seg_len;
            seg_left = seg_len; seg_i = 0; seg_starts = 0;
            n_segs++;
            if (seg_len == MAX) n_max++;
            if (snap_prev[seg_q] > MAX && snap_prev[seg_q] < MAX + MIN) n_split++;
            xp_occ[seg_q] += seg_len;   // credit reserved in full
            checks++;
            if (xp_occ[seg_q] > XB) fail("crosspoint overflow");
            prev_hdr_last = 1;
          end
        end else begin
          byte unsigned e;
          bit st;
          prev_hdr_last = 0;
          e = qb[seg_q].pop_front();
          st = qs[seg_q].pop_front();
          checks++;
          if (link_data != e) fail($sformatf("payload %h exp %h", link_data, e));
          if (st && seg_i > 0) seg_starts++;
          seg_i++;
          seg_left--;
          if (seg_left == 0 && seg_starts > 0) n_multi++;
        end
      end else begin
        checks++;
        if (seg_left != 0 && prev_hdr_last == 0 && seg_i > 0) fail("gap inside payload");
        if (seg_left != 0 && seg_i == 0 && prev_hdr_last) fail("gap after header");
      end
      // snap_prev holds the backlog the DUT saw in the previous cycle, the
      // cycle of the grant whose header byte 0 appears now
      // ---- crosspoint drain and credit return
      credit_ret = '0;
      for (int j = 0; j < N; j++)
        if (xp_occ[j] > 0 && ((phase == 0) ? ($urandom % 16 == 0) : ($urandom % 2 == 0))) begin
          credit_ret[j] = 1; xp_occ[j]--;
        end
      // ---- packet source
      in_valid = 0; in_sop = 0; in_eop = 0;
      if (t < 70000 && pkt_left == 0 && ($urandom % 3 == 0)) begin
        pkt_q = (phase == 2) ? 0 : $urandom % N;
        pkt_len = 40 + $urandom % 261;
        pkt_left = pkt_len; pkt_i = 0;
      end
      if (pkt_left > 0) begin
        in_valid = 1; in_sop = (pkt_i == 0); in_eop = (pkt_left == 1);
        in_dest = 2'(pkt_q); in_data = 8'($urandom);
      end
      #1;
      if (ev_credit_stall) n_stall++;
      if (in_valid && in_ready) begin
        qb[pkt_q].push_back(in_data);
        qs[pkt_q].push_back(pkt_i == 0);
        pkt_i++; pkt_left--;
      end
      for (int j = 0; j < N; j++) snap_prev[j] = model_bl[j];
      if (in_valid && in_ready && in_eop) model_bl[pkt_q] += pkt_len;
    end
    repeat (50) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (model_bl[j] != 0 || qb[j].size() != 0) fail($sformatf("queue %0d not drained: %0d", j, qb[j].size()));
    end
    $display("segments %0d multipacket %0d max-size %0d split %0d credit-stall %0d migrations %0d dram-reads %0d",
             n_segs, n_multi, n_max, n_split, n_stall, n_mig, n_dram);
    checks += 6;
    if (n_multi == 0) fail("no multipacket segment");
    if (n_max == 0)   fail("no maximum-size segment");
    if (n_split == 0) fail("no segment leaving MIN behind");
    if (n_stall == 0) fail("no credit stall");
    if (n_mig == 0)   fail("no migration");
    if (n_dram == 0)  fail("no DRAM read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_migrate) n_mig++;
    if (ev_dram_read) n_dram++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
