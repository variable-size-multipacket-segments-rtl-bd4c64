// tb_egress_datapath -- reassembly of packets from interleaved
// variable-size multipacket segments of 4 sources.
//
// Each source has a stream of packets (40..600 bytes; bytes 2..3 carry the
// length, byte 0 the source, byte 1 a sequence number, the rest random).
// The testbench cuts each stream into segments with the segment size rule
// (128-byte maximum, 40-byte minimum) and sends them on the link, sources
// chosen at random per segment, with idle gaps. Each reassembled packet
// must be the next expected packet of the source named in its byte 0, byte
// for byte, framed by one sop and one eop. Checked at the end: all packets
// delivered, no overflow. Counted and required: packets released before
// their last byte had arrived (cut-through at the last segment), packets
// spanning several segments, segments carrying several packets.
module tb_egress_datapath;
  localparam int N = 4, MAXPKT = 600, REGION = 2 * MAXPKT, MAX = 128, MIN = 40;
  logic clk = 0, rst_n = 0;
  logic seg_valid, pkt_valid, pkt_sop, pkt_eop, overflow, ev_ready_early;
  logic [7:0] seg_data, pkt_data;

  egress_datapath #(.N(N), .REGION(REGION), .RDY_DEPTH(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned src_q [N][$];       // bytes not yet segmented
  bit           src_st [N][$];      // first byte of a packet
  byte unsigned exp_pkts [N][$][$]; // expected packets per source
  int n_pkts_in = 0, n_pkts_out = 0, n_early = 0, n_multiseg = 0, n_multipkt = 0;
  int seqno [N];
  bit ovf_seen = 0;
  byte unsigned cur [$];
  byte unsigned link_q [$];         // bytes to put on the link

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  task automatic new_packet(int s);
    byte unsigned p [$];
    int len;
    len = 40 + $urandom % (MAXPKT - 40 + 1);
    p.push_back(8'(s)); p.push_back(8'(seqno[s]++));
    p.push_back(8'(len >> 8)); p.push_back(8'(len));
    for (int k = 4; k < len; k++) p.push_back(8'($urandom));
    exp_pkts[s].push_back(p);
    foreach (p[k]) begin src_q[s].push_back(p[k]); src_st[s].push_back(k == 0); end
    if (len > MAX) n_multiseg++;
    n_pkts_in++;
  endtask

  function automatic int rule(int b);
    if (b >= MAX + MIN) return MAX;
    if (b > MAX) return b - MIN;
    return b;
  endfunction

  // build one segment of source s onto the link queue
  task automatic make_segment(int s);
    int l, starts;
    l = rule(src_q[s].size());
    link_q.push_back(8'(s)); link_q.push_back(0);
    link_q.push_back(8'(l >> 8)); link_q.push_back(8'(l));
    starts = 0;
    for (int k = 0; k < l; k++) begin
      link_q.push_back(src_q[s].pop_front());
      if (src_st[s].pop_front()) starts++;
    end
    if (starts > 1) n_multipkt++;
  endtask

  initial begin
    seg_valid = 0; seg_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120000; t++) begin
      @(negedge clk);
      if (link_q.size() == 0 && t < 110000) begin
        int s;
        s = $urandom % N;
        while (src_q[s].size() < 200 && ($urandom % 4 != 0)) new_packet(s);
        if (src_q[s].size() == 0) new_packet(s);
        make_segment(s);
      end
      seg_valid = 0;
      // gaps only between segments: a segment is sent without interruption
      if (link_q.size() > 0 && !(link_is_seg_start() && ($urandom % 3 == 0))) begin
        seg_valid = 1;
        seg_data = link_q.pop_front();
        in_seg_bytes--;
      end
    end
    // flush the remaining partial packets: send the rest of every source
    for (int s = 0; s < N; s++) begin
      while (src_q[s].size() > 0) begin
        make_segment(s);
        while (link_q.size() > 0) begin
          @(negedge clk);
          seg_valid = 1; seg_data = link_q.pop_front(); in_seg_bytes--;
        end
      end
    end
    @(negedge clk);
    seg_valid = 0;
    repeat (3000) @(posedge clk);
    checks += 4;
    for (int s = 0; s < N; s++) if (exp_pkts[s].size() != 0) fail($sformatf("source %0d: %0d packets missing", s, exp_pkts[s].size()));

    $display("packets in %0d out %0d early %0d multi-segment %0d multipacket-segments %0d",
             n_pkts_in, n_pkts_out, n_early, n_multiseg, n_multipkt);
    if (n_early == 0) fail("no cut-through release");
    if (n_multipkt == 0) fail("no multipacket segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bytes left of the segment being sent; -1 means between segments
  int in_seg_bytes = 0;
  function automatic bit link_is_seg_start();
    if (in_seg_bytes <= 0) begin
      in_seg_bytes = 4 + {link_q[2], link_q[3]};
      return 1;
    end
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_ready_early) n_early++;
    if (overflow && !ovf_seen) begin ovf_seen = 1; fail("overflow"); end
    if (pkt_valid) begin
      if (pkt_sop) begin
        checks++;
        if (cur.size() != 0) fail("sop inside packet");
        cur = {};
      end
      cur.push_back(pkt_data);
      if (pkt_eop) begin
        int s;
        s = cur[0];
        checks++;
        if (s >= N || exp_pkts[s].size() == 0) fail("unexpected packet");
        else begin
          byte unsigned e [$];
          e = exp_pkts[s].pop_front();
          if (e != cur) fail($sformatf("packet mismatch src %0d seq %0d len %0d/%0d", s, cur[1], cur.size(), e.size()));
        end
        n_pkts_out++;
        cur = {};
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
