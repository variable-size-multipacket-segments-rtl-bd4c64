// tb_cicq_switch -- end-to-end test of the switch at reduced size: 4 ports,
// 128-byte maximum segments and crosspoint buffers, 12 SRAM and 24 DRAM
// blocks per ingress, packets up to 600 bytes.
//
// Every input sends packets of 40..600 bytes (byte 0 = source, byte 1 =
// sequence number, bytes 2..3 = length). Traffic alternates between
// uniform destinations and phases where all inputs send to output 0, so
// that queues grow, move to DRAM, and outputs see contention. Every packet
// leaving an output must be the next one expected from its source to that
// output, byte for byte. At the end all packets must have arrived and no
// reassembly region may have overflowed. Each mechanism of the design is
// counted and must occur at least once: segments, maximum-size segments,
// segments smaller than the maximum, credit stalls, migrations to DRAM,
// reads straight from DRAM, cut-through release at the egress, output
// contention.
module tb_cicq_switch;
  localparam int N = 4, MAXSEG = 128, MIN = 40, XB = 128, SB = 12, DB = 24, LAT = 4, MAXPKT = 600;
  localparam int QW = 2;
  localparam int DAW = $clog2(DB * MAXSEG);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_sop, in_eop, in_ready;
  logic [7:0] in_data [N];
  logic [QW-1:0] in_dest [N];
  logic [N-1:0] dram_wr_en, dram_rd_en;
  logic [DAW-1:0] dram_wr_addr [N], dram_rd_addr [N];
  logic [7:0] dram_wr_data [N], dram_rd_data [N];
  logic [N-1:0] out_valid, out_sop, out_eop, reasm_overflow;
  logic [7:0] out_data [N];

  cicq_switch #(.N(N), .MAX_SEG(MAXSEG), .MIN_SEG(MIN), .XP_BUF(XB), .SRAM_BLKS(SB),
                .DRAM_BLKS(DB), .TAIL_SRAM(2), .RD_LAT(LAT), .MAX_PKT(MAXPKT)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_dram
    dram_model #(.DAW(DAW), .LAT(LAT)) u_dram (
      .clk, .wr_en(dram_wr_en[i]), .wr_addr(dram_wr_addr[i]), .wr_data(dram_wr_data[i]),
      .rd_en(dram_rd_en[i]), .rd_addr(dram_rd_addr[i]), .rd_data(dram_rd_data[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned exp_pkts [N][N][$][$];   // [output][source] packets
  byte unsigned cur [N][$];
  byte unsigned pk [N][$];               // packet being sent per input
  int pk_i [N], pk_d [N];
  int seqno [N][N];
  int n_in = 0, n_out = 0;
  int n_seg = 0, n_max = 0, n_small = 0, n_stall = 0, n_mig = 0, n_dram = 0, n_early = 0, n_cont = 0;
  int hpos [N];
  byte unsigned hb [N][4];
  int seg_left [N];

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  task automatic new_packet(int i, int d);
    int len;
    len = 40 + $urandom % (MAXPKT - 40 + 1);
    pk[i] = {};
    pk[i].push_back(8'(i)); pk[i].push_back(8'(seqno[i][d]++));
    pk[i].push_back(8'(len >> 8)); pk[i].push_back(8'(len));
    for (int k = 4; k < len; k++) pk[i].push_back(8'($urandom));
    pk_i[i] = 0; pk_d[i] = d;
    exp_pkts[d][i].push_back(pk[i]);
    n_in++;
  endtask

  initial begin
    int phase;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0; in_data[i] = 0; in_dest[i] = 0;
      pk_i[i] = 0; hpos[i] = 0; seg_left[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60000; t++) begin
      @(negedge clk);
      phase = (t / 5000) % 2;     // 0: uniform, 1: all to output 0
      for (int i = 0; i < N; i++) begin
        if (pk[i].size() == 0 && t < 54000 && ($urandom % ((phase == 1) ? 2 : 6) == 0))
          new_packet(i, (phase == 1) ? 0 : $urandom % N);
        in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0;
        if (pk[i].size() > 0) begin
          in_valid[i] = 1;
          in_sop[i] = (pk_i[i] == 0);
          in_eop[i] = (pk_i[i] == pk[i].size() - 1);
          in_data[i] = pk[i][pk_i[i]];
          in_dest[i] = QW'(pk_d[i]);
        end
      end
      #1;
      for (int i = 0; i < N; i++)
        if (in_valid[i] && in_ready[i]) begin
          pk_i[i]++;
          if (pk_i[i] == pk[i].size()) pk[i] = {};
        end
    end
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    repeat (20000) @(posedge clk);
    checks += 3;
    for (int j = 0; j < N; j++) for (int i = 0; i < N; i++)
      if (exp_pkts[j][i].size() != 0) fail($sformatf("%0d packets %0d->%0d missing", exp_pkts[j][i].size(), i, j));
    if (reasm_overflow != 0) fail("reassembly overflow");
    $display("packets in %0d out %0d", n_in, n_out);
    $display("segments %0d max-size %0d smaller %0d credit-stall %0d migrations %0d dram-reads %0d early-release %0d contention %0d",
             n_seg, n_max, n_small, n_stall, n_mig, n_dram, n_early, n_cont);
    if (n_in != n_out) fail("packet count");
    checks += 8;
    if (n_seg == 0)   fail("no segment");
    if (n_max == 0)   fail("no maximum-size segment");
    if (n_small == 0) fail("no smaller segment");
    if (n_stall == 0) fail("no credit stall");
    if (n_mig == 0)   fail("no migration");
    if (n_dram == 0)  fail("no DRAM read");
    if (n_early == 0) fail("no cut-through release");
    if (n_cont == 0)  fail("no output contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters and link header parsing (internal links of the top)
  always @(posedge clk) if (rst_n) begin
    n_seg   += $countones(dut.ev_seg);
    n_stall += $countones(dut.ev_stall);
    n_mig   += $countones(dut.ev_mig);
    n_dram  += $countones(dut.ev_dram);
    n_early += $countones(dut.ev_early);
    n_cont  += $countones(dut.ev_contend);
    for (int i = 0; i < N; i++) if (dut.link_valid[i]) begin
      if (seg_left[i] == 0) begin
        hb[i][hpos[i]] = dut.link_data[i];
        hpos[i]++;
        if (hpos[i] == 4) begin
          int l;
          hpos[i] = 0;
          l = {hb[i][2], hb[i][3]};
          checks++;
          if (l > MAXSEG || l == 0) fail("segment size out of range");
          if (l == MAXSEG) n_max++; else n_small++;
          seg_left[i] = l;
        end
      end else seg_left[i]--;
    end
  end

  // egress checker
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (out_valid[j]) begin
      if (out_sop[j]) cur[j] = {};
      cur[j].push_back(out_data[j]);
      if (out_eop[j]) begin
        int s;
        s = cur[j][0];
        checks++;
        if (s >= N || exp_pkts[j][s].size() == 0) fail($sformatf("unexpected packet at output %0d", j));
        else begin
          byte unsigned e [$];
          e = exp_pkts[j][s].pop_front();
          if (e != cur[j]) fail($sformatf("packet mismatch %0d->%0d seq %0d", s, j, cur[j][1]));
        end
        n_out++;
      end
    end
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
