// tb_cicq_switch_full -- the switch at its default size (32 ports,
// 512-byte segments and crosspoint buffers, 1500-byte packets) through one
// complete operation: every input sends a burst of packets of the three
// sizes of the reference traffic mix (40, 576 and 1500 bytes) to several
// outputs, including a hot output that all inputs share. Every packet must
// leave the right output intact and in order per source; no reassembly
// region may overflow. Also required: at least one maximum-size (512 B)
// segment, one multi-segment packet released by cut-through, and output
// contention.
module tb_cicq_switch_full;
  localparam int N = 32, QW = 5, DAW = 17, LAT = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_sop, in_eop, in_ready;
  logic [7:0] in_data [N];
  logic [QW-1:0] in_dest [N];
  logic [N-1:0] dram_wr_en, dram_rd_en;
  logic [DAW-1:0] dram_wr_addr [N], dram_rd_addr [N];
  logic [7:0] dram_wr_data [N], dram_rd_data [N];
  logic [N-1:0] out_valid, out_sop, out_eop, reasm_overflow;
  logic [7:0] out_data [N];

  cicq_switch dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_dram
    dram_model #(.DAW(DAW), .LAT(LAT)) u_dram (
      .clk, .wr_en(dram_wr_en[i]), .wr_addr(dram_wr_addr[i]), .wr_data(dram_wr_data[i]),
      .rd_en(dram_rd_en[i]), .rd_addr(dram_rd_addr[i]), .rd_data(dram_rd_data[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned exp_pkts [N][N][$][$];
  byte unsigned cur [N][$];
  byte unsigned plist [N][$][$];   // packets to send per input
  int pdest [N][$];
  int pk_i [N];
  int seqno [N][N];
  int n_in = 0, n_out = 0, n_early = 0, n_cont = 0, n_max = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  task automatic add_packet(int i, int d, int len);
    byte unsigned p [$];
    p.push_back(8'(i)); p.push_back(8'(seqno[i][d]++));
    p.push_back(8'(len >> 8)); p.push_back(8'(len));
    for (int k = 4; k < len; k++) p.push_back(8'($urandom));
    plist[i].push_back(p);
    pdest[i].push_back(d);
    exp_pkts[d][i].push_back(p);
    n_in++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0; in_data[i] = 0; in_dest[i] = 0; pk_i[i] = 0;
      add_packet(i, (i + 1) % N, 1500);
      add_packet(i, (i + 1) % N, 40);
      add_packet(i, 7, 576);
      add_packet(i, (i + 1) % N, 576);
      add_packet(i, 7, 40);
      add_packet(i, (i + 9) % N, 1500);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 90000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0;
        if (plist[i].size() > 0) begin
          in_valid[i] = 1;
          in_sop[i] = (pk_i[i] == 0);
          in_eop[i] = (pk_i[i] == plist[i][0].size() - 1);
          in_data[i] = plist[i][0][pk_i[i]];
          in_dest[i] = QW'(pdest[i][0]);
        end
      end
      #1;
      for (int i = 0; i < N; i++)
        if (in_valid[i] && in_ready[i]) begin
          pk_i[i]++;
          if (pk_i[i] == plist[i][0].size()) begin
            void'(plist[i].pop_front()); void'(pdest[i].pop_front()); pk_i[i] = 0;
          end
        end
      if (n_out == n_in) break;
    end
    repeat (10) @(posedge clk);
    checks += 2;
    for (int j = 0; j < N; j++) for (int i = 0; i < N; i++)
      if (exp_pkts[j][i].size() != 0) fail($sformatf("%0d packets %0d->%0d missing", exp_pkts[j][i].size(), i, j));
    if (reasm_overflow != 0) fail("reassembly overflow");
    $display("packets in %0d out %0d early-release %0d contention %0d max-size segments %0d",
             n_in, n_out, n_early, n_cont, n_max);
    checks += 4;
    if (n_in != n_out) fail("packet count");
    if (n_early == 0) fail("no cut-through release");
    if (n_cont == 0) fail("no contention");
    if (n_max == 0) fail("no maximum-size segment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_early += $countones(dut.ev_early);
    n_cont  += $countones(dut.ev_contend);
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

  // count maximum-size segments on the crossbar output links
  int hpos [N], seg_left [N];
  byte unsigned hb [N][4];
  initial for (int j = 0; j < N; j++) begin hpos[j] = 0; seg_left[j] = 0; end
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (dut.xo_valid[j]) begin
      if (seg_left[j] == 0) begin
        hb[j][hpos[j]] = dut.xo_data[j];
        hpos[j]++;
        if (hpos[j] == 4) begin
          hpos[j] = 0;
          seg_left[j] = {hb[j][2], hb[j][3]};
          if (seg_left[j] == 512) n_max++;
        end
      end else seg_left[j]--;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
