// tb_cicq_workloads -- the switch under the traffic models of its
// evaluation, at 4 ports with every other parameter at its default
// (512-byte segments and crosspoint buffers, 40-byte minimum segments,
// 1500-byte maximum packets).
//
// Five phases of traffic, each followed by at least 12000 clocks without
// input, and then until every packet has left:
//   0  MinPkt, load 0.3, 30000 clocks     3  Synthetic1500Max, load 0.3, 30000
//   1  MinPkt, load 0.9, 30000 clocks     4  Synthetic1500Max, load 0.9, 30000
//   2  MinPkt, load 1.0, 300000 clocks (every input sends back to back)
// MinPkt is 40-byte packets; Synthetic1500Max is 64 % 40-byte, 9 % 552-byte,
// 9 % 576-byte and 18 % 1500-byte packets. Destinations are uniform and
// gaps between packets exponential with a mean that gives the load (the
// application-level bursts of the original Synthetic1500Max mix are not
// reproduced). Every packet must leave its output intact and in order per
// input/output pair; no reassembly region may overflow.
//
// What is checked about segment sizes follows from the segmentation rule:
//   * at load 0.3 queues are short, so most segments carry a single packet:
//     the mean MinPkt segment payload must stay below two packets (80 B);
//   * at load 1.0 an input receives more than its link can carry once the
//     4-byte header and the gap between segments are added, so its queues
//     grow and segments lengthen: the mean segment of the last quarter of
//     phase 2 must exceed that of the first quarter and be at least 200 B,
//     which keeps the header overhead below 2 %;
//   * segments grow with load: the mean segment of phase 1 must exceed that
//     of phase 0, and the mean of phase 4 that of phase 3.
// Per phase the mean segment payload, the mean packet delay (first byte in
// to first byte out) and the bytes still inside the switch when the load
// stops are printed; for the saturation phase also the segment sizes per
// quarter.
module tb_cicq_workloads;
  localparam int N = 4, MAXSEG = 512, LAT = 4, DB = 256;
  localparam int QW = 2;
  localparam int DAW = $clog2(DB * MAXSEG);
  localparam int PHASES = 5, RUN = 30000, SAT_RUN = 300000, DRAIN = 12000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_sop, in_eop, in_ready;
  logic [7:0] in_data [N];
  logic [QW-1:0] in_dest [N];
  logic [N-1:0] dram_wr_en, dram_rd_en;
  logic [DAW-1:0] dram_wr_addr [N], dram_rd_addr [N];
  logic [7:0] dram_wr_data [N], dram_rd_data [N];
  logic [N-1:0] out_valid, out_sop, out_eop, reasm_overflow;
  logic [7:0] out_data [N];

  cicq_switch #(.N(N)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_dram
    dram_model #(.DAW(DAW), .LAT(LAT)) u_dram (
      .clk, .wr_en(dram_wr_en[i]), .wr_addr(dram_wr_addr[i]), .wr_data(dram_wr_data[i]),
      .rd_en(dram_rd_en[i]), .rd_addr(dram_rd_addr[i]), .rd_data(dram_rd_data[i]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned exp_pkts [N][N][$][$];   // [output][source] packets
  longint       exp_time [N][N][$];      // clock of their first byte
  byte unsigned cur [N][$];
  byte unsigned pk [N][$];
  int pk_i [N], pk_d [N], gap [N];
  int seqno [N][N];
  int n_in = 0, n_out = 0;
  longint cyc = 0;
  longint bytes_in = 0, bytes_out = 0;
  int phase = 0;
  bit measuring = 0;
  int run, quarter = 0;
  // per-phase statistics
  longint seg_cnt [PHASES], seg_bytes [PHASES], dly_sum [PHASES], dly_cnt [PHASES];
  longint q_cnt [5], q_bytes [5], q_max [5];   // saturation quarters 1..4
  longint out_first [N];
  int hpos [N];
  byte unsigned hb [N][4];
  int seg_left [N];

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  function automatic int pkt_len(int ph);
    int r;
    if (ph <= 2) return 40;
    r = $urandom % 100;
    if (r < 64) return 40;
    if (r < 73) return 552;
    if (r < 82) return 576;
    return 1500;
  endfunction

  function automatic real load_of(int ph);
    case (ph)
      0, 3: return 0.3;
      1, 4: return 0.9;
      default: return 1.0;
    endcase
  endfunction

  // exponential idle gap after a packet of len bytes, mean len*(1-L)/L
  function automatic int draw_gap(int len, real l);
    real u;
    if (l >= 1.0) return 0;
    u = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return int'(-$ln(u) * real'(len) * (1.0 - l) / l);
  endfunction

  task automatic new_packet(int i, int ph);
    int len, d;
    len = pkt_len(ph);
    d = $urandom % N;
    pk[i] = {};
    pk[i].push_back(8'(i)); pk[i].push_back(8'(seqno[i][d]++));
    pk[i].push_back(8'(len >> 8)); pk[i].push_back(8'(len));
    for (int k = 4; k < len; k++) pk[i].push_back(8'($urandom));
    pk_i[i] = 0; pk_d[i] = d;
    exp_pkts[d][i].push_back(pk[i]);
    exp_time[d][i].push_back(-1);
    gap[i] = draw_gap(len, load_of(ph));
    n_in++;
    bytes_in += len;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0; in_data[i] = 0; in_dest[i] = 0;
      pk_i[i] = 0; gap[i] = 0; hpos[i] = 0; seg_left[i] = 0;
    end
    for (int p = 0; p < PHASES; p++) begin
      seg_cnt[p] = 0; seg_bytes[p] = 0; dly_sum[p] = 0; dly_cnt[p] = 0;
    end
    for (int k = 0; k < 5; k++) begin q_cnt[k] = 0; q_bytes[k] = 0; q_max[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < PHASES; p++) begin
      phase = p;
      measuring = 1;
      run = (p == 2) ? SAT_RUN : RUN;
      for (int t = 0; t < run + DRAIN; t++) begin
        @(negedge clk);
        if (t == run) begin
          measuring = 0;
          $display("phase %0d: %0d bytes inside the switch at the end of the load", p, bytes_in - bytes_out);
        end
        quarter = (p == 2 && t < run) ? 1 + t / (run / 4) : 0;
        for (int i = 0; i < N; i++) begin
          if (pk[i].size() == 0 && t < run) begin
            if (gap[i] > 0) gap[i]--;
            else new_packet(i, p);
          end
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
            if (pk_i[i] == 0) exp_time[pk_d[i]][i][exp_time[pk_d[i]][i].size() - 1] = cyc;
            pk_i[i]++;
            if (pk_i[i] == pk[i].size()) pk[i] = {};
          end
      end
      // drain on until the switch is empty
      while (bytes_out != bytes_in) @(negedge clk);
    end

    checks += 2;
    for (int j = 0; j < N; j++) for (int i = 0; i < N; i++)
      if (exp_pkts[j][i].size() != 0) fail($sformatf("%0d packets %0d->%0d missing", exp_pkts[j][i].size(), i, j));
    if (reasm_overflow != 0) fail("reassembly overflow");
    $display("packets in %0d out %0d", n_in, n_out);
    for (int p = 0; p < PHASES; p++)
      $display("phase %0d (%s load %.1f): segments %0d mean payload %0d B, packets %0d mean delay %0d clocks",
               p, (p <= 2) ? "MinPkt" : "Synthetic1500Max", load_of(p), seg_cnt[p],
               (seg_cnt[p] == 0) ? 0 : seg_bytes[p] / seg_cnt[p], dly_cnt[p],
               (dly_cnt[p] == 0) ? 0 : dly_sum[p] / dly_cnt[p]);
    for (int k = 1; k <= 4; k++)
      $display("saturation quarter %0d: %0d segments, mean payload %0d B, %0d at the maximum",
               k, q_cnt[k], (q_cnt[k] == 0) ? 0 : q_bytes[k] / q_cnt[k], q_max[k]);
    if (n_in != n_out) fail("packet count");
    checks += 4;
    if (seg_bytes[0] >= 80 * seg_cnt[0]) fail("light MinPkt load: segments not mostly single packets");
    checks++;
    if (q_cnt[1] == 0 || q_cnt[4] == 0 || q_bytes[4] * q_cnt[1] <= q_bytes[1] * q_cnt[4])
      fail("saturation: segments did not grow");
    if (q_cnt[4] == 0 || q_bytes[4] < 200 * q_cnt[4]) fail("saturation: mean segment below 200 bytes");
    if (seg_bytes[1] * seg_cnt[0] <= seg_bytes[0] * seg_cnt[1]) fail("MinPkt: segments did not grow with load");
    if (seg_bytes[4] * seg_cnt[3] <= seg_bytes[3] * seg_cnt[4]) fail("Synthetic1500Max: segments did not grow with load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc++;

  // segment sizes on the ingress links
  always @(posedge clk) if (rst_n) begin
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
          if (measuring) begin
            seg_cnt[phase]++;
            seg_bytes[phase] += l;
          end
          q_cnt[quarter]++;
          q_bytes[quarter] += l;
          if (l == MAXSEG) q_max[quarter]++;
          seg_left[i] = l;
        end
      end else seg_left[i]--;
    end
  end

  // egress checker
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (out_valid[j]) begin
      if (out_sop[j]) begin
        cur[j] = {};
        out_first[j] = cyc;
      end
      cur[j].push_back(out_data[j]);
      if (out_eop[j]) begin
        int s;
        s = cur[j][0];
        checks++;
        if (s >= N || exp_pkts[j][s].size() == 0) fail($sformatf("unexpected packet at output %0d", j));
        else begin
          byte unsigned e [$];
          longint t0;
          e = exp_pkts[j][s].pop_front();
          t0 = exp_time[j][s].pop_front();
          if (e != cur[j]) fail($sformatf("packet mismatch %0d->%0d seq %0d", s, j, cur[j][1]));
          dly_sum[phase] += out_first[j] - t0;
          dly_cnt[phase]++;
        end
        n_out++;
        bytes_out += cur[j].size();
      end
    end
  end

  initial begin
    repeat ((PHASES - 1) * RUN + SAT_RUN + PHASES * DRAIN + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
