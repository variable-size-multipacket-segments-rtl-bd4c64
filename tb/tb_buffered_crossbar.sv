// tb_buffered_crossbar -- a 4x4 buffered crossbar driven by ingress models.
//
// Each input sends segments of 40..128 bytes to random outputs, one byte
// per clock, keeping per-output credit counters (XP_BUF bytes at start,
// one back per credit_ret pulse) so that it never sends more than a
// crosspoint can hold. Each output stream is parsed: the header must name
// the source input with a zero reserved byte, the length must be that of
// the oldest unsent segment from that input to that output, and the
// payload must match byte for byte. Counted, and required: output
// contention (an output choosing among several inputs), cut-through (a
// segment's header leaving before its last byte arrived), credit stalls
// (an input waiting for credit). The total number of bytes out must equal
// the number in.
module tb_buffered_crossbar;
  localparam int N = 4, XB = 128, MIN = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, out_valid, ev_contend;
  logic [7:0] in_data [N];
  logic [7:0] out_data [N];
  logic [N-1:0] credit_ret [N];

  buffered_crossbar #(.N(N), .XP_BUF(XB), .MIN_SEG(MIN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned xb [N][N][$];   // expected payload bytes per (input, output)
  int xl [N][N][$];             // expected segment lengths
  int xdone [N][N][$];          // cycle the segment's last byte entered
  int credit [N][N];
  // input side state
  int i_left [N], i_hpos [N], i_dst [N], i_len [N];
  // output side state
  int o_hpos [N], o_src [N], o_len [N], o_left [N];
  byte unsigned o_hb [N][4];
  int n_contend = 0, n_cut = 0, n_stall = 0, bytes_in = 0, bytes_out = 0, segs = 0;
  int cyc = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL cyc=%0d %s", cyc, m);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_data[i] = 0; i_left[i] = 0; i_hpos[i] = 0;
      o_hpos[i] = 0; o_left[i] = 0;
      for (int j = 0; j < N; j++) credit[i][j] = XB;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40000; t++) begin
      @(negedge clk);
      cyc = t;
      // ---- outputs of this cycle
      for (int j = 0; j < N; j++) if (out_valid[j]) begin
        if (o_left[j] == 0) begin
          o_hb[j][o_hpos[j]] = out_data[j];
          o_hpos[j]++;
          if (o_hpos[j] == 4) begin
            o_hpos[j] = 0;
            o_src[j] = o_hb[j][0];
            o_len[j] = {o_hb[j][2], o_hb[j][3]};
            checks += 2;
            if (o_hb[j][1] != 0 || o_src[j] >= N) fail("bad header");
            else if (xl[o_src[j]][j].size() == 0) fail("segment from nowhere");
            else begin
              int l;
              l = xl[o_src[j]][j].pop_front();
              if (l != o_len[j]) fail($sformatf("len %0d exp %0d", o_len[j], l));
              if (xdone[o_src[j]][j].size() == 0) n_cut++;   // last byte not in yet
              else void'(xdone[o_src[j]][j].pop_front());
            end
            o_left[j] = o_len[j];
            segs++;
          end
        end else begin
          byte unsigned e;
          e = xb[o_src[j]][j].pop_front();
          checks++;
          if (out_data[j] != e) fail($sformatf("out %0d data %h exp %h", j, out_data[j], e));
          o_left[j]--;
          bytes_out++;
        end
      end
      // ---- credits
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (credit_ret[i][j]) credit[i][j]++;
      // ---- inputs
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 0;
        if (i_left[i] > 0) begin
          in_valid[i] = 1;
          in_data[i] = 8'($urandom);
          xb[i][i_dst[i]].push_back(in_data[i]);
          i_left[i]--;
          bytes_in++;
          if (i_left[i] == 0) xdone[i][i_dst[i]].push_back(t);
        end else if (i_hpos[i] > 0) begin
          in_valid[i] = 1;
          case (i_hpos[i])
            1: in_data[i] = 0;
            2: in_data[i] = 8'(i_len[i] >> 8);
            default: in_data[i] = 8'(i_len[i]);
          endcase
          i_hpos[i] = (i_hpos[i] == 3) ? 0 : i_hpos[i] + 1;
          if (i_hpos[i] == 0) i_left[i] = i_len[i];
        end else if (t < 36000 && ($urandom % 3 == 0)) begin
          int d, l;
          // inputs 0..2 favour output 0 in some phases to create contention
          d = ((t / 3000) % 2 == 0) ? $urandom % N : ((i < 3) ? 0 : $urandom % N);
          l = MIN + $urandom % (XB - MIN + 1);
          if (credit[i][d] >= l) begin
            credit[i][d] -= l;
            i_dst[i] = d; i_len[i] = l;
            xl[i][d].push_back(l);
            in_valid[i] = 1; in_data[i] = 8'(d);
            i_hpos[i] = 1;
          end else n_stall++;
        end
      end
      #1;
      for (int j = 0; j < N; j++) if (ev_contend[j]) n_contend++;
    end
    checks += 5;
    $display("segments %0d bytes in %0d out %0d contention %0d cut-through %0d credit-stall %0d",
             segs, bytes_in, bytes_out, n_contend, n_cut, n_stall);
    if (bytes_in != bytes_out) fail("bytes lost");
    if (n_contend == 0) fail("no contention");
    if (n_cut == 0) fail("no cut-through");
    if (n_stall == 0) fail("no credit stall");
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (credit[i][j] != XB) fail("credit not fully returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
