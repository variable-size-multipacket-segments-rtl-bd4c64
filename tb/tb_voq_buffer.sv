// tb_voq_buffer -- random packets into small VOQs, segments read out, all
// bytes compared with a reference model.
//
// Small sizes (4 queues, 64-byte blocks, 12 SRAM and 16 DRAM blocks) make
// blocks fill, migrate to DRAM and be read back from DRAM within a short
// run. The reader alternates between slow and fast phases so that queues
// grow long (migration) and drain (blocks freed). Checked: every byte
// read equals the reference queue content in order; the backlog outputs
// equal the reference count of complete-packet bytes; each segment's data
// starts exactly RD_LAT clocks after rd_start and has no gaps. Counted, and
// required to happen: migrations, reads from DRAM, in_ready back-pressure,
// queues drained to empty.
module tb_voq_buffer;
  localparam int NQ = 4, BLK = 64, SB = 12, DB = 16, TS = 2, LAT = 4;
  localparam int DAW = $clog2(DB * BLK);
  localparam int BW = $clog2((SB + DB) * BLK + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sop, in_eop, in_ready;
  logic [7:0] in_data;
  logic [1:0] in_q;
  logic [BW-1:0] backlog [NQ];
  logic [NQ-1:0] q_lock, mig_hold;
  logic rd_start, rd_busy, out_valid;
  logic [1:0] rd_q;
  logic [15:0] rd_len;
  logic [7:0] out_data;
  logic dram_wr_en, dram_rd_en;
  logic [DAW-1:0] dram_wr_addr, dram_rd_addr;
  logic [7:0] dram_wr_data, dram_rd_data;
  logic ev_migrate, ev_dram_read;

  voq_buffer #(.NQ(NQ), .BLK(BLK), .SRAM_BLKS(SB), .DRAM_BLKS(DB), .TAIL_SRAM(TS),
               .RD_LAT(LAT)) dut (.*);
  dram_model #(.DAW(DAW), .LAT(LAT)) u_dram (
    .clk, .wr_en(dram_wr_en), .wr_addr(dram_wr_addr), .wr_data(dram_wr_data),
    .rd_en(dram_rd_en), .rd_addr(dram_rd_addr), .rd_data(dram_rd_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned qbytes [NQ][$];   // all accepted bytes per queue
  int committed [NQ];             // complete-packet bytes not yet read
  byte unsigned exp_out [$];
  int n_mig = 0, n_dram = 0, n_bp = 0, n_empty = 0, n_seg = 0;
  int cyc = 0;
  int start_cyc [$];
  int len_q [$];
  int pkt_left = 0, pkt_q = 0, pkt_len = 0;
  int seg_out_left = 0, last_out_cyc = 0;

  // writer: random packets, 40..150 bytes, random gaps
  task automatic drive_writer();
    in_valid = 0; in_sop = 0; in_eop = 0;
    if (pkt_left == 0 && ($urandom % 4 == 0)) begin
      pkt_q = $urandom % NQ;
      pkt_len = 40 + $urandom % 111;
      pkt_left = pkt_len;
    end
    if (pkt_left > 0 && ($urandom % 8 != 0)) begin
      in_valid = 1;
      in_sop = (pkt_left == pkt_len);
      in_eop = (pkt_left == 1);
      in_q = 2'(pkt_q);
      in_data = 8'($urandom);
    end
  endtask

  initial begin
    int phase;
    in_valid = 0; in_sop = 0; in_eop = 0; in_q = 0; in_data = 0;
    rd_start = 0; rd_q = 0; rd_len = 0; mig_hold = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60000; t++) begin
      @(negedge clk);
      phase = (t / 3000) % 3;   // 0: slow reader, 1,2: fast reader
      // compare backlog with the model
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (int'(backlog[q]) != committed[q]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d backlog[%0d]=%0d exp %0d", t, q, backlog[q], committed[q]);
        end
      end
      if (t > 55000) pkt_left = (pkt_left == pkt_len) ? 0 : pkt_left;   // stop new packets near the end
      drive_writer();
      if (t > 55000 && in_sop) in_valid = 0;
      // reader
      rd_start = 0;
      if (!rd_busy && (phase != 0 || ($urandom % 40 == 0))) begin
        int q0;
        q0 = $urandom % NQ;
        for (int k = 0; k < NQ; k++) begin
          int q;
          q = (q0 + k) % NQ;
          if (!rd_start && committed[q] > 0 && !q_lock[q]) begin
            int l;
            l = 1 + $urandom % BLK;
            if (l > committed[q]) l = committed[q];
            rd_start = 1; rd_q = 2'(q); rd_len = 16'(l);
          end
        end
      end
      #1;
      if (in_valid && !in_ready) n_bp++;
      if (in_valid && in_ready) begin
        qbytes[in_q].push_back(in_data);
        pkt_left--;
        if (in_eop) committed[in_q] += pkt_len;
      end
      if (rd_start) begin
        for (int k = 0; k < int'(rd_len); k++) exp_out.push_back(qbytes[rd_q].pop_front());
        committed[rd_q] -= int'(rd_len);
        start_cyc.push_back(cyc);
        len_q.push_back(int'(rd_len));
        n_seg++;
        if (qbytes[rd_q].size() == 0) n_empty++;
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_out.size() != 0) begin failures++; $display("FAIL %0d bytes never came out", exp_out.size()); end
    $display("segments %0d migrations %0d dram_reads %0d backpressure %0d drained %0d",
             n_seg, n_mig, n_dram, n_bp, n_empty);
    checks += 4;
    if (n_mig == 0)   begin failures++; $display("FAIL no migration"); end
    if (n_dram == 0)  begin failures++; $display("FAIL no DRAM read"); end
    if (n_bp == 0)    begin failures++; $display("FAIL no back-pressure"); end
    if (n_empty == 0) begin failures++; $display("FAIL queue never drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ev_migrate) n_mig++;
      if (ev_dram_read) n_dram++;
      if (out_valid) begin
        checks++;
        if (exp_out.size() == 0) begin
          failures++; $display("FAIL unexpected output byte");
        end else begin
          byte unsigned e;
          e = exp_out.pop_front();
          if (out_data != e) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d out %h exp %h", cyc, out_data, e);
          end
        end
        if (seg_out_left == 0) begin
          // first byte of a segment: latency check
          int s0;
          s0 = start_cyc.pop_front();
          checks++;
          if (cyc - s0 != LAT) begin failures++; $display("FAIL latency %0d", cyc - s0); end
          seg_out_left = len_q.pop_front();
        end else begin
          checks++;
          if (cyc != last_out_cyc + 1) begin failures++; $display("FAIL gap in segment"); end
        end
        last_out_cyc = cyc;
        seg_out_left--;
      end
    end
  end


  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
