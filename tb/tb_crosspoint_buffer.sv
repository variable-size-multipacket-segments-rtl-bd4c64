// tb_crosspoint_buffer -- segments written and read through one crosspoint
// buffer. Segments of random length are written byte by byte while a reader
// pops descriptors and bytes whenever it can, never beyond what credit
// allows (the writer only starts a segment that fits in the free space).
// Read bytes are compared with a reference byte queue, descriptor lengths
// with a reference length queue, and occupancy with a reference count.
module tb_crosspoint_buffer;
  localparam int DEPTH = 64, DD = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, desc_push, rd_en, desc_pop, desc_valid;
  logic [7:0] wr_data, rd_data;
  logic [15:0] desc_len_in, desc_len;
  logic [6:0] occ;
  int checks = 0, failures = 0;
  byte unsigned bq[$];
  int lq[$];
  int credit = DEPTH, in_flight = 0;
  int w_left = 0, r_left = 0, descs = 0;
  bit rd_pend = 0;
  byte unsigned rd_exp;
  int occ_ref = 0, full_seen = 0;

  crosspoint_buffer #(.DEPTH(DEPTH), .DESC_DEPTH(DD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    wr_en = 0; desc_push = 0; rd_en = 0; desc_pop = 0; wr_data = 0; desc_len_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // check read data of the previous cycle
      if (rd_pend) begin
        checks++;
        if (rd_data != rd_exp) begin failures++; $display("FAIL data t=%0d %h exp %h", t, rd_data, rd_exp); end
      end
      checks++;
      if (int'(occ) != occ_ref) begin failures++; $display("FAIL occ t=%0d %0d exp %0d", t, occ, occ_ref); end
      if (occ_ref == DEPTH) full_seen++;
      wr_en = 0; desc_push = 0; rd_en = 0; desc_pop = 0; rd_pend = 0;
      // writer
      if (w_left == 0 && descs < DD && ($urandom % 3 == 0)) begin
        int l;
        l = 1 + $urandom % 40;
        if (l > credit && credit > 0) l = credit;
        if (l <= credit) begin
          credit -= l; w_left = l; desc_push = 1; desc_len_in = 16'(l); lq.push_back(l); descs++;
        end
      end else if (w_left > 0) begin
        wr_en = 1; wr_data = 8'($urandom); bq.push_back(wr_data); w_left--; occ_ref++;
      end
      // reader
      if ((t / 500) % 2 == 1 && r_left == 0 && desc_valid && ($urandom % 2 == 0) && occ_ref - (wr_en ? 1 : 0) > 0) begin
        checks++;
        if (int'(desc_len) != lq[0]) begin failures++; $display("FAIL desc %0d exp %0d", desc_len, lq[0]); end
        r_left = lq.pop_front(); desc_pop = 1; descs--;
      end else if ((t / 500) % 2 == 1 && r_left > 0 && occ_ref - (wr_en ? 1 : 0) > 0) begin
        rd_en = 1; rd_pend = 1; rd_exp = bq.pop_front(); r_left--; occ_ref--; credit++;
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffer never filled"); end
    $display("full cycles %0d", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
