// tb_seg_size_calc -- exhaustive check of the segment size rule.
// Every backlog from 0 to 4*MAX_SEG is applied; the expected size is
// computed here from the rule (full block while at least MAX+MIN bytes
// wait, leave exactly MIN behind between MAX and MAX+MIN, else take all),
// and the worked examples of the design (280 B with 256 B maximum gives
// 240 + 40; 580 B gives 256 + 256 + 68) are checked as sequences.
module tb_seg_size_calc;
  localparam int MAX = 256, MIN = 40;
  logic [19:0] backlog;
  logic [15:0] seg_len;
  int checks = 0, failures = 0;

  seg_size_calc #(.MAX_SEG(MAX), .MIN_SEG(MIN), .BW(20)) dut (.backlog, .seg_len);

  function automatic int ref_len(int b);
    if (b >= MAX + MIN) return MAX;
    if (b > MAX) return b - MIN;
    return b;
  endfunction

  task automatic check_seq(int total, int exp[$]);
    int b = total;
    foreach (exp[k]) begin
      backlog = 20'(b);
      #1;
      checks++;
      if (int'(seg_len) != exp[k]) begin
        failures++;
        $display("FAIL seq %0d step %0d: got %0d exp %0d", total, k, seg_len, exp[k]);
      end
      b -= int'(seg_len);
    end
    checks++;
    if (b != 0) begin failures++; $display("FAIL seq %0d leaves %0d", total, b); end
  endtask

  initial begin
    for (int b = 0; b <= 4 * MAX; b++) begin
      backlog = 20'(b);
      #1;
      checks++;
      if (int'(seg_len) != ref_len(b)) begin
        failures++;
        $display("FAIL backlog %0d: got %0d exp %0d", b, seg_len, ref_len(b));
      end
      // no segment below MIN while the backlog holds at least MIN
      if (b >= MIN) begin
        checks++;
        if (int'(seg_len) < MIN || (b - int'(seg_len) != 0 && b - int'(seg_len) < MIN)) begin
          failures++;
          $display("FAIL min-size rule at backlog %0d", b);
        end
      end
    end
    check_seq(280, '{240, 40});
    check_seq(580, '{256, 256, 68});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
