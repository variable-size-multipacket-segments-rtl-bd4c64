// tb_rr_arbiter -- random requests against a reference round-robin model.
// The model keeps its own pointer, grants the first requester at or after
// it and moves past the winner on accept. Also checks that a requester that
// stays asserted is served within N grants (fairness).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic accept, gnt_any;
  logic [2:0] gnt_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .accept, .gnt_any, .gnt_idx);

  always #5 clk = ~clk;

  initial begin
    int exp_idx, wait_cnt;
    bit exp_any;
    req = '0; accept = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req    = (t < 2000) ? N'($urandom) : N'(5'b00001) | N'($urandom & 5'b10000);
      accept = ($urandom % 4) != 0;
      #1;
      exp_any = 0; exp_idx = 0;
      for (int k = 0; k < N; k++)
        if (!exp_any && req[(ptr + k) % N]) begin exp_any = 1; exp_idx = (ptr + k) % N; end
      checks++;
      if (gnt_any != exp_any || (exp_any && int'(gnt_idx) != exp_idx)) begin
        failures++;
        $display("FAIL t=%0d req=%b got %0d/%0d exp %0d/%0d", t, req, gnt_any, gnt_idx, exp_any, exp_idx);
      end
      if (accept && exp_any) ptr = (exp_idx + 1) % N;
    end
    // fairness: all request continuously, each served once per N grants
    @(negedge clk);
    req = '1; accept = 1;
    wait_cnt = 0;
    for (int t = 0; t < 4 * N; t++) begin
      #1;
      checks++;
      if (int'(gnt_idx) != ptr) begin failures++; $display("FAIL fairness t=%0d", t); end
      ptr = (ptr + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
