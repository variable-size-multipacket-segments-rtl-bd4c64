// rr_arbiter -- round-robin arbiter.
//
// Grants the first requester at or after the priority pointer, searching
// upwards with wrap-around. The grant is combinational. When `accept` is
// high the pointer moves to one past the granted requester, so the winner
// becomes lowest priority next time. Round-robin service at every
// contention point (inputs and outputs of the crossbar) is what the source
// design assumes; the pointer-update policy is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 accept,
  output logic                 gnt_any,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;

  always_comb begin
    gnt_any = 1'b0;
    gnt_idx = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!gnt_any && req[idx]) begin
        gnt_any = 1'b1;
        gnt_idx = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ptr <= '0;
    else if (accept && gnt_any) ptr <= (int'(gnt_idx) == N-1) ? '0 : gnt_idx + 1'b1;
  end
endmodule
