// crosspoint_buffer -- the segment buffer at one crosspoint of the
// buffered crossbar.
//
// A byte ring of DEPTH bytes holds segment payloads (the header is not
// stored; its length goes into a small descriptor FIFO). The writer is the
// crossbar input that owns this crosspoint; the reader is the output
// scheduler of the crosspoint's column. The buffer never overflows because
// the ingress only sends a segment when it holds enough credit, one credit
// per byte of DEPTH (credit flow control, as in the source design); an
// assertion checks this.
//
// Timing: wr_en writes wr_data at the clock edge. rd_en pops one byte; the
// byte appears on rd_data in the next cycle (registered read). desc_push
// enters a segment length, desc_pop removes the oldest one. `occ` counts
// stored bytes. A reader may start a segment as soon as desc_valid and
// occ != 0: segments arrive without gaps at one byte per clock, the rate at
// which they leave, so cut-through never runs dry.
module crosspoint_buffer #(
  parameter int unsigned DEPTH      = 512,
  parameter int unsigned DESC_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  input  logic        desc_push,
  input  logic [15:0] desc_len_in,
  input  logic        rd_en,
  output logic [7:0]  rd_data,
  input  logic        desc_pop,
  output logic        desc_valid,
  output logic [15:0] desc_len,
  output logic [$clog2(DEPTH+1)-1:0] occ
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned DW = $clog2(DESC_DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [15:0]   dmem [DESC_DEPTH];
  logic [DW-1:0] dwptr, drptr;
  logic [DW:0]   dcnt;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH-1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_data;
    if (rd_en) rd_data <= mem[rptr];
    if (desc_push) dmem[dwptr] <= desc_len_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      occ   <= '0;
      dwptr <= '0;
      drptr <= '0;
      dcnt  <= '0;
    end else begin
      if (wr_en) wptr <= inc(wptr);
      if (rd_en) rptr <= inc(rptr);
      occ <= occ + $bits(occ)'(wr_en) - $bits(occ)'(rd_en);
      if (desc_push) dwptr <= (int'(dwptr) == DESC_DEPTH-1) ? '0 : dwptr + 1'b1;
      if (desc_pop)  drptr <= (int'(drptr) == DESC_DEPTH-1) ? '0 : drptr + 1'b1;
      dcnt <= dcnt + (DW+1)'(desc_push) - (DW+1)'(desc_pop);
    end
  end

  assign desc_valid = (dcnt != '0);
  assign desc_len   = dmem[drptr];

  // Credit flow control must keep the buffer from overflowing.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                    !(wr_en && !rd_en && int'(occ) == DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                    !(rd_en && occ == '0));
  a_desc_room:    assert property (@(posedge clk) disable iff (!rst_n)
                    !(desc_push && !desc_pop && int'(dcnt) == DESC_DEPTH));
endmodule
