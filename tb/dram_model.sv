// dram_model -- behavioural model of the off-chip DRAM buffer of an
// ingress line card, as seen through the byte-wide port of the ingress
// datapath. Not synthesizable logic of the switch: it stands in for a
// commercial DRAM part. Writes happen at the clock edge; read data appears
// LAT clocks after rd_en, fully pipelined (one read per clock). Bank
// structure, refresh and turn-around are not modelled.
module dram_model #(
  parameter int unsigned DAW = 17,
  parameter int unsigned LAT = 4
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [DAW-1:0] wr_addr,
  input  logic [7:0]     wr_data,
  input  logic           rd_en,
  input  logic [DAW-1:0] rd_addr,
  output logic [7:0]     rd_data
);
  logic [7:0] mem [2**DAW];
  logic [7:0] pipe [LAT];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    pipe[0] <= rd_en ? mem[rd_addr] : 8'h00;
    for (int k = 1; k < LAT; k++) pipe[k] <= pipe[k-1];
  end

  // pipe[k] holds the data read k+1 clocks ago
  assign rd_data = pipe[LAT-1];
endmodule
