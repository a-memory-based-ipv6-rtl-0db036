// ddr2p_sram_model -- behavioural model of the off-chip SRAM holding the
// G/AUX memory of a large IGU group.
//
// Not synthesizable logic of the engine: it stands for a DDRII+ SRAM chip
// behind its controller. A read address presented with rd_en is answered
// LAT clock cycles later on rd_data (pipelined, one read per clock). Writes
// take effect at the clock edge. The fixed latency is a simplification of
// the real part's interface.
module ddr2p_sram_model #(
  parameter int unsigned ADDR_W = 17,
  parameter int unsigned DATA_W = 65,
  parameter int unsigned LAT    = 3
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem  [2**ADDR_W];
  logic [DATA_W-1:0] pipe [LAT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    pipe[0] <= rd_en ? mem[rd_addr] : '0;
    for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
  end

  assign rd_data = pipe[LAT-1];

endmodule
