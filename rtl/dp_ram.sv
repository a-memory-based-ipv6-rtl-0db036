// dp_ram -- on-chip table memory of an IGU (H memory or G/AUX memory).
//
// Holds 2**ADDR_W words of DATA_W bits. Two independent synchronous read
// ports serve the two lookup lanes in the same clock, as a block RAM in
// dual-port mode does; each read returns its word one cycle after the
// address is presented (registered output). A single write port loads the
// table. The two-lane read arrangement follows the dual-port use of the
// on-chip memories in the engine; the separate write port and the absence of
// a reset on the contents are this design's choices: the table is written
// by the loader before lookups use it, and a write and a read of the same
// word in one cycle returns the old word.
module dp_ram #(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned DATA_W = 25
) (
  input  logic              clk,
  // write port (table load)
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  // read port of lane 0
  input  logic [ADDR_W-1:0] raddr0,
  output logic [DATA_W-1:0] rdata0,
  // read port of lane 1
  input  logic [ADDR_W-1:0] raddr1,
  output logic [DATA_W-1:0] rdata1
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule
