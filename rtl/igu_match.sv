// igu_match -- comparator and AND gates at the end of an IGU.
//
// The G/AUX memory returns, for the column the lookup landed in, a
// candidate index and the prefix that was registered with it. The candidate
// is only correct if that stored prefix equals the group prefix being
// looked up (the G address ignores the bits not used as row or column
// variables, so another prefix may share the slot). The comparator checks
// all L bits and the AND gates pass the index on equality and 0 otherwise;
// index 0 also marks an empty slot. This follows the architecture; the
// output register is this design's pipeline stage.
//
// Timing: one cycle from (valid_i, x, stored, cand_idx) to (valid_o, idx).
module igu_match #(
  parameter int unsigned L     = 18,
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [L-1:0]     x,         // group prefix being looked up
  input  logic [L-1:0]     stored,    // prefix read from the AUX part
  input  logic [IDX_W-1:0] cand_idx,  // index read from the G part
  output logic             valid_o,
  output logic [IDX_W-1:0] idx        // cand_idx on equality, else 0
);

  logic equal;
  assign equal = (stored == x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      idx     <= '0;
    end else begin
      valid_o <= valid_i;
      idx     <= cand_idx & {IDX_W{equal & valid_i}};
    end
  end

endmodule
