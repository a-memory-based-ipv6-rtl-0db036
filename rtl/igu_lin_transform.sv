// igu_lin_transform -- linear transformation stage of an IGU.
//
// Produces the transformed variables Y = (row variables, column variables)
// from the L-bit group prefix X of each lookup lane. Every transformed
// variable is y_i = x_a(i) XOR x_b(i) when its xor enable is set, and
// y_i = x_a(i) otherwise, i.e. one two-input EXOR per variable as in the
// architecture. Bit numbering of X: x[L-1] is the first (most significant)
// prefix bit. The first H_IN variables address the H memory (rows); the
// remaining COL_W variables are the column number added to the row shift.
//
// The selections (sel_a, sel_b, xor_en) are held in registers written
// through the configuration port (entry cfg_addr, data {xor_en, sel_b,
// sel_a}), so a new prefix table can be loaded without rebuilding the
// hardware; the architecture fixes them in LUTs, this register form is this
// design's choice. A selection of a bit at or above L reads 0, so
// xor-ing a variable with itself or selecting beyond L gives a constant 0.
// Selections reset to bit 0 with no xor.
//
// Timing: one pipeline stage; Y appears one cycle after X.
module igu_lin_transform
  import ipv6_lookup_pkg::*;
#(
  parameter int unsigned L     = 18,  // group prefix length
  parameter int unsigned H_IN  = 4,   // row variables
  parameter int unsigned COL_W = 6,   // column variables
  parameter int unsigned LANES = NUM_LANES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_we,
  input  logic [$clog2(H_IN+COL_W)-1:0] cfg_addr,
  input  logic [2*SEL_W:0]        cfg_data,  // {xor_en, sel_b, sel_a}
  // lookup lanes
  input  logic [L-1:0]            x     [LANES],
  output logic [H_IN-1:0]         y_row [LANES],
  output logic [COL_W-1:0]        y_col [LANES]
);

  localparam int unsigned NV = H_IN + COL_W;

  typedef struct packed {
    logic             xor_en;
    logic [SEL_W-1:0] sel_b;
    logic [SEL_W-1:0] sel_a;
  } lt_sel_t;

  lt_sel_t sel [NV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NV; i++) sel[i] <= '0;
    end else if (cfg_we && 32'(cfg_addr) < NV) begin
      sel[cfg_addr] <= lt_sel_t'(cfg_data);
    end
  end

  // Bit picker: x_k for k < L, else 0.
  function automatic logic pick(input logic [L-1:0] v, input logic [SEL_W-1:0] k);
    logic [L-1:0] sh;
    sh = v >> k;
    return (32'(k) < L) ? sh[0] : 1'b0;
  endfunction

  for (genvar ln = 0; ln < LANES; ln++) begin : g_lane
    logic [NV-1:0] y_d;
    always_comb begin
      for (int i = 0; i < NV; i++)
        y_d[i] = pick(x[ln], sel[i].sel_a) ^ (sel[i].xor_en & pick(x[ln], sel[i].sel_b));
    end
    always_ff @(posedge clk) begin
      y_row[ln] <= y_d[H_IN-1:0];
      y_col[ln] <= y_d[NV-1:H_IN];
    end
  end

endmodule
