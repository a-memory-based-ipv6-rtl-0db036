// max_selector_cascade -- priority encoder of the parallel IGU, built as a
// pipelined cascade of maximum selectors.
//
// Each IGU reports a key: 0 when it found nothing, otherwise a value whose
// upper bits are the IGU's rank in order of increasing prefix length. The
// longest matching prefix is therefore the maximum key. Instead of a
// comparator tree, N two-input maximum selectors are chained, each followed
// by a register, so that every stage holds only one comparison: stage j
// forms max(stage j-1, key j). Key j is delayed by j cycles before it
// enters stage j so that all keys of one lookup meet the running maximum of
// the same lookup. The chained form follows the architecture; the skew
// registers and the key encoding are this design's.
//
// Timing: a new set of keys every clock; result and valid_o appear N cycles
// after key and valid_i.
module max_selector_cascade #(
  parameter int unsigned N     = 28,  // number of IGUs (keys)
  parameter int unsigned KEY_W = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [KEY_W-1:0] key [N],
  output logic             valid_o,
  output logic [KEY_W-1:0] result
);

  logic [KEY_W-1:0] acc   [N];   // running maximum after stage j
  logic             acc_v [N];

  for (genvar j = 0; j < N; j++) begin : g_stage
    logic [KEY_W-1:0] kd;        // key j delayed by j cycles
    if (j == 0) begin : g_nodly
      assign kd = key[0];
    end else begin : g_dly
      logic [KEY_W-1:0] sk [j];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < j; s++) sk[s] <= '0;
        end else begin
          sk[0] <= key[j];
          for (int s = 1; s < j; s++) sk[s] <= sk[s-1];
        end
      end
      assign kd = sk[j-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[j]   <= '0;
        acc_v[j] <= 1'b0;
      end else if (j == 0) begin
        acc[j]   <= kd;
        acc_v[j] <= valid_i;
      end else begin
        acc[j]   <= (kd > acc[j-1]) ? kd : acc[j-1];
        acc_v[j] <= acc_v[j-1];
      end
    end
  end

  assign result  = acc[N-1];
  assign valid_o = acc_v[N-1];

endmodule
