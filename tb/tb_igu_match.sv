// tb_igu_match -- self-checking test of the comparator and AND gates.
// Random candidates whose stored prefix equals the input, differs in one
// bit, or differs at random; index 0 (empty slot) and invalid cycles too.
module tb_igu_match;
  localparam int unsigned L = 44, IDX_W = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i, valid_o; logic [L-1:0] x, stored; logic [IDX_W-1:0] cand_idx, idx;
  int checks = 0, failures = 0;

  igu_match #(.L(L), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    valid_i = 0; x = 0; stored = 0; cand_idx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic v; logic [L-1:0] xv, sv; logic [IDX_W-1:0] iv, exp;
      v  = ($urandom % 8) != 0;
      xv = {32'($urandom), 32'($urandom)};
      case ($urandom % 3)
        0: sv = xv;
        1: sv = xv ^ (L'(1) << ($urandom % L));
        default: sv = {32'($urandom), 32'($urandom)};
      endcase
      iv = IDX_W'($urandom);
      valid_i = v; x = xv; stored = sv; cand_idx = iv;
      exp = (v && sv == xv) ? iv : '0;
      @(negedge clk);
      checks++;
      if (idx !== exp || valid_o !== v) begin
        failures++; $display("FAIL t=%0d idx %h exp %h", t, idx, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
