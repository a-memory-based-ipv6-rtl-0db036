// tb_igu_lin_transform -- self-checking test of the EXOR transformation.
// Programs random selections (with and without xor, some beyond L), drives
// random prefixes on both lanes every cycle and compares the row and column
// variables, one cycle later, with a software model.
module tb_igu_lin_transform;
  localparam int unsigned L = 18, H_IN = 4, COL_W = 6, NV = H_IN + COL_W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we; logic [$clog2(NV)-1:0] cfg_addr; logic [12:0] cfg_data;
  logic [L-1:0] x [2]; logic [H_IN-1:0] y_row [2]; logic [COL_W-1:0] y_col [2];
  int checks = 0, failures = 0;
  logic [12:0] sel [NV];

  igu_lin_transform #(.L(L), .H_IN(H_IN), .COL_W(COL_W), .LANES(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic bitof(logic [L-1:0] v, int k);
    return (k < L) ? v[k] : 1'b0;
  endfunction
  function automatic logic [NV-1:0] model(logic [L-1:0] v);
    logic [NV-1:0] y;
    for (int i = 0; i < NV; i++)
      y[i] = bitof(v, int'(sel[i][5:0])) ^ (sel[i][12] & bitof(v, int'(sel[i][11:6])));
    return y;
  endfunction

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_data = 0; x[0] = 0; x[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < NV; i++) begin
        sel[i] = {1'($urandom), 6'($urandom % 20), 6'($urandom % 20)};
        @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_data = sel[i];
      end
      @(negedge clk); cfg_we = 0;
      for (int t = 0; t < 100; t++) begin
        logic [L-1:0] a, b;
        a = L'($urandom); b = L'($urandom);
        x[0] = a; x[1] = b;
        @(negedge clk);
        checks++;
        if ({y_col[0], y_row[0]} !== model(a) || {y_col[1], y_row[1]} !== model(b)) begin
          failures++;
          $display("FAIL x=%h/%h got %h/%h exp %h/%h", a, b, {y_col[0], y_row[0]},
                   {y_col[1], y_row[1]}, model(a), model(b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
