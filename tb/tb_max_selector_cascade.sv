// tb_max_selector_cascade -- self-checking test of the pipelined cascade of
// maximum selectors: a new random key set every cycle (mostly zeros, as
// from IGUs that miss), the result must be the maximum of the set and must
// appear exactly N cycles after it entered.
module tb_max_selector_cascade;
  localparam int unsigned N = 9, KEY_W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i, valid_o; logic [KEY_W-1:0] key [N]; logic [KEY_W-1:0] result;
  int checks = 0, failures = 0, cycle = 0;
  logic [KEY_W-1:0] exp_q [$]; int t_q [$];

  max_selector_cascade #(.N(N), .KEY_W(KEY_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(negedge clk) if (rst_n && valid_o) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      logic [KEY_W-1:0] e; int t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (result !== e || cycle - t != N) begin
        failures++; $display("FAIL result %h exp %h latency %0d", result, e, cycle - t);
      end
    end
  end

  initial begin
    valid_i = 0; foreach (key[j]) key[j] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [KEY_W-1:0] m; m = '0;
      valid_i = ($urandom % 5) != 0;
      foreach (key[j]) begin
        key[j] = (($urandom % 3) == 0) ? KEY_W'($urandom) : '0;
        if (key[j] > m) m = key[j];
      end
      if (valid_i) begin exp_q.push_back(m); t_q.push_back(cycle); end
      @(negedge clk);
    end
    valid_i = 0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
