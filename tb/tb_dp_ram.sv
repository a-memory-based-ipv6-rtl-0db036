// tb_dp_ram -- self-checking test of the two-read-port table memory.
// Fills the memory with a pseudo-random pattern, then reads both ports
// every cycle at independent random addresses and checks each word one
// cycle later against a reference copy; also checks read-before-write.
module tb_dp_ram;
  localparam int unsigned AW = 6, DW = 25;
  logic clk = 1'b0;
  logic we; logic [AW-1:0] waddr, ra0, ra1; logic [DW-1:0] wdata, rd0, rd1;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];

  dp_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .we, .waddr, .wdata,
    .raddr0(ra0), .rdata0(rd0), .raddr1(ra1), .rdata1(rd1));

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; ra0 = 0; ra1 = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = DW'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      logic [AW-1:0] a0, a1;
      a0 = AW'($urandom); a1 = AW'($urandom);
      ra0 = a0; ra1 = a1;
      @(negedge clk);
      chk(rd0, ref_mem[a0], "port0");
      chk(rd1, ref_mem[a1], "port1");
    end
    // read and write of the same word in one cycle returns the old word
    ra0 = 5; we = 1; waddr = 5; wdata = ~ref_mem[5];
    @(negedge clk); we = 0;
    chk(rd0, ref_mem[5], "read-before-write");
    ref_mem[5] = ~ref_mem[5];
    @(negedge clk);
    chk(rd0, ref_mem[5], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
