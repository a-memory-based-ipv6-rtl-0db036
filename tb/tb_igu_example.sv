// tb_igu_example -- the six-variable IGU worked example, checked over all
// 64 input vectors.
//
// Function f' (registered vectors with a single 1: x6 -> 1, x5 -> 2,
// x4 -> 3, x3 -> 4, x2 -> 5, x1 -> 6, all others 0). Transformation
// Y1 = (x3^x1, x4^x1, x5) as column, Y2 = (x6) as row. Without a shift the
// entries 1 and 5 collide in column 0; shifting row Y2 = 1 by 3 removes the
// collision. H memory: 2 words x 3 bits, G/AUX memory: 8 words x (3 + 6)
// bits, 78 bits in all against 2^6 x 3 = 192 bits for a single memory.
// x1 is the first prefix bit, i.e. address bit 63.
module tb_igu_example;
  import ipv6_lookup_pkg::*;

  localparam int unsigned L = 6, IDX_W = 3, H_IN = 1, H_OUT = 3, G_IN = 3, COL_W = 3;
  localparam int unsigned G_LAT = 1, GW = IDX_W + L, LAT = G_LAT + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we; cfg_target_e cfg_target; logic [CFG_ADDR_W-1:0] cfg_addr;
  logic [CFG_DATA_W-1:0] cfg_data;
  logic valid_i [2]; logic [ADDR_W-1:0] addr [2];
  logic valid_o [2]; logic [IDX_W-1:0] idx [2];
  logic rd_en [2]; logic [G_IN-1:0] rd_addr [2]; logic [GW-1:0] rd_data [2];
  logic we; logic [G_IN-1:0] waddr; logic [GW-1:0] wdata;
  int checks = 0, failures = 0;

  igu #(.L(L), .IDX_W(IDX_W), .H_IN(H_IN), .H_OUT(H_OUT), .G_IN(G_IN), .COL_W(COL_W),
        .EXT(1'b0), .G_LAT(G_LAT)) dut (
    .clk, .rst_n, .cfg_we, .cfg_target, .cfg_addr, .cfg_data, .valid_i, .addr, .valid_o, .idx,
    .ext_rd_en(rd_en), .ext_rd_addr(rd_addr), .ext_rd_data(rd_data), .ext_we(we),
    .ext_waddr(waddr), .ext_wdata(wdata));
  assign rd_data[0] = '0;
  assign rd_data[1] = '0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // f' of the example; v = (x1 .. x6), x1 most significant
  function automatic int unsigned fprime(logic [5:0] v);
    case (v)
      6'b000001: return 1;
      6'b000010: return 2;
      6'b000100: return 3;
      6'b001000: return 4;
      6'b010000: return 5;
      6'b100000: return 6;
      default:   return 0;
    endcase
  endfunction

  task automatic cfg_write(cfg_target_e tg, int unsigned a, logic [CFG_DATA_W-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = tg; cfg_addr = CFG_ADDR_W'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // transformation entry {xor_en, sel_b, sel_a}; x_i is bit 6-i of the group prefix
  function automatic logic [CFG_DATA_W-1:0] lt(bit xe, int unsigned xb, int unsigned xa);
    return CFG_DATA_W'({xe, 6'(6 - xb), 6'(6 - xa)});
  endfunction

  initial begin
    cfg_we = 0; cfg_target = CFG_H; cfg_addr = 0; cfg_data = 0;
    foreach (valid_i[ln]) begin valid_i[ln] = 0; addr[ln] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    cfg_write(CFG_LT, 0, lt(0, 6, 6));   // row:   y4 = x6
    cfg_write(CFG_LT, 1, lt(0, 5, 5));   // col 0: y3 = x5
    cfg_write(CFG_LT, 2, lt(1, 1, 4));   // col 1: y2 = x4 ^ x1
    cfg_write(CFG_LT, 3, lt(1, 1, 3));   // col 2: y1 = x3 ^ x1
    cfg_write(CFG_H, 0, 0);
    cfg_write(CFG_H, 1, 3);              // row y4 = 1 shifted by three
    for (int unsigned a = 0; a < 8; a++) cfg_write(CFG_G, a, '0);
    cfg_write(CFG_G, 0, CFG_DATA_W'({3'd5, 6'b010000}));
    cfg_write(CFG_G, 1, CFG_DATA_W'({3'd2, 6'b000010}));
    cfg_write(CFG_G, 2, CFG_DATA_W'({3'd3, 6'b000100}));
    cfg_write(CFG_G, 3, CFG_DATA_W'({3'd1, 6'b000001}));
    cfg_write(CFG_G, 4, CFG_DATA_W'({3'd4, 6'b001000}));
    cfg_write(CFG_G, 6, CFG_DATA_W'({3'd6, 6'b100000}));
    // exhaustive: lane 0 takes v, lane 1 takes 63 - v
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      valid_i[0] = 1; addr[0] = {6'(v), 58'h0};
      valid_i[1] = 1; addr[1] = {6'(63 - v), 58'(v * 977)};
      @(negedge clk);
      valid_i[0] = 0; valid_i[1] = 0;
      repeat (LAT - 1) @(negedge clk);
      checks++;
      if (!valid_o[0] || !valid_o[1] || idx[0] != IDX_W'(fprime(6'(v))) ||
          idx[1] != IDX_W'(fprime(6'(63 - v)))) begin
        failures++;
        $display("FAIL v=%b: %0d/%0d exp %0d/%0d", 6'(v), idx[0], idx[1], fprime(6'(v)), fprime(6'(63 - v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
