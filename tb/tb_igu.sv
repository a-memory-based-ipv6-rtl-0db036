// tb_igu -- self-checking test of one IGU, in both of its forms: G/AUX
// memory on-chip (u_on) and off-chip behind an SRAM model (u_ext).
//
// A random group of prefixes of lengths 15..18 is expanded to 18 bits and
// turned into transformation, H and G/AUX contents by the first-fit table
// builder; the tables are written through the configuration port. Then
// both lanes issue a lookup every cycle: addresses that hit an entry,
// addresses that land on an occupied G/AUX word but differ in a bit the
// transformation ignores (the comparator must reject them), and random
// addresses. Each result must equal the table's index, 0 otherwise, and
// must appear exactly G_LAT + 4 cycles after the address.
module tb_igu;
  import ipv6_lookup_pkg::*;
  import igu_table_pkg::*;

  localparam int unsigned L = 18, IDX_W = 7, H_IN = 4, H_OUT = 6, G_IN = 7;
  localparam int unsigned COL_W = G_IN - 1, G_LAT = 3, GW = IDX_W + L;
  localparam int unsigned LAT = G_LAT + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we; cfg_target_e cfg_target; logic [CFG_ADDR_W-1:0] cfg_addr;
  logic [CFG_DATA_W-1:0] cfg_data;
  logic valid_i [2]; logic [ADDR_W-1:0] addr [2];
  logic von [2], vex [2]; logic [IDX_W-1:0] ion [2], iex [2];
  logic on_rd_en [2]; logic [G_IN-1:0] on_rd_addr [2]; logic [GW-1:0] on_rd_data [2];
  logic on_we; logic [G_IN-1:0] on_waddr; logic [GW-1:0] on_wdata;
  logic ex_rd_en [2]; logic [G_IN-1:0] ex_rd_addr [2]; logic [GW-1:0] ex_rd_data [2];
  logic ex_we; logic [G_IN-1:0] ex_waddr; logic [GW-1:0] ex_wdata;

  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_reject = 0, n_miss = 0, n_shift_hit = 0, n_xor_hit = 0;
  igu_table tbl;

  igu #(.L(L), .IDX_W(IDX_W), .H_IN(H_IN), .H_OUT(H_OUT), .G_IN(G_IN), .EXT(1'b0),
        .G_LAT(G_LAT)) u_on (
    .clk, .rst_n, .cfg_we, .cfg_target, .cfg_addr, .cfg_data, .valid_i, .addr,
    .valid_o(von), .idx(ion), .ext_rd_en(on_rd_en), .ext_rd_addr(on_rd_addr),
    .ext_rd_data(on_rd_data), .ext_we(on_we), .ext_waddr(on_waddr), .ext_wdata(on_wdata));

  igu #(.L(L), .IDX_W(IDX_W), .H_IN(H_IN), .H_OUT(H_OUT), .G_IN(G_IN), .EXT(1'b1),
        .G_LAT(G_LAT)) u_ext (
    .clk, .rst_n, .cfg_we, .cfg_target, .cfg_addr, .cfg_data, .valid_i, .addr,
    .valid_o(vex), .idx(iex), .ext_rd_en(ex_rd_en), .ext_rd_addr(ex_rd_addr),
    .ext_rd_data(ex_rd_data), .ext_we(ex_we), .ext_waddr(ex_waddr), .ext_wdata(ex_wdata));

  for (genvar ln = 0; ln < 2; ln++) begin : g_sram
    assign on_rd_data[ln] = '0;
    ddr2p_sram_model #(.ADDR_W(G_IN), .DATA_W(GW), .LAT(G_LAT)) u_sram (
      .clk, .rd_en(ex_rd_en[ln]), .rd_addr(ex_rd_addr[ln]), .rd_data(ex_rd_data[ln]),
      .we(ex_we), .waddr(ex_waddr), .wdata(ex_wdata));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // expected results per lane: index and issue cycle
  int unsigned exp_q [2][$]; int t_q [2][$];

  for (genvar ln = 0; ln < 2; ln++) begin : g_chk
    always @(negedge clk) if (rst_n && (von[ln] || vex[ln])) begin
      checks++;
      if (exp_q[ln].size() == 0) begin failures++; $display("FAIL lane %0d: unexpected output", ln); end
      else begin
        int unsigned e; int t;
        e = exp_q[ln].pop_front(); t = t_q[ln].pop_front();
        if (!von[ln] || !vex[ln] || ion[ln] != IDX_W'(e) || iex[ln] != IDX_W'(e) || cycle - t != LAT) begin
          failures++;
          $display("FAIL lane %0d: on %0d ext %0d exp %0d latency %0d", ln, ion[ln], iex[ln], e, cycle - t);
        end
      end
    end
  end

  task automatic cfg_write(cfg_target_e tg, int unsigned a, logic [CFG_DATA_W-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_target = tg; cfg_addr = CFG_ADDR_W'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  initial begin
    bit ok;
    cfg_we = 0; cfg_target = CFG_H; cfg_addr = 0; cfg_data = 0;
    foreach (valid_i[ln]) begin valid_i[ln] = 0; addr[ln] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;

    // build a group table: prefixes of length 15..18 expanded to 18 bits
    ok = 0;
    while (!ok) begin
      tbl = new(L, H_IN, H_OUT, G_IN, COL_W);
      while (tbl.ent_val.size() < 95) begin
        int unsigned len;
        bit [63:0] p;
        len = 15 + $urandom % 4;
        p = 64'($urandom) & ~((64'd1 << (L - len)) - 1);
        p &= (64'd1 << L) - 1;
        for (int unsigned e = 0; e < (1 << (L - len)); e++) void'(tbl.add(p | 64'(e)));
      end
      ok = tbl.build();
    end
    $display("table: %0d entries, %0d rows shifted", tbl.ent_val.size(), tbl.nonzero_shift_rows);

    for (int unsigned v = 0; v < H_IN + COL_W; v++) cfg_write(CFG_LT, v, CFG_DATA_W'(tbl.lt_word(v)));
    foreach (tbl.hmem[r]) cfg_write(CFG_H, r, CFG_DATA_W'(tbl.hmem[r]));
    foreach (tbl.gval[a]) cfg_write(CFG_G, a, CFG_DATA_W'({IDX_W'(tbl.gidx[a]), L'(tbl.gval[a])}));
    repeat (2) @(negedge clk);

    for (int t = 0; t < 600; t++) begin
      for (int ln = 0; ln < 2; ln++) begin
        bit [63:0] x; int unsigned kind, e;
        kind = $urandom % 10;
        x = tbl.ent_val[$urandom % tbl.ent_val.size()];
        if (kind >= 7) x ^= 64'd1 << (H_IN + COL_W + ($urandom % (L - 1 - H_IN - COL_W)));
        if (kind == 9) x = 64'($urandom) & ((64'd1 << L) - 1);
        e = tbl.lookup(x);
        if (e != 0) begin
          n_hit++;
          if (tbl.hmem[tbl.row_of(x)] != 0) n_shift_hit++;
          if (x[0] ^ x[L-1]) n_xor_hit++;
        end else if (kind >= 7 && kind < 9) n_reject++;
        else n_miss++;
        valid_i[ln] = ($urandom % 8) != 0;
        addr[ln] = {L'(x), (ADDR_W - L)'({$urandom, $urandom})};
        if (valid_i[ln]) begin exp_q[ln].push_back(e); t_q[ln].push_back(cycle); end
      end
      @(negedge clk);
    end
    foreach (valid_i[ln]) valid_i[ln] = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q[0].size() + exp_q[1].size() != 0) begin failures++; $display("FAIL results missing"); end
    checks++;
    if (n_hit == 0 || n_reject == 0 || n_shift_hit == 0 || n_xor_hit == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("hits %0d (shifted rows %0d, xor variable set %0d), comparator rejects %0d, misses %0d",
             n_hit, n_shift_hit, n_xor_hit, n_reject, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
