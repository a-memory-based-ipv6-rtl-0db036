// tb_parallel_igu_top -- end-to-end test of the whole lookup engine at its
// full size (28 groups with their published memory sizes, two lanes, two
// groups in off-chip SRAM models).
//
// For every group a random set of prefixes with lengths of that group is
// drawn, expanded to the group length and turned into tables by the
// first-fit builder; some prefixes extend a prefix of a shorter group, so
// that one address matches in several groups. Every word of every table is
// written through the configuration port (the memories are not reset).
// Then both lanes issue lookups every cycle. The reference result is the
// match of the longest group that holds the address prefix, {group+1,
// index}, or 0. Each result must arrive exactly SRAM_LAT + 4 + 28 cycles
// after its address. The test counts how often each mechanism occurred:
// hits, hits through off-chip groups, hits on shifted rows, several groups
// matching one address, comparator rejections, misses, both lanes busy.
// After a first round of lookups, new prefixes are added to one on-chip and
// one off-chip group, those two groups are rebuilt and rewritten, and a
// second round must find the new prefixes as well as the old ones.
module tb_parallel_igu_top;
  import ipv6_lookup_pkg::*;
  import igu_table_pkg::*;

  localparam int unsigned LAT = SRAM_LAT + 4 + NUM_GROUPS;
  localparam int unsigned PER_GROUP = 24;   // prefixes drawn per group

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic valid_i [NUM_LANES]; logic [ADDR_W-1:0] addr [NUM_LANES];
  logic valid_o [NUM_LANES]; lookup_result_t result [NUM_LANES];
  logic ext_rd_en [NUM_EXT][NUM_LANES]; logic [EXT_GIN-1:0] ext_rd_addr [NUM_EXT][NUM_LANES];
  logic [EXT_GW-1:0] ext_rd_data [NUM_EXT][NUM_LANES];
  logic ext_we [NUM_EXT]; logic [EXT_GIN-1:0] ext_waddr [NUM_EXT]; logic [EXT_GW-1:0] ext_wdata [NUM_EXT];

  parallel_igu_top dut (.*);

  for (genvar s = 0; s < NUM_EXT; s++) begin : g_ext
    for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_lane
      ddr2p_sram_model #(.ADDR_W(EXT_GIN), .DATA_W(EXT_GW), .LAT(SRAM_LAT)) u_sram (
        .clk, .rd_en(ext_rd_en[s][ln]), .rd_addr(ext_rd_addr[s][ln]),
        .rd_data(ext_rd_data[s][ln]), .we(ext_we[s]), .waddr(ext_waddr[s]), .wdata(ext_wdata[s]));
    end
  end

  int checks = 0, failures = 0, cycle = 0;
  int n_upd_hit = 0;
  bit [63:0] upd_val [NUM_GROUPS][$];
  localparam int unsigned upd_groups [2] = '{3, 20};
  int n_hit = 0, n_ext_hit = 0, n_shift_hit = 0, n_multi = 0, n_reject = 0, n_miss = 0, n_dual = 0;
  igu_table tbl [NUM_GROUPS];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  lookup_result_t exp_q [NUM_LANES][$]; int t_q [NUM_LANES][$];

  for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_chk
    always @(negedge clk) if (rst_n && valid_o[ln]) begin
      checks++;
      if (exp_q[ln].size() == 0) begin failures++; $display("FAIL lane %0d: unexpected result", ln); end
      else begin
        lookup_result_t e; int t;
        e = exp_q[ln].pop_front(); t = t_q[ln].pop_front();
        if (result[ln] != e || cycle - t != LAT) begin
          failures++;
          $display("FAIL lane %0d: got %0d/%0d exp %0d/%0d latency %0d", ln,
                   result[ln].grp, result[ln].idx, e.grp, e.idx, cycle - t);
        end
      end
    end
  end

  // one configuration word per clock
  task automatic cfg_put(int unsigned g, cfg_target_e tg, int unsigned a, logic [CFG_DATA_W-1:0] d);
    cfg.we = 1'b1; cfg.group = GRP_W'(g); cfg.target = tg; cfg.addr = CFG_ADDR_W'(a); cfg.data = d;
    @(negedge clk);
  endtask

  function automatic bit [63:0] group_bits(bit [63:0] a, int unsigned g);
    return a >> (64 - GROUP_CFG[g].len);
  endfunction

  // reference: longest group holding the address prefix
  function automatic lookup_result_t ref_lookup(bit [63:0] a, output int unsigned nmatch,
                                                output int unsigned grp);
    lookup_result_t r; r = '0; nmatch = 0; grp = 0;
    for (int g = NUM_GROUPS - 1; g >= 0; g--) begin
      int unsigned i;
      i = tbl[g].lookup(group_bits(a, g));
      if (i != 0) begin
        nmatch++;
        if (r.grp == 0) begin r.grp = GRP_W'(g + 1); r.idx = MAX_IDX_W'(i); grp = g; end
      end
    end
    return r;
  endfunction

  // does some group hold a different prefix at the G/AUX word this address reads?
  function automatic bit any_reject(bit [63:0] a);
    for (int g = 0; g < NUM_GROUPS; g++) begin
      bit [63:0] x; int unsigned ga;
      x  = group_bits(a, g);
      ga = (tbl[g].hmem[tbl[g].row_of(x)] + tbl[g].col_of(x)) & ((1 << tbl[g].g_in) - 1);
      if (tbl[g].gidx[ga] != 0 && tbl[g].gval[ga] != x) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic load_group(int unsigned g);
    for (int unsigned v = 0; v < tbl[g].nv; v++) cfg_put(g, CFG_LT, v, CFG_DATA_W'(tbl[g].lt_word(v)));
    foreach (tbl[g].hmem[r]) cfg_put(g, CFG_H, r, CFG_DATA_W'(tbl[g].hmem[r]));
    foreach (tbl[g].gval[a])
      cfg_put(g, CFG_G, a, (CFG_DATA_W'(tbl[g].gidx[a]) << GROUP_CFG[g].len) | CFG_DATA_W'(tbl[g].gval[a]));
  endtask

  task automatic lookups(int cycles);
    for (int t = 0; t < cycles; t++) begin
      for (int ln = 0; ln < NUM_LANES; ln++) begin
        bit [63:0] a; int unsigned kind, g, nm, hg; lookup_result_t e;
        kind = $urandom % 10;
        g = $urandom % NUM_GROUPS;
        a = (tbl[g].ent_val[$urandom % tbl[g].ent_val.size()] << (64 - GROUP_CFG[g].len))
            | ({$urandom, $urandom} >> GROUP_CFG[g].len);
        if (kind >= 6 && kind < 9)   // flip a bit the transformation ignores
          a ^= 64'd1 << (63 - (tbl[g].nv + $urandom % (GROUP_CFG[g].len - tbl[g].nv - 1)));
        if (kind == 9) a = {$urandom, $urandom};
        if (kind == 5 && upd_val[g].size() != 0)   // a prefix added by the update
          a = (upd_val[g][$urandom % upd_val[g].size()] << (64 - GROUP_CFG[g].len))
              | ({$urandom, $urandom} >> GROUP_CFG[g].len);
        e = ref_lookup(a, nm, hg);
        if (e.grp != 0) begin
          n_hit++;
          if (GROUP_CFG[hg].ext) n_ext_hit++;
          if (tbl[hg].hmem[tbl[hg].row_of(group_bits(a, hg))] != 0) n_shift_hit++;
          if (nm > 1) n_multi++;
          foreach (upd_val[hg][q]) if (upd_val[hg][q] == group_bits(a, hg)) n_upd_hit++;
        end else n_miss++;
        if (any_reject(a)) n_reject++;
        valid_i[ln] = ($urandom % 10) != 0;
        addr[ln] = a;
        if (valid_i[ln]) begin exp_q[ln].push_back(e); t_q[ln].push_back(cycle); end
      end
      if (valid_i[0] && valid_i[1]) n_dual++;
      @(negedge clk);
    end
    foreach (valid_i[ln]) valid_i[ln] = 0;
  endtask

  initial begin
    cfg = '0;
    foreach (valid_i[ln]) begin valid_i[ln] = 0; addr[ln] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;

    // ---- build the tables, shortest group first
    for (int g = 0; g < NUM_GROUPS; g++) begin
      bit ok; int unsigned L, lo;
      L = GROUP_CFG[g].len; lo = GROUP_CFG[g].lo_len;
      ok = 0;
      while (!ok) begin
        int unsigned n;
        tbl[g] = new(L, GROUP_CFG[g].h_in, GROUP_CFG[g].h_out, GROUP_CFG[g].g_in,
                     GROUP_CFG[g].g_in - 1);
        n = 0;
        while (n < PER_GROUP) begin
          int unsigned len, sg;
          bit [63:0] p;
          len = lo + $urandom % (L - lo + 1);
          p = {$urandom, $urandom};
          if (g > 0 && ($urandom % 3) == 0) begin
            // extend a prefix of a shorter group
            sg = $urandom % g;
            p = tbl[sg].ent_val[$urandom % tbl[sg].ent_val.size()] << (64 - GROUP_CFG[sg].len);
            p |= {$urandom, $urandom} >> GROUP_CFG[sg].len;
          end
          p = p >> (64 - len);              // the len prefix bits
          for (int unsigned e = 0; e < (1 << (L - len)); e++)
            void'(tbl[g].add((p << (L - len)) | 64'(e)));
          n++;
        end
        ok = tbl[g].build();
      end
    end
    $display("tables built");

    // ---- load every word of every table
    @(negedge clk);
    for (int g = 0; g < NUM_GROUPS; g++) load_group(g);
    cfg.we = 1'b0;
    $display("tables loaded at cycle %0d", cycle);
    repeat (2) @(negedge clk);

    lookups(3000);
    repeat (LAT + 3) @(negedge clk);

    // ---- table update: new prefixes in one on-chip and one off-chip group
    foreach (upd_groups[u]) begin
      int unsigned g, added;
      g = upd_groups[u];
      added = 0;
      while (added < 6) begin
        bit [63:0] p;
        p = {$urandom, $urandom} >> (64 - GROUP_CFG[g].len);
        if (tbl[g].add(p)) begin added++; upd_val[g].push_back(p); end
      end
      if (!tbl[g].build()) begin failures++; $display("FAIL rebuild of group %0d", g); end
    end
    @(negedge clk);
    foreach (upd_groups[u]) load_group(upd_groups[u]);
    cfg.we = 1'b0;
    repeat (2) @(negedge clk);
    lookups(1500);
    foreach (valid_i[ln]) valid_i[ln] = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q[0].size() + exp_q[1].size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("hits on prefixes added by the table update: %0d", n_upd_hit);
    $display("hits %0d (off-chip %0d, shifted row %0d, several groups %0d), comparator rejects %0d, misses %0d, dual-lane cycles %0d",
             n_hit, n_ext_hit, n_shift_hit, n_multi, n_reject, n_miss, n_dual);
    checks++;
    if (n_hit == 0 || n_ext_hit == 0 || n_shift_hit == 0 || n_multi == 0 || n_reject == 0 ||
        n_miss == 0 || n_dual == 0 || n_upd_hit == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
