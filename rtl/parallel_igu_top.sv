// parallel_igu_top -- IPv6 longest-prefix-match engine built from parallel
// index generation units (IGUs).
//
// The prefix table is split into NUM_GROUPS groups of prefix lengths
// (GROUP_CFG in ipv6_lookup_pkg). All prefixes of a group are expanded to
// the group's longest length and stored in one IGU, which returns the local
// index of the prefix equal to the top bits of the address, or 0. All IGUs
// look at the same address at once. A cascade of maximum selectors then
// picks the match of the group with the longest prefix length: the key of
// group g is {g+1, local index}, and groups are ranked by length.
//
// Two lookup lanes run side by side, sharing every table through the two
// read ports of the on-chip memories, so the engine accepts two addresses
// per clock. The two largest groups keep their G/AUX memory off-chip: for
// each of them and each lane the engine drives a read port (ext_rd_*) of an
// external SRAM that returns the word SRAM_LAT cycles later, and a common
// write port (ext_w*) that loads both lanes' copies.
//
// Interface: cfg (one table write per clock, see cfg_wr_t) selects a group
// and a target inside it (H memory, G/AUX memory, transformation entry).
// Lookup: valid_i/addr per lane (addr = the 64-bit network prefix);
// valid_o/result per lane, result.grp = 0 when nothing matched, else
// group+1, with result.idx the local index inside that group.
//
// Timing: fully pipelined, one lookup per lane per clock; latency
// SRAM_LAT + 4 (IGU) + NUM_GROUPS (selector cascade) = 35 cycles.
// Table writes are meant for times when no lookup is in flight.
//
// The grouping, the sizes, the two lanes, the off-chip groups and the
// cascaded selector follow the published architecture; the configuration
// port, the result encoding and the external port timing are this design's.
module parallel_igu_top
  import ipv6_lookup_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // table load
  input  cfg_wr_t               cfg,
  // lookup lanes
  input  logic                  valid_i [NUM_LANES],
  input  logic [ADDR_W-1:0]     addr    [NUM_LANES],
  output logic                  valid_o [NUM_LANES],
  output lookup_result_t        result  [NUM_LANES],
  // off-chip G/AUX memories: [off-chip group][lane]
  output logic                  ext_rd_en   [NUM_EXT][NUM_LANES],
  output logic [EXT_GIN-1:0]    ext_rd_addr [NUM_EXT][NUM_LANES],
  input  logic [EXT_GW-1:0]     ext_rd_data [NUM_EXT][NUM_LANES],
  output logic                  ext_we      [NUM_EXT],
  output logic [EXT_GIN-1:0]    ext_waddr   [NUM_EXT],
  output logic [EXT_GW-1:0]     ext_wdata   [NUM_EXT]
);

  localparam int unsigned KEY_W   = GRP_W + MAX_IDX_W;

  logic [KEY_W-1:0] key    [NUM_LANES][NUM_GROUPS];
  logic             igu_v  [NUM_GROUPS][NUM_LANES];

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_igu
    localparam int unsigned L     = int'(GROUP_CFG[g].len);
    localparam int unsigned IDX_W = idx_w(int'(GROUP_CFG[g].n_prefix));
    localparam int unsigned H_IN  = int'(GROUP_CFG[g].h_in);
    localparam int unsigned H_OUT = int'(GROUP_CFG[g].h_out);
    localparam int unsigned G_IN  = int'(GROUP_CFG[g].g_in);
    localparam bit          EXT   = GROUP_CFG[g].ext;
    localparam int unsigned GW    = IDX_W + L;
    localparam int unsigned SLOT  = (g == int'(EXT_GROUP[1])) ? 1 : 0;

    logic             sel;
    logic [IDX_W-1:0] idx       [NUM_LANES];
    logic             rd_en     [NUM_LANES];
    logic [G_IN-1:0]  rd_addr   [NUM_LANES];
    logic [GW-1:0]    rd_data   [NUM_LANES];
    logic             we;
    logic [G_IN-1:0]  waddr;
    logic [GW-1:0]    wdata;

    assign sel = cfg.we && (cfg.group == GRP_W'(g));

    igu #(
      .L(L), .IDX_W(IDX_W), .H_IN(H_IN), .H_OUT(H_OUT), .G_IN(G_IN),
      .EXT(EXT), .G_LAT(SRAM_LAT), .LANES(NUM_LANES)
    ) u_igu (
      .clk, .rst_n,
      .cfg_we     (sel),
      .cfg_target (cfg.target),
      .cfg_addr   (cfg.addr),
      .cfg_data   (cfg.data),
      .valid_i    (valid_i),
      .addr       (addr),
      .valid_o    (igu_v[g]),
      .idx        (idx),
      .ext_rd_en  (rd_en),
      .ext_rd_addr(rd_addr),
      .ext_rd_data(rd_data),
      .ext_we     (we),
      .ext_waddr  (waddr),
      .ext_wdata  (wdata)
    );

    for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_key
      assign key[ln][g] = (idx[ln] != '0) ? {GRP_W'(g + 1), MAX_IDX_W'(idx[ln])} : '0;
    end

    if (EXT) begin : g_ext
      for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_lane
        assign ext_rd_en[SLOT][ln]   = rd_en[ln];
        assign ext_rd_addr[SLOT][ln] = EXT_GIN'(rd_addr[ln]);
        assign rd_data[ln]           = ext_rd_data[SLOT][ln][GW-1:0];
      end
      assign ext_we[SLOT]    = we;
      assign ext_waddr[SLOT] = EXT_GIN'(waddr);
      assign ext_wdata[SLOT] = EXT_GW'(wdata);
    end else begin : g_onchip
      for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_lane
        assign rd_data[ln] = '0;
      end
    end
  end

  for (genvar ln = 0; ln < NUM_LANES; ln++) begin : g_sel
    logic [KEY_W-1:0] res;
    max_selector_cascade #(.N(NUM_GROUPS), .KEY_W(KEY_W)) u_cascade (
      .clk, .rst_n,
      .valid_i(igu_v[0][ln]),
      .key    (key[ln]),
      .valid_o(valid_o[ln]),
      .result (res)
    );
    assign result[ln] = lookup_result_t'(res);

    // every IGU runs the same pipeline, so their valid flags agree
    for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_chk
      a_igu_aligned: assert property (@(posedge clk) disable iff (!rst_n)
        igu_v[g][ln] == igu_v[0][ln])
        else $error("IGU %0d lane %0d out of step", g, ln);
    end
  end

endmodule
