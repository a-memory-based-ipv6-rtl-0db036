// igu -- index generation unit with linear transformation and row-shift
// decomposition, serving two lookup lanes.
//
// An IGU holds one group of prefixes, all of length L (shorter prefixes of
// the group are expanded to L bits when the table is built). For the top L
// bits X of a lookup address it returns the local index (1 .. n) of the
// registered prefix equal to X, or 0.
//
//   1. Linear transformation: EXOR gates form row variables Y2 (H_IN bits)
//      and column variables Y1 (COL_W bits) from X.
//   2. H memory: Y2 addresses the row-shift table; it returns h(Y2).
//   3. Adder: the G/AUX address is h(Y2) + Y1 (unsigned, G_IN bits).
//   4. G/AUX memory: one word {index, stored prefix} per address. On-chip
//      (EXT = 0) it is a dual-port RAM; off-chip (EXT = 1) the address goes
//      out on ext_rd_* and the word returns G_LAT cycles later.
//   5. Comparator and AND gates: index if the stored prefix equals X, else 0.
//
// Every stage is registered (a complete pipeline). Latency from
// (valid_i, addr) to (valid_o, idx) is G_LAT + 4 cycles for both kinds of
// G/AUX memory: an on-chip read is padded to G_LAT cycles so that all IGUs
// of the engine line up. One lookup per lane per clock.
//
// Configuration (cfg_we): CFG_H writes cfg_data[H_OUT-1:0] at H address
// cfg_addr; CFG_G writes the word {index, prefix} at G address cfg_addr
// (sent out on ext_we/ext_waddr/ext_wdata one cycle later when EXT = 1);
// CFG_LT writes transformation entry cfg_addr. With EXT = 0 the ext_*
// outputs are tied to 0 and ext_rd_data is ignored; with EXT = 1 no on-chip
// G/AUX RAM exists.
// The structure is the architecture's; the write interface, the padding and
// the column width are this design's.
module igu
  import ipv6_lookup_pkg::*;
#(
  parameter int unsigned L      = 18,           // group prefix length
  parameter int unsigned IDX_W  = 7,            // local index width
  parameter int unsigned H_IN   = 4,            // H memory address bits
  parameter int unsigned H_OUT  = 6,            // row-shift width
  parameter int unsigned G_IN   = 7,            // G/AUX address bits
  parameter int unsigned COL_W  = G_IN - 1,     // column variables
  parameter bit          EXT    = 1'b0,         // G/AUX memory off-chip
  parameter int unsigned G_LAT  = SRAM_LAT,     // G/AUX read latency
  parameter int unsigned LANES  = NUM_LANES,
  localparam int unsigned GW    = IDX_W + L     // G/AUX word width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we,
  input  cfg_target_e           cfg_target,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  logic [CFG_DATA_W-1:0] cfg_data,
  // lookup lanes
  input  logic                  valid_i [LANES],
  input  logic [ADDR_W-1:0]     addr    [LANES],
  output logic                  valid_o [LANES],
  output logic [IDX_W-1:0]      idx     [LANES],
  // off-chip G/AUX memory (used when EXT = 1)
  output logic                  ext_rd_en   [LANES],
  output logic [G_IN-1:0]       ext_rd_addr [LANES],
  input  logic [GW-1:0]         ext_rd_data [LANES],
  output logic                  ext_we,
  output logic [G_IN-1:0]       ext_waddr,
  output logic [GW-1:0]         ext_wdata
);

  // the on-chip memories have two read ports: one or two lanes
  if (LANES < 1 || LANES > 2) begin : g_lanes_check
    $error("igu supports one or two lookup lanes");
  end

  // ---------------------------------------------------------------- config
  logic h_we, g_we, lt_we;
  assign h_we  = cfg_we && (cfg_target == CFG_H);
  assign g_we  = cfg_we && (cfg_target == CFG_G);
  assign lt_we = cfg_we && (cfg_target == CFG_LT);

  // -------------------------------------------------- stage 1: linear transf.
  logic [L-1:0]     x0 [LANES];
  logic [H_IN-1:0]  y_row [LANES];
  logic [COL_W-1:0] y_col [LANES];

  for (genvar ln = 0; ln < LANES; ln++) begin : g_x0
    assign x0[ln] = addr[ln][ADDR_W-1 -: L];
  end

  igu_lin_transform #(.L(L), .H_IN(H_IN), .COL_W(COL_W), .LANES(LANES)) u_lt (
    .clk, .rst_n,
    .cfg_we  (lt_we),
    .cfg_addr(cfg_addr[$clog2(H_IN+COL_W)-1:0]),
    .cfg_data(cfg_data[2*SEL_W:0]),
    .x       (x0),
    .y_row   (y_row),
    .y_col   (y_col)
  );

  // ------------------------------------------------------ stage 2: H memory
  logic [H_OUT-1:0] h [LANES];

  dp_ram #(.ADDR_W(H_IN), .DATA_W(H_OUT)) u_hmem (
    .clk,
    .we    (h_we),
    .waddr (cfg_addr[H_IN-1:0]),
    .wdata (cfg_data[H_OUT-1:0]),
    .raddr0(y_row[0]), .rdata0(h[0]),
    .raddr1(y_row[LANES-1]), .rdata1(h[LANES-1])
  );

  // ---------------------------------------- pipeline of X, valid and Y1
  localparam int unsigned XD = 3 + G_LAT;  // X is needed at the comparator
  logic [L-1:0]     x_pipe [LANES][1:XD];
  logic             v_pipe [LANES][1:XD];
  logic [COL_W-1:0] col2   [LANES];
  logic [G_IN-1:0]  gaddr  [LANES];

  for (genvar ln = 0; ln < LANES; ln++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 1; s <= XD; s++) v_pipe[ln][s] <= 1'b0;
      end else begin
        v_pipe[ln][1] <= valid_i[ln];
        for (int s = 2; s <= XD; s++) v_pipe[ln][s] <= v_pipe[ln][s-1];
      end
    end
    always_ff @(posedge clk) begin
      x_pipe[ln][1] <= x0[ln];
      for (int s = 2; s <= XD; s++) x_pipe[ln][s] <= x_pipe[ln][s-1];
      col2[ln]  <= y_col[ln];
      // stage 3: adder, h(Y2) + Y1
      gaddr[ln] <= G_IN'(h[ln]) + G_IN'(col2[ln]);
    end
  end

  // ---------------------------------------------- stage 4: G/AUX memory
  logic [GW-1:0] gword [LANES];

  if (EXT) begin : g_ext
    for (genvar ln = 0; ln < LANES; ln++) begin : g_lane
      assign ext_rd_en[ln]   = v_pipe[ln][3];
      assign ext_rd_addr[ln] = gaddr[ln];
      assign gword[ln]       = ext_rd_data[ln];
    end
    // the off-chip write is registered on its way out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ext_we <= 1'b0;
      else        ext_we <= g_we;
    end
    always_ff @(posedge clk) begin
      ext_waddr <= cfg_addr[G_IN-1:0];
      ext_wdata <= cfg_data[GW-1:0];
    end
  end else begin : g_onchip
    logic [GW-1:0] rd [LANES];
    dp_ram #(.ADDR_W(G_IN), .DATA_W(GW)) u_gmem (
      .clk,
      .we    (g_we),
      .waddr (cfg_addr[G_IN-1:0]),
      .wdata (cfg_data[GW-1:0]),
      .raddr0(gaddr[0]), .rdata0(rd[0]),
      .raddr1(gaddr[LANES-1]), .rdata1(rd[LANES-1])
    );
    // pad the one-cycle on-chip read to G_LAT cycles
    for (genvar ln = 0; ln < LANES; ln++) begin : g_lane
      if (G_LAT > 1) begin : g_pad
        logic [GW-1:0] pad [1:G_LAT-1];
        always_ff @(posedge clk) begin
          pad[1] <= rd[ln];
          for (int s = 2; s < G_LAT; s++) pad[s] <= pad[s-1];
        end
        assign gword[ln] = pad[G_LAT-1];
      end else begin : g_nopad
        assign gword[ln] = rd[ln];
      end
      assign ext_rd_en[ln]   = 1'b0;
      assign ext_rd_addr[ln] = '0;
    end
    assign ext_we    = 1'b0;
    assign ext_waddr = '0;
    assign ext_wdata = '0;
  end

  // ------------------------------------- stage 5: comparator and AND gates
  for (genvar ln = 0; ln < LANES; ln++) begin : g_match
    igu_match #(.L(L), .IDX_W(IDX_W)) u_match (
      .clk, .rst_n,
      .valid_i (v_pipe[ln][XD]),
      .x       (x_pipe[ln][XD]),
      .stored  (gword[ln][L-1:0]),
      .cand_idx(gword[ln][GW-1:L]),
      .valid_o (valid_o[ln]),
      .idx     (idx[ln])
    );
  end

endmodule
