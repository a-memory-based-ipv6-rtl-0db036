// ipv6_lookup_pkg -- types and constants shared by the parallel-IGU IPv6
// prefix lookup engine.
//
// The engine looks up the 64-bit network prefix of an IPv6 address. The
// prefix table is split into NUM_GROUPS groups of prefix lengths; each group
// is served by one index generation unit (IGU). GROUP_CFG lists, per group,
// the prefix lengths it holds (shorter prefixes are expanded to the group's
// longest length), its number of prefixes, and the sizes of its H memory
// (row-shift table) and G/AUX memory (index plus stored prefix). The numbers
// follow the non-uniform grouping of 340 K pseudo IPv6 prefixes published
// for this architecture; the two largest groups keep their G/AUX memory in
// off-chip SRAM (ext = 1).
//
// A G/AUX memory holds at most one prefix per word, so 2**g_in must be at
// least n_prefix. Three groups of the published table list fewer G/AUX
// address bits than their prefix count needs (34: 4,408 prefixes with 12
// bits; 40: 19,776 with 14; 57-58: 530 with 9); here they get one bit more.
//
// Derived widths: index width = ceil(log2(n_prefix+1)); G/AUX word =
// index width + group prefix length; column variables = g_in - 1 (this
// design's choice: the table does not give the column count).
package ipv6_lookup_pkg;

  localparam int unsigned ADDR_W     = 64;  // network prefix part of an IPv6 address
  localparam int unsigned NUM_LANES  = 2;   // two lookups per clock (dual-port memories)
  localparam int unsigned NUM_GROUPS = 28;
  localparam int unsigned MAX_IDX_W  = 17;  // widest local index (largest group)
  localparam int unsigned GRP_W      = 5;   // group code: 0 = no match, g+1 = group g
  localparam int unsigned MAX_GWORD  = 73;  // widest G/AUX word (9 + 64)
  localparam int unsigned SEL_W      = 6;   // selects one of 64 prefix bits
  localparam int unsigned CFG_ADDR_W = 17;
  localparam int unsigned CFG_DATA_W = MAX_GWORD;
  localparam int unsigned SRAM_LAT   = 3;   // off-chip read latency in cycles

  typedef struct packed {
    logic [6:0]  lo_len;    // shortest prefix length merged into the group
    logic [6:0]  len;       // group prefix length after expansion
    logic [17:0] n_prefix;  // prefixes in the group (sets the index width)
    logic [4:0]  h_in;      // H memory address bits (row variables)
    logic [4:0]  h_out;     // H memory word bits (row shift)
    logic [4:0]  g_in;      // G/AUX memory address bits
    logic        ext;       // G/AUX memory is off-chip SRAM
  } group_cfg_t;

  localparam group_cfg_t GROUP_CFG [NUM_GROUPS] = '{
    '{7'd15, 7'd18, 18'd102,    5'd4,  5'd6,  5'd7,  1'b0},
    '{7'd19, 7'd22, 18'd225,    5'd7,  5'd7,  5'd8,  1'b0},
    '{7'd23, 7'd26, 18'd1571,   5'd10, 5'd11, 5'd11, 1'b0},
    '{7'd27, 7'd28, 18'd806,    5'd6,  5'd11, 5'd11, 1'b0},
    '{7'd29, 7'd30, 18'd1240,   5'd6,  5'd12, 5'd12, 1'b0},
    '{7'd31, 7'd31, 18'd2824,   5'd9,  5'd12, 5'd12, 1'b0},
    '{7'd32, 7'd32, 18'd8474,   5'd9,  5'd14, 5'd14, 1'b0},
    '{7'd33, 7'd33, 18'd1469,   5'd8,  5'd11, 5'd11, 1'b0},
    '{7'd34, 7'd34, 18'd4408,   5'd10, 5'd12, 5'd13, 1'b0},  // published g_in 12
    '{7'd35, 7'd35, 18'd2318,   5'd10, 5'd11, 5'd13, 1'b0},
    '{7'd36, 7'd36, 18'd6957,   5'd11, 5'd13, 5'd13, 1'b0},
    '{7'd37, 7'd37, 18'd4079,   5'd13, 5'd12, 5'd12, 1'b0},
    '{7'd38, 7'd38, 18'd12237,  5'd14, 5'd14, 5'd14, 1'b0},
    '{7'd39, 7'd39, 18'd6592,   5'd12, 5'd12, 5'd13, 1'b0},
    '{7'd40, 7'd40, 18'd19776,  5'd13, 5'd14, 5'd15, 1'b0},  // published g_in 14
    '{7'd41, 7'd41, 18'd6874,   5'd13, 5'd13, 5'd13, 1'b0},
    '{7'd42, 7'd42, 18'd20623,  5'd14, 5'd15, 5'd15, 1'b0},
    '{7'd43, 7'd43, 18'd9451,   5'd14, 5'd14, 5'd14, 1'b0},
    '{7'd44, 7'd44, 18'd28354,  5'd13, 5'd15, 5'd15, 1'b0},
    '{7'd45, 7'd47, 18'd123110, 5'd15, 5'd17, 5'd17, 1'b1},
    '{7'd48, 7'd48, 18'd128305, 5'd14, 5'd17, 5'd17, 1'b1},
    '{7'd49, 7'd50, 18'd929,    5'd10, 5'd10, 5'd10, 1'b0},
    '{7'd51, 7'd52, 18'd1048,   5'd11, 5'd11, 5'd11, 1'b0},
    '{7'd53, 7'd54, 18'd594,    5'd9,  5'd10, 5'd10, 1'b0},
    '{7'd55, 7'd56, 18'd421,    5'd8,  5'd9,  5'd9,  1'b0},
    '{7'd57, 7'd58, 18'd530,    5'd9,  5'd9,  5'd10, 1'b0},  // published g_in 9
    '{7'd59, 7'd62, 18'd289,    5'd7,  5'd8,  5'd9,  1'b0},
    '{7'd63, 7'd64, 18'd386,    5'd8,  5'd9,  5'd9,  1'b0}
  };

  // Groups whose G/AUX memory is off-chip, in port order of the engine.
  localparam int unsigned NUM_EXT = 2;
  localparam int unsigned EXT_GROUP [NUM_EXT] = '{19, 20};
  localparam int unsigned EXT_GIN  = 17;  // off-chip G/AUX address bits
  localparam int unsigned EXT_GW   = 65;  // off-chip G/AUX word bits (widest)

  // Index width of a group: enough for indices 1..n_prefix plus 0 = empty.
  function automatic int unsigned idx_w(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Configuration (table load) targets inside one group.
  typedef enum logic [1:0] {
    CFG_H  = 2'd0,  // H memory word: row shift
    CFG_G  = 2'd1,  // G/AUX memory word: {index, stored prefix}
    CFG_LT = 2'd2   // linear-transformation entry: {xor_en, sel_b, sel_a}
  } cfg_target_e;

  // One configuration write. For CFG_LT, addr selects the transformed
  // variable (0 .. h_in-1: row variables, h_in ..: column variables).
  typedef struct packed {
    logic                  we;
    logic [GRP_W-1:0]      group;   // 0 .. NUM_GROUPS-1
    cfg_target_e           target;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_wr_t;

  // Lookup result of one lane: grp = 0 means no prefix matched.
  typedef struct packed {
    logic [GRP_W-1:0]     grp;
    logic [MAX_IDX_W-1:0] idx;
  } lookup_result_t;

endpackage
