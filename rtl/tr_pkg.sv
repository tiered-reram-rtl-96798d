// tr_pkg: types, constants and small functions shared by the Tiered-ReRAM
// memory controller.
//
// A 512-bit cache line (eight 64-bit words) is stored in DATA_CELLS = 171
// triple-level (TLC) cells, which hold 513 bits when every cell keeps three
// bits. Another FLAG_CELLS = 4 cells hold the 8 per-word compression flags and
// the 2-bit IDM flag or 3-bit 0-DFS flag. The selection thresholds, the FPC
// prefixes, the per-state program-and-verify latency/energy and the DDR3 timing
// values are the design's published numbers. The cell-to-bit mapping of
// IDM((8,6),2), the flag-cell layout, the tCK and the near-segment scaling of
// the latency/energy tables are this implementation's own choices (see the
// comments at each item).
package tr_pkg;

  localparam int unsigned WORD_W     = 64;
  localparam int unsigned WORDS      = 8;
  localparam int unsigned LINE_W     = WORD_W * WORDS;   // 512
  localparam int unsigned SAVED_W    = 10;               // saved space 0..488
  localparam int unsigned DATA_CELLS = 171;              // ceil(512/3)
  localparam int unsigned FLAG_CELLS = 4;                // 12 flag bits
  localparam int unsigned CELLS      = DATA_CELLS + FLAG_CELLS;
  localparam int unsigned SLOT_W     = 3 * DATA_CELLS;   // 513 bits

  // A TLC cell state S0..S7; the value is the 3-bit data it holds in CDM.
  typedef logic [2:0] state_t;
  typedef state_t [DATA_CELLS-1:0] data_cells_t;
  typedef state_t [CELLS-1:0]      cells_t;              // [174:171] flag cells
  typedef logic [LINE_W-1:0]       line_t;

  // 2-bit IDM flag (near segment), as in the CIDM selection table.
  typedef enum logic [1:0] {
    IDM_CDM  = 2'b00,   // conventional mapping, 3 bits per cell
    IDM_86_2 = 2'b01,   // IDM((8,6),2): 5 bits in 2 cells of 6 states
    IDM_84_1 = 2'b10,   // IDM((8,4),1): 2 bits per cell, 4 states
    IDM_82_1 = 2'b11    // IDM((8,2),1): 1 bit per cell, 2 states
  } idm_t;

  // 3-bit 0-DFS flag (far segment), as in the CFS selection table.
  typedef enum logic [2:0] {
    DFS_W2   = 3'b000,
    DFS_W4   = 3'b001,
    DFS_W8   = 3'b010,
    DFS_W16  = 3'b011,
    DFS_NONE = 3'b100
  } dfs_t;

  // Most appropriate IDM for a line that compression shrank by `saved` bits.
  function automatic idm_t select_idm(input logic [SAVED_W-1:0] saved);
    if (saved >= 10'd341)      return IDM_82_1;
    else if (saved >= 10'd170) return IDM_84_1;
    else if (saved >= 10'd85)  return IDM_86_2;
    else                       return IDM_CDM;
  endfunction

  // Most appropriate 0-DFS word size for a line that saved `saved` bits.
  function automatic dfs_t select_dfs(input logic [SAVED_W-1:0] saved);
    if (saved >= 10'd74)      return DFS_W2;
    else if (saved >= 10'd40) return DFS_W4;
    else if (saved >= 10'd21) return DFS_W8;
    else if (saved >= 10'd11) return DFS_W16;
    else                      return DFS_NONE;
  endfunction

  // IDM state order: the TLC states sorted by program-and-verify latency,
  // fastest first (S7 14.2 ns, S6 95.4, S5 192, S0 255.2, S1 286.8, S4 290).
  // An IDM with q states uses the first q of them; a group of data bits b is
  // written as state idm_state(~b), so all-ones data lands in S7.
  function automatic state_t idm_state(input logic [2:0] idx);
    case (idx)
      3'd0: return 3'd7;
      3'd1: return 3'd6;
      3'd2: return 3'd5;
      3'd3: return 3'd0;
      3'd4: return 3'd1;
      default: return 3'd4;
    endcase
  endfunction

  // Inverse of idm_state. S2 and S3 are never written by an IDM; they read
  // back as index 0.
  function automatic logic [2:0] idm_index(input state_t s);
    case (s)
      3'd7: return 3'd0;
      3'd6: return 3'd1;
      3'd5: return 3'd2;
      3'd0: return 3'd3;
      3'd1: return 3'd4;
      3'd4: return 3'd5;
      default: return 3'd0;
    endcase
  endfunction

  // Worst-case program-and-verify latency (ps) and energy (fJ) per TLC state
  // in the far segment (the published per-state table).
  function automatic int unsigned far_latency_ps(input state_t s);
    case (s)
      3'd7: return 14200;
      3'd6: return 95400;
      3'd5: return 192000;
      3'd4: return 290000;
      3'd3: return 383000;
      3'd2: return 338300;
      3'd1: return 286800;
      default: return 255200;
    endcase
  endfunction

  function automatic int unsigned far_energy_fj(input state_t s);
    case (s)
      3'd7: return 1800;
      3'd6: return 13400;
      3'd5: return 24300;
      3'd4: return 46800;
      3'd3: return 94000;
      3'd2: return 66400;
      3'd1: return 41100;
      default: return 33600;
    endcase
  endfunction

  // Near segment: the published 60 % latency and 58 % energy reductions
  // applied uniformly to every state (latency x 0.40, energy x 0.42), a
  // simplification of this model; the values are spelled out so that no
  // divider is built.
  function automatic int unsigned near_latency_ps(input state_t s);
    case (s)
      3'd7: return 5680;
      3'd6: return 38160;
      3'd5: return 76800;
      3'd4: return 116000;
      3'd3: return 153200;
      3'd2: return 135320;
      3'd1: return 114720;
      default: return 102080;
    endcase
  endfunction

  function automatic int unsigned near_energy_fj(input state_t s);
    case (s)
      3'd7: return 756;
      3'd6: return 5628;
      3'd5: return 10206;
      3'd4: return 19656;
      3'd3: return 39480;
      3'd2: return 27888;
      3'd1: return 17262;
      default: return 14112;
    endcase
  endfunction

  function automatic int unsigned state_latency_ps(input state_t s, input logic near_seg);
    return near_seg ? near_latency_ps(s) : far_latency_ps(s);
  endfunction

  function automatic int unsigned state_energy_fj(input state_t s, input logic near_seg);
    return near_seg ? near_energy_fj(s) : far_energy_fj(s);
  endfunction

  // ReRAM timing (ns values from the published configuration, in ps).
  localparam int unsigned T_RCD_PS = 18000;
  localparam int unsigned T_CL_PS  = 15000;
  localparam int unsigned T_CWD_PS = 13000;
  localparam int unsigned T_WTR_PS = 7500;
  // Controller clock: DDR3-1333 bus clock, tCK = 1.5 ns.
  localparam int unsigned TCK_PS   = 1500;

  function automatic int unsigned ps_to_cycles(input int unsigned ps);
    return (ps + TCK_PS - 1) / TCK_PS;
  endfunction

endpackage
