// cfs_encoder: compression-based flip scheme (CFS) for the far segment.
//
// Most of a far-segment write's energy goes into sneak currents through
// half-selected low-resistance cells, so CFS raises the share of cells whose
// MSB is 0 (high-resistance states S0..S3), using the space that compression
// freed to hold the flip flags.
//
// The compressed line (`stream`, MSB-aligned) is laid into the 513-bit slot
// {stream, 1'b1}, three bits per cell, cell 170 at the top. A cell is occupied
// when its MSB (slot bit 3i+2) lies in the compressed data, i.e.
// 3i+1 >= saved. The saved space selects the 0-DFS word size W:
//   saved >= 74: W=2   >= 40: W=4   >= 21: W=8   >= 11: W=16   else none
// The MSBs of the occupied cells are cut into groups of W, counted from cell
// 170 down (the last group may be short). A group with more 1s than 0s is
// inverted and its flip flag set. The flag of group g is written into slot bit
// g, at the bottom of the free space; the thresholds guarantee that the flags
// never reach the data. The thresholds and the 3-bit flag values follow the
// published selection table; the flip rule (majority of 1s), the group order
// and the flag placement are this design's choices. Combinational.
module cfs_encoder
  import tr_pkg::*;
(
  input  line_t               stream,
  input  logic [SAVED_W-1:0]  saved,
  output dfs_t                dfs,
  output data_cells_t         cells
);

  logic [DATA_CELLS-1:0] occ;
  logic [SLOT_W-1:0]     slot, slot_w2, slot_w4, slot_w8, slot_w16, res;

  // Apply 0-DFS with word size w to the occupied cells of a slot.
  function automatic logic [SLOT_W-1:0] dfs_apply(input logic [SLOT_W-1:0] s,
                                                  input logic [DATA_CELLS-1:0] oc,
                                                  input int w);
    logic [SLOT_W-1:0] r;
    int                ones, n, idx;
    logic              flip;
    r = s;
    for (int g = 0; g < (int'(DATA_CELLS) + w - 1) / w; g++) begin
      ones = 0;
      n    = 0;
      for (int k = 0; k < w; k++) begin
        idx = int'(DATA_CELLS) - 1 - g*w - k;
        if (idx >= 0 && oc[idx]) begin
          n++;
          if (s[3*idx+2]) ones++;
        end
      end
      flip = (2 * ones > n);
      for (int k = 0; k < w; k++) begin
        idx = int'(DATA_CELLS) - 1 - g*w - k;
        if (idx >= 0 && oc[idx] && flip) r[3*idx+2] = ~s[3*idx+2];
      end
      if (oc[int'(DATA_CELLS) - 1 - g*w]) r[g] = flip;
    end
    return r;
  endfunction

  always_comb begin
    dfs  = select_dfs(saved);
    slot = {stream, 1'b1};
    for (int i = 0; i < int'(DATA_CELLS); i++)
      occ[i] = (11'(3*i + 1) >= {1'b0, saved});
    slot_w2  = dfs_apply(slot, occ, 2);
    slot_w4  = dfs_apply(slot, occ, 4);
    slot_w8  = dfs_apply(slot, occ, 8);
    slot_w16 = dfs_apply(slot, occ, 16);
    case (dfs)
      DFS_W2:  res = slot_w2;
      DFS_W4:  res = slot_w4;
      DFS_W8:  res = slot_w8;
      DFS_W16: res = slot_w16;
      default: res = slot;
    endcase
    for (int i = 0; i < int'(DATA_CELLS); i++) cells[i] = res[3*i +: 3];
  end

endmodule
