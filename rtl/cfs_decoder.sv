// cfs_decoder: reverses cfs_encoder for a line read from the far segment.
//
// For the word size W given by the stored 3-bit 0-DFS flag, every cell i is
// assigned group g = (170 - i) / W, and its MSB is inverted when slot bit g
// (the stored flip flag) is 1. The decoder does not need the compressed
// length: groups that hold data always have valid flags, and whatever the
// other groups do only touches free space, which decompression ignores.
// The result is the 512-bit compressed stream. Combinational.
module cfs_decoder
  import tr_pkg::*;
(
  input  data_cells_t cells,
  input  dfs_t        dfs,
  output line_t       stream
);

  logic [SLOT_W-1:0] slot, slot_w2, slot_w4, slot_w8, slot_w16, res;

  function automatic logic [SLOT_W-1:0] dfs_undo(input logic [SLOT_W-1:0] s,
                                                 input int w);
    logic [SLOT_W-1:0] r;
    r = s;
    for (int i = 0; i < int'(DATA_CELLS); i++)
      if (s[(int'(DATA_CELLS) - 1 - i) / w]) r[3*i+2] = ~s[3*i+2];
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(DATA_CELLS); i++) slot[3*i +: 3] = cells[i];
    slot_w2  = dfs_undo(slot, 2);
    slot_w4  = dfs_undo(slot, 4);
    slot_w8  = dfs_undo(slot, 8);
    slot_w16 = dfs_undo(slot, 16);
    case (dfs)
      DFS_W2:  res = slot_w2;
      DFS_W4:  res = slot_w4;
      DFS_W8:  res = slot_w8;
      DFS_W16: res = slot_w16;
      default: res = slot;
    endcase
    stream = res[SLOT_W-1:1];
  end

endmodule
