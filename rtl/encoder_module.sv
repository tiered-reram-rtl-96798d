// encoder_module: the write-side data path of the Tiered-ReRAM controller.
//
// A cache line is compressed by FPC (fpc_line_comp). The saved space then
// drives one of two encoders, chosen by the segment the line is written to:
// near segment (near_seg = 1): CIDM, which trades the saved space for fast IDM
// states; far segment: CFS, which spends it on 0-DFS flip flags. Both encoders
// are evaluated and the segment picks one result.
// Output is the full cell image of the line: data cells [170:0] and four
// flag cells [174:171] holding, three bits per cell in CDM,
// flag bits {1'b1, scheme[2:0], comp_flags[7:0]}, where scheme is
// {1'b0, IDM flag} in the near segment and the 0-DFS flag in the far one.
// The flag widths (2-bit IDM, 3-bit 0-DFS, 8-bit compression flag) follow the
// published line formats; packing them into four CDM cells is this design's
// choice. The leading 1 of the flag bits is constant padding that fills the
// 11 flag bits out to the 12 bits of four cells. `idm`, `dfs` and `saved` are exported for
// statistics.
// Combinational.
module encoder_module
  import tr_pkg::*;
(
  input  line_t              line,
  input  logic               near_seg,
  output cells_t             cells,
  output idm_t               idm,
  output dfs_t               dfs,
  output logic [SAVED_W-1:0] saved
);

  line_t            stream;
  logic [WORDS-1:0] comp_flags;
  data_cells_t      cidm_cells, cfs_cells;
  logic [11:0]      flag_bits;

  fpc_line_comp u_comp (
    .line       (line),
    .stream     (stream),
    .comp_flags (comp_flags),
    .saved      (saved)
  );

  cidm_encoder u_cidm (
    .stream (stream),
    .saved  (saved),
    .idm    (idm),
    .cells  (cidm_cells)
  );

  cfs_encoder u_cfs (
    .stream (stream),
    .saved  (saved),
    .dfs    (dfs),
    .cells  (cfs_cells)
  );

  always_comb begin
    flag_bits = {1'b1, (near_seg ? {1'b0, idm} : dfs), comp_flags};
    cells[DATA_CELLS-1:0] = near_seg ? cidm_cells : cfs_cells;
    for (int k = 0; k < int'(FLAG_CELLS); k++)
      cells[int'(DATA_CELLS) + k] = flag_bits[3*k +: 3];
  end

endmodule
