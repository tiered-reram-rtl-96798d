// decoder_module: the read-side data path of the Tiered-ReRAM controller.
//
// The four flag cells of a line give back the 8-bit compression flag and the
// scheme flag (see encoder_module for the layout). Near-segment lines go
// through cidm_decoder, far-segment lines through cfs_decoder; both yield the
// compressed stream, which fpc_line_decomp expands to the 512-bit line.
// Combinational.
module decoder_module
  import tr_pkg::*;
(
  input  cells_t cells,
  input  logic   near_seg,
  output line_t  line
);

  logic [11:0]      flag_bits;
  logic [WORDS-1:0] comp_flags;
  idm_t             idm;
  dfs_t             dfs;
  line_t            cidm_stream, cfs_stream, stream;

  always_comb begin
    for (int k = 0; k < int'(FLAG_CELLS); k++)
      flag_bits[3*k +: 3] = cells[int'(DATA_CELLS) + k];
    comp_flags = flag_bits[7:0];
    idm        = idm_t'(flag_bits[9:8]);
    dfs        = dfs_t'(flag_bits[10:8]);
  end

  cidm_decoder u_cidm (
    .cells  (cells[DATA_CELLS-1:0]),
    .idm    (idm),
    .stream (cidm_stream)
  );

  cfs_decoder u_cfs (
    .cells  (cells[DATA_CELLS-1:0]),
    .dfs    (dfs),
    .stream (cfs_stream)
  );

  assign stream = near_seg ? cidm_stream : cfs_stream;

  fpc_line_decomp u_decomp (
    .stream     (stream),
    .comp_flags (comp_flags),
    .line       (line)
  );

endmodule
