// fpc_line_decomp: rebuilds a 512-bit cache line from its FPC stream.
//
// The stream holds the word codes MSB first, Word7 at the top, as written by
// fpc_line_comp; `comp_flags` says which words carry an FPC prefix. Eight
// fpc_word_decomp instances are chained: each one sees the stream shifted left
// by the bits the words above it used. Bits below the packed data are ignored,
// so the free space may hold anything (0-DFS flip flags, for instance).
// Combinational.
module fpc_line_decomp
  import tr_pkg::*;
(
  input  line_t            stream,
  input  logic [WORDS-1:0] comp_flags,
  output line_t            line
);

  logic [SAVED_W-1:0] pos [WORDS+1];   // bits consumed before word i (from the top)
  logic [66:0]        win [WORDS];
  logic [6:0]         len [WORDS];
  line_t              shifted [WORDS];

  assign pos[WORDS] = '0;

  for (genvar i = WORDS - 1; i >= 0; i--) begin : g_word
    assign shifted[i] = stream << pos[i+1];
    assign win[i]     = shifted[i][LINE_W-1 -: 67];
    fpc_word_decomp u_decomp (
      .comp (comp_flags[i]),
      .win  (win[i]),
      .word (line[i*WORD_W +: WORD_W]),
      .len  (len[i])
    );
    assign pos[i] = pos[i+1] + SAVED_W'(len[i]);
  end

endmodule
