// fpc_line_comp: compresses a 512-bit cache line word by word with FPC and
// packs the result.
//
// Each of the eight 64-bit words goes through fpc_word_comp. The codes are
// packed MSB first, Word7 at the top, into a 512-bit stream; the bits left
// free below the packed data are set to 1 (the IDM and 0-DFS encoders map
// all-ones to the fastest cell state). `comp_flags[i]` says whether word i was
// compressed (8-bit compression flag of the line); `saved` is the total saved
// space, 512 minus the packed length, 0..488. Combinational.
// Packing order and saved-space bookkeeping follow the published encoder
// figures; filling free bits with ones is this design's choice.
module fpc_line_comp
  import tr_pkg::*;
(
  input  line_t               line,
  output line_t               stream,
  output logic [WORDS-1:0]    comp_flags,
  output logic [SAVED_W-1:0]  saved
);

  logic [WORD_W-1:0] code [WORDS];
  logic [6:0]        len  [WORDS];

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    fpc_word_comp u_comp (
      .word (line[i*WORD_W +: WORD_W]),
      .comp (comp_flags[i]),
      .code (code[i]),
      .len  (len[i])
    );
  end

  line_t             acc;
  logic [SAVED_W-1:0] used;
  logic [SAVED_W-1:0] free_bits;

  always_comb begin
    acc  = '0;
    used = '0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      acc  = (acc << len[i]) | line_t'(code[i]);
      used = used + SAVED_W'(len[i]);
    end
    free_bits = SAVED_W'(LINE_W) - used;
    saved     = free_bits;
    stream    = (acc << free_bits) | ~(line_t'('1) << free_bits);
  end

endmodule
