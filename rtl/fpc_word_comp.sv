// fpc_word_comp: Frequent Pattern Compression of one 64-bit word.
//
// The word is checked against the seven 64-bit FPC patterns, each marked by a
// 3-bit prefix:
//   000 zero word (3 bits)             001 8-bit sign-extended (11 bits)
//   010 16-bit sign-extended (19)      011 32-bit sign-extended (35)
//   100 upper 32 bits, lower 32 zero (35)
//   101 two 32-bit halves, each a sign-extended 16-bit value (35)
//   110 one 16-bit value repeated four times (19)
// The shortest matching pattern wins. A word that matches none is kept as is
// (64 bits, comp = 0); the per-word compression flag of the line marks it, so
// no prefix is spent on it. `code` holds prefix and payload right-aligned,
// `len` its length in bits. Purely combinational.
// The patterns, prefixes and sizes follow the published FPC table; for pattern
// 101 the table's worked example (0xFFFFBEEF00003CAB -> 0x5BEEF3CAB) is
// followed, i.e. each half is a sign-extended 16-bit value.
module fpc_word_comp
  import tr_pkg::*;
(
  input  logic [WORD_W-1:0] word,
  output logic              comp,   // 1: an FPC pattern matched
  output logic [WORD_W-1:0] code,   // prefix & payload, right-aligned
  output logic [6:0]        len     // bits in code (3..35, or 64)
);

  logic [63:0] se8, se16, se32, rep16;
  logic [31:0] hi_se16, lo_se16;

  always_comb begin
    se8     = {{56{word[7]}},  word[7:0]};
    se16    = {{48{word[15]}}, word[15:0]};
    se32    = {{32{word[31]}}, word[31:0]};
    rep16   = {4{word[15:0]}};
    hi_se16 = {{16{word[47]}}, word[47:32]};
    lo_se16 = {{16{word[15]}}, word[15:0]};

    comp = 1'b1;
    code = '0;
    len  = 7'd64;
    if (word == 64'd0) begin
      code = 64'b000;
      len  = 7'd3;
    end else if (word == se8) begin
      code = {53'd0, 3'b001, word[7:0]};
      len  = 7'd11;
    end else if (word == se16) begin
      code = {45'd0, 3'b010, word[15:0]};
      len  = 7'd19;
    end else if (word == rep16) begin
      code = {45'd0, 3'b110, word[15:0]};
      len  = 7'd19;
    end else if (word == se32) begin
      code = {29'd0, 3'b011, word[31:0]};
      len  = 7'd35;
    end else if (word[31:0] == 32'd0) begin
      code = {29'd0, 3'b100, word[63:32]};
      len  = 7'd35;
    end else if (word[63:32] == hi_se16 && word[31:0] == lo_se16) begin
      code = {29'd0, 3'b101, word[47:32], word[15:0]};
      len  = 7'd35;
    end else begin
      comp = 1'b0;
      code = word;
      len  = 7'd64;
    end
  end

endmodule
