// fpc_word_decomp: expands one word of an FPC-compressed stream.
//
// `win` is the stream from the current read position onward, MSB first. When
// the word's compression flag `comp` is 1, win[66:64] is the 3-bit prefix and
// the payload follows it; otherwise win[66:3] is the raw 64-bit word. The
// module returns the word and the number of stream bits it used (`len`), so a
// line decompressor can chain eight of these. Prefix 111 is never written by
// the compressor; it decodes as a zero word of 3 bits. Combinational.
// The pattern set follows the published FPC table (see fpc_word_comp).
module fpc_word_decomp
  import tr_pkg::*;
(
  input  logic              comp,
  input  logic [66:0]       win,
  output logic [WORD_W-1:0] word,
  output logic [6:0]        len
);

  logic [2:0]  prefix;
  logic [63:0] pl;      // payload, MSB-aligned after the prefix

  always_comb begin
    prefix = win[66:64];
    pl     = win[63:0];
    word   = '0;
    len    = 7'd3;
    if (!comp) begin
      word = win[66:3];
      len  = 7'd64;
    end else begin
      case (prefix)
        3'b000: begin word = '0; len = 7'd3; end
        3'b001: begin word = {{56{pl[63]}}, pl[63:56]}; len = 7'd11; end
        3'b010: begin word = {{48{pl[63]}}, pl[63:48]}; len = 7'd19; end
        3'b011: begin word = {{32{pl[63]}}, pl[63:32]}; len = 7'd35; end
        3'b100: begin word = {pl[63:32], 32'd0}; len = 7'd35; end
        3'b101: begin
          word = {{16{pl[63]}}, pl[63:48], {16{pl[47]}}, pl[47:32]};
          len  = 7'd35;
        end
        3'b110: begin word = {4{pl[63:48]}}; len = 7'd19; end
        default: begin word = '0; len = 7'd3; end
      endcase
    end
  end

endmodule
