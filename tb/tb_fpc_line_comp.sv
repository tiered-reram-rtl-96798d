// Testbench for fpc_line_comp: random lines of every compressibility against
// the reference compressor (stream, flags, saved space); also checks that the
// saved space reaches both ends of its 0..488 range.
`include "tb_check.svh"
module tb_fpc_line_comp;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  line_t              line, stream;
  logic [WORDS-1:0]   comp_flags;
  logic [SAVED_W-1:0] saved;
  int max_saved = 0, min_saved = 999;

  fpc_line_comp dut (.line, .stream, .comp_flags, .saved);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      bit [511:0] s;
      bit [7:0]   f;
      int         sv;
      line = (i == 0) ? '0 : gen_line(i % 9);
      #1;
      ref_compress(line, s, f, sv);
      `CHECK(stream == s && comp_flags == f && int'(saved) == sv,
             $sformatf("line %0d: saved %0d exp %0d flags %h exp %h", i, saved, sv, comp_flags, f))
      if (sv > max_saved) max_saved = sv;
      if (sv < min_saved) min_saved = sv;
    end
    `CHECK(max_saved == 488 && min_saved == 0, "saved-space range not covered")
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
