// Testbench for fpc_line_decomp: random lines are compressed by the reference
// model, the free space is filled with random bits, and the line must come
// back unchanged.
`include "tb_check.svh"
module tb_fpc_line_decomp;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  line_t            line, stream;
  logic [WORDS-1:0] comp_flags;

  fpc_line_decomp dut (.stream, .comp_flags, .line);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      bit [511:0] l, s;
      bit [7:0]   f;
      int         sv;
      l = gen_line(i % 9);
      ref_compress(l, s, f, sv);
      for (int b = 0; b < sv; b++) s[b] = 1'($urandom());
      stream = s; comp_flags = f;
      #1;
      `CHECK(line == l, $sformatf("line %0d (saved %0d) mismatch", i, sv))
    end
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
