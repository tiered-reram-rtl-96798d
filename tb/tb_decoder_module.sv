// Testbench for decoder_module: reference cell images of random lines for both
// segments, with random bits in cells the encoding leaves free, must decode
// back to the original line.
`include "tb_check.svh"
module tb_decoder_module;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  cells_t cells;
  logic   near_seg;
  line_t  line;

  decoder_module dut (.cells, .near_seg, .line);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int rc[175], sv;
      bit [511:0] l;
      l        = gen_line(i % 9);
      near_seg = 1'(i % 2);
      ref_image(l, near_seg, rc, sv);
      for (int c = 0; c < 175; c++) cells[c] = 3'(rc[c]);
      #1;
      `CHECK(line == l, $sformatf("line %0d near %0d saved %0d mismatch", i, near_seg, sv))
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
