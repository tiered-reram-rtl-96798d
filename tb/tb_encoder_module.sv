// Testbench for encoder_module: random lines of every compressibility, written
// to both segments, against the reference cell image (compression, CIDM or
// CFS, and the flag cells).
`include "tb_check.svh"
module tb_encoder_module;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  line_t              line;
  logic               near_seg;
  cells_t             cells;
  idm_t               idm;
  dfs_t               dfs;
  logic [SAVED_W-1:0] saved;

  encoder_module dut (.line, .near_seg, .cells, .idm, .dfs, .saved);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int rc[175], sv;
      line     = gen_line(i % 9);
      near_seg = 1'(i % 2);
      #1;
      ref_image(line, near_seg, rc, sv);
      `CHECK(int'(saved) == sv, $sformatf("line %0d saved %0d exp %0d", i, saved, sv))
      for (int c = 0; c < 175; c++)
        `CHECK(int'(cells[c]) == rc[c], $sformatf("line %0d near %0d cell %0d: %0d exp %0d", i, near_seg, c, cells[c], rc[c]))
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
