// Testbench for cfs_decoder: random streams are flipped by the reference CFS
// model; the decoder must return the top 512 - saved bits for every 0-DFS
// word size, without being told the compressed length.
`include "tb_check.svh"
module tb_cfs_decoder;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  data_cells_t cells;
  dfs_t        dfs;
  line_t       stream;
  int          seen[5] = '{default: 0};

  cfs_decoder dut (.cells, .dfs, .stream);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sv, rc[171];
      bit [511:0] s;
      bit ok;
      sv = int'($urandom() % 489);
      s  = '1;
      for (int b = 511; b >= sv; b--) s[b] = ($urandom() % 4) != 0;
      ref_cfs(s, sv, rc);
      for (int c = 0; c < 171; c++) cells[c] = 3'(rc[c]);
      dfs = dfs_t'(ref_dfs(sv));
      seen[ref_dfs(sv)]++;
      #1;
      ok = 1;
      for (int b = 511; b >= sv; b--) if (stream[b] != s[b]) ok = 0;
      `CHECK(ok, $sformatf("saved %0d: stream mismatch", sv))
    end
    for (int m = 0; m < 5; m++) `CHECK(seen[m] > 0, $sformatf("0-DFS %0d never used", m))
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
