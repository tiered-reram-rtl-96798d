// Testbench for cfs_encoder: random streams with random saved space (every
// 0-DFS word size) against the reference flip model; also checks that the
// flips never leave fewer 0 MSBs among the data cells than the plain mapping.
`include "tb_check.svh"
module tb_cfs_encoder;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  line_t              stream;
  logic [SAVED_W-1:0] saved;
  dfs_t               dfs;
  data_cells_t        cells;
  int                 seen[5] = '{default: 0};

  cfs_encoder dut (.stream, .saved, .dfs, .cells);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sv, rc[171], occ, z0, z1;
      bit [511:0] s;
      bit [512:0] slot;
      sv = int'($urandom() % 489);
      s  = '1;
      for (int b = 511; b >= sv; b--) s[b] = ($urandom() % 4) != 0;  // MSBs mostly 1
      stream = s; saved = 10'(sv);
      #1;
      ref_cfs(s, sv, rc);
      `CHECK(int'(dfs) == ref_dfs(sv), $sformatf("saved %0d: flag %0d", sv, dfs))
      seen[ref_dfs(sv)]++;
      for (int c = 0; c < 171; c++)
        `CHECK(int'(cells[c]) == rc[c], $sformatf("saved %0d cell %0d: %0d exp %0d", sv, c, cells[c], rc[c]))
      slot = {s, 1'b1};
      occ  = (512 - sv + 2) / 3;
      z0 = 0; z1 = 0;
      for (int c = 171 - occ; c < 171; c++) begin
        z0 += int'(!slot[3*c+2]);
        z1 += int'(!cells[c][2]);
      end
      `CHECK(z1 >= z0, $sformatf("saved %0d: 0 MSBs %0d < %0d", sv, z1, z0))
    end
    for (int m = 0; m < 5; m++) `CHECK(seen[m] > 0, $sformatf("0-DFS %0d never selected", m))
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
