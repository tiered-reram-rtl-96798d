// Testbench for cidm_decoder: random streams of random saved space are mapped
// to cells by the reference CIDM model; the decoder must return the top
// 512 - saved bits of the stream for each of the four mappings.
`include "tb_check.svh"
module tb_cidm_decoder;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  data_cells_t cells;
  idm_t        idm;
  line_t       stream;
  int          seen[4] = '{default: 0};

  cidm_decoder dut (.cells, .idm, .stream);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sv, rc[171];
      bit [511:0] s;
      bit ok;
      sv = int'($urandom() % 489);
      s  = '1;
      for (int b = 511; b >= sv; b--) s[b] = 1'($urandom());
      ref_cidm(s, sv, rc);
      for (int c = 0; c < 171; c++) cells[c] = 3'(rc[c]);
      idm = idm_t'(ref_idm(sv));
      seen[ref_idm(sv)]++;
      #1;
      ok = 1;
      for (int b = 511; b >= sv; b--) if (stream[b] != s[b]) ok = 0;
      `CHECK(ok, $sformatf("saved %0d: stream mismatch", sv))
    end
    for (int m = 0; m < 4; m++) `CHECK(seen[m] > 0, $sformatf("IDM %0d never used", m))
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
