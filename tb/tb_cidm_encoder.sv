// Testbench for cidm_encoder.
// 1. The published IDM examples: data 111 110 101 100 011 010 001 000 under
//    IDM((8,4),1) gives S7 S7 S6 S6 S7 S0 S5 S6 S6 S0 S6 S0 (197.5 pJ, worst
//    state 255.2 ns); under IDM((8,2),1) 24 cells of S7/S6 (182.4 pJ, 95.4 ns).
// 2. Random streams with random saved space (every IDM) against the
//    reference mapping, with the IDM flag checked against the table.
`include "tb_check.svh"
module tb_cidm_encoder;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  line_t              stream;
  logic [SAVED_W-1:0] saved;
  idm_t               idm;
  data_cells_t        cells;
  int                 seen[4] = '{default: 0};

  cidm_encoder dut (.stream, .saved, .idm, .cells);

  localparam logic [23:0] EX = 24'b111_110_101_100_011_010_001_000;

  initial begin
    int exp84[12] = '{7, 7, 6, 6, 7, 0, 5, 6, 6, 0, 6, 0};
    int e, worst;
    // IDM((8,4),1) example
    stream = '1; stream[511 -: 24] = EX; saved = 10'd200;
    #1;
    `CHECK(idm == IDM_84_1, "example: IDM((8,4),1) not selected")
    e = 0; worst = 0;
    for (int k = 0; k < 12; k++) begin
      `CHECK(int'(cells[170 - k]) == exp84[k], $sformatf("IDM(8,4) example cell %0d = S%0d", k, cells[170 - k]))
      e += energy_tenth_pj(int'(cells[170 - k]));
      if (lat_tenth_ns(int'(cells[170 - k])) > worst) worst = lat_tenth_ns(int'(cells[170 - k]));
    end
    `CHECK(e == 1975 && worst == 2552, $sformatf("IDM(8,4) example energy %0d worst %0d", e, worst))
    // IDM((8,2),1) example
    saved = 10'd400;
    #1;
    `CHECK(idm == IDM_82_1, "example: IDM((8,2),1) not selected")
    e = 0; worst = 0;
    for (int k = 0; k < 24; k++) begin
      `CHECK(int'(cells[170 - k]) == (EX[23 - k] ? 7 : 6), $sformatf("IDM(8,2) example cell %0d", k))
      e += energy_tenth_pj(int'(cells[170 - k]));
      if (lat_tenth_ns(int'(cells[170 - k])) > worst) worst = lat_tenth_ns(int'(cells[170 - k]));
    end
    `CHECK(e == 1824 && worst == 954, $sformatf("IDM(8,2) example energy %0d worst %0d", e, worst))
    // random
    for (int i = 0; i < 3000; i++) begin
      int sv, rc[171];
      bit [511:0] s;
      sv = (i < 4) ? int'(i == 0 ? 85 : i == 1 ? 170 : i == 2 ? 341 : 84) : int'($urandom() % 489);
      s  = '1;
      for (int b = 511; b >= sv; b--) s[b] = 1'($urandom());
      stream = s; saved = 10'(sv);
      #1;
      ref_cidm(s, sv, rc);
      `CHECK(int'(idm) == ref_idm(sv), $sformatf("saved %0d: flag %0d", sv, idm))
      seen[ref_idm(sv)]++;
      for (int c = 0; c < 171; c++)
        `CHECK(int'(cells[c]) == rc[c], $sformatf("saved %0d cell %0d: S%0d exp S%0d", sv, c, cells[c], rc[c]))
    end
    for (int m = 0; m < 4; m++) `CHECK(seen[m] > 0, $sformatf("IDM %0d never selected", m))
    `TB_DONE
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
