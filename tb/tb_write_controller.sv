// Testbench for write_controller: reference cell images of random lines for
// both segments are written; the array write, the latency (cycles from the
// accepting edge to the done pulse, and lat_cycles), the energy, the count of
// MSB-1 cells and the tWTR
// hold (5 cycles) are checked against the reference tables.
`include "tb_check.svh"
module tb_write_controller;
  import tr_pkg::*;
  import tr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_near, arr_we, busy, done, wtr_block;
  logic [9:0] req_addr, arr_waddr;
  cells_t req_cells, arr_wcells;
  logic [15:0] lat_cycles;
  logic [31:0] energy_fj;
  logic [7:0]  msb1_cells;
  int min_cyc = 1 << 30, max_cyc = 0;

  write_controller #(.ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    req_valid = 0; req_near = 0; req_addr = 0; req_cells = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int rc[175], sv, exp_cyc, n, we_seen, wtr;
      longint exp_e;
      @(negedge clk);
      req_near = 1'(i % 2);
      ref_image(gen_line(i % 9), req_near, rc, sv);
      for (int c = 0; c < 175; c++) req_cells[c] = 3'(rc[c]);
      req_addr  = 10'($urandom());
      req_valid = 1;
      exp_cyc   = ref_wr_cycles(rc, req_near);
      exp_e     = ref_wr_energy(rc, req_near);
      `CHECK(req_ready, "not ready when idle")
      @(posedge clk);
      #1;
      req_valid = 0;
      n = 0; we_seen = 0;
      while (!done && n < 1000) begin
        if (arr_we) begin
          we_seen++;
          `CHECK(arr_waddr == req_addr && arr_wcells == req_cells, "array write data")
        end
        `CHECK(busy && !req_ready, "busy while writing")
        @(posedge clk); n++;
        #1;
      end
      `CHECK(n + 1 == exp_cyc && int'(lat_cycles) == exp_cyc,
             $sformatf("write %0d near %0d: %0d cycles, lat %0d, exp %0d", i, req_near, n + 1, lat_cycles, exp_cyc))
      `CHECK(longint'(energy_fj) == exp_e, $sformatf("energy %0d exp %0d", energy_fj, exp_e))
      `CHECK(int'(msb1_cells) == ref_msb1(rc), $sformatf("MSB-1 cells %0d exp %0d", msb1_cells, ref_msb1(rc)))
      `CHECK(we_seen == 1, "one array write per line")
      if (exp_cyc < min_cyc) min_cyc = exp_cyc;
      if (exp_cyc > max_cyc) max_cyc = exp_cyc;
      wtr = 0;
      while (wtr_block && wtr < 20) begin @(posedge clk); #1; wtr++; end
      `CHECK(wtr == 5, $sformatf("tWTR hold %0d cycles", wtr))
    end
    // near and far lines give different latencies
    `CHECK(max_cyc > min_cyc, "latency does not depend on the data")
    `TB_DONE
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
