// Testbench for tiered_crossbar: random line writes and reads against an
// array model; checks the registered read, the near/far address decode
// (near = first quarter of the lines) and the isolation-transistor control.
`include "tb_check.svh"
module tb_tiered_crossbar;
  import tr_pkg::*;
  localparam int LINES = 64;
  int checks = 0, failures = 0, nears = 0, fars = 0;
  logic clk = 0;
  logic we, re, waddr_near, raddr_near, iso_on;
  logic [5:0] waddr, raddr;
  cells_t wcells, rcells;
  cells_t model [LINES];
  bit     written [LINES] = '{default: 0};

  tiered_crossbar #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  function automatic cells_t rnd_cells();
    cells_t c;
    for (int i = 0; i < int'(CELLS); i++) c[i] = 3'($urandom());
    return c;
  endfunction

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wcells = '0;
    for (int i = 0; i < 4000; i++) begin
      bit do_rd;
      @(negedge clk);
      do_rd = ($urandom() % 2) == 0;
      we = !do_rd; re = do_rd;
      waddr = 6'($urandom()); raddr = 6'($urandom());
      wcells = rnd_cells();
      #1;
      `CHECK(waddr_near == (waddr < 16) && raddr_near == (raddr < 16), "segment decode")
      `CHECK(iso_on == ((we && waddr >= 16) || (re && raddr >= 16)), "isolation transistor")
      if (re) begin if (raddr < 16) nears++; else fars++; end
      @(posedge clk);
      if (we) begin model[waddr] = wcells; written[waddr] = 1; end
      if (re) begin
        automatic logic [5:0] a = raddr;
        #1;
        if (written[a]) `CHECK(rcells == model[a], $sformatf("read %0d", a))
      end
    end
    `CHECK(nears > 0 && fars > 0, "both segments accessed")
    `TB_DONE
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
