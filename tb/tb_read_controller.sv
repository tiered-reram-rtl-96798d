// Testbench for read_controller against a one-cycle array model: each read
// must return the addressed cells with rsp_valid sampled 22 cycles
// (ceil((tRCD + tCL) / 1.5 ns)) after the accepting edge.
`include "tb_check.svh"
module tb_read_controller;
  import tr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, arr_re, busy, rsp_valid;
  logic [9:0] req_addr, arr_raddr, rsp_addr;
  cells_t arr_rcells, rsp_cells;
  cells_t mem [16];

  read_controller #(.ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (arr_re) arr_rcells <= mem[arr_raddr[3:0]];

  initial begin
    for (int a = 0; a < 16; a++)
      for (int c = 0; c < int'(CELLS); c++) mem[a][c] = 3'($urandom());
    req_valid = 0; req_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      int n;
      @(negedge clk);
      req_addr = 10'($urandom() % 16);
      req_valid = 1;
      #1;
      `CHECK(req_ready && arr_re && arr_raddr == req_addr, "read issue")
      @(posedge clk);
      #1;
      req_valid = 0;
      n = 0;
      while (!rsp_valid && n < 100) begin
        `CHECK(busy && !req_ready && !arr_re, "busy while reading")
        @(posedge clk); n++; #1;
      end
      `CHECK(n + 1 == 22, $sformatf("read latency %0d", n + 1))
      `CHECK(rsp_addr == req_addr && rsp_cells == mem[req_addr[3:0]], "read data")
      // scramble the array so a stale capture would show
      mem[req_addr[3:0]][0] = ~mem[req_addr[3:0]][0];
    end
    `TB_DONE
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
