// Testbench for write_buffer: random pushes and pops against a queue model;
// checks order, full/ready, count and the address lookup, and that the queue
// was filled to the top at least once.
`include "tb_check.svh"
module tb_write_buffer;
  import tr_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0, fulls = 0;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, pop_valid, pop_ready, lookup_hit, full;
  logic [9:0] push_addr, pop_addr, lookup_addr;
  line_t push_data, pop_data;
  logic [2:0] count;
  typedef struct { logic [9:0] a; line_t d; } ent_t;
  ent_t q[$];

  write_buffer #(.DEPTH(DEPTH), .ADDR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    push_valid = 0; pop_ready = 0; push_addr = 0; push_data = 0; lookup_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit exp_hit;
      @(negedge clk);
      push_valid  = ($urandom() % 3) != 0;
      pop_ready   = ($urandom() % 3) == 0 || i > 2900;
      push_addr   = 10'($urandom() % 16);
      push_data   = {16{$urandom()}};
      lookup_addr = 10'($urandom() % 16);
      #1;
      exp_hit = 0;
      foreach (q[k]) if (q[k].a == lookup_addr) exp_hit = 1;
      `CHECK(lookup_hit == exp_hit, $sformatf("lookup %0d hit %0d", lookup_addr, lookup_hit))
      `CHECK(int'(count) == q.size() && full == (q.size() == DEPTH) && push_ready == !full
             && pop_valid == (q.size() != 0), $sformatf("count %0d exp %0d", count, q.size()))
      if (pop_valid && q.size() != 0)
        `CHECK(pop_addr == q[0].a && pop_data == q[0].d, "head mismatch")
      if (full) fulls++;
      @(posedge clk);
      if (pop_valid && pop_ready) void'(q.pop_front());
      if (push_valid && push_ready) q.push_back('{push_addr, push_data});
    end
    `CHECK(fulls > 0, "buffer never full")
    `TB_DONE
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
