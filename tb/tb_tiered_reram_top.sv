// End-to-end testbench for tiered_reram_top at its default parameters
// (1024 lines, 8-entry write and read buffers).
//
// Random host traffic over a pool of addresses in both segments writes lines
// of every compressibility and reads them back; a memory model checks every
// response. Each write start is checked against the reference encoder
// (segment, IDM / 0-DFS flag, saved space) and each write end against the
// reference latency (cycles from start to done) and energy. The test counts
// every mechanism of the design and fails when one never happened: near
// (CIDM) and far (CFS) writes, each IDM, each 0-DFS word size that 64-bit FPC
// lines can reach (2, 4 and 8 bits, and none), fewer MSB-1 cells from the
// flip scheme, isolation-transistor use, write
// buffer full, read held by a queued write, by tWTR and by a full read
// buffer, and a queued write forced ahead of a read.
`include "tb_check.svh"
module tb_tiered_reram_top;
  import tr_pkg::*;
  import tr_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready, rsp_valid, rsp_ready;
  logic [9:0] wr_addr, rd_addr, rsp_addr;
  line_t wr_data, rsp_data;
  logic iso_on, wr_start, wr_start_near, wr_done;
  idm_t wr_start_idm;
  dfs_t wr_start_dfs;
  logic [SAVED_W-1:0] wr_start_saved;
  logic [15:0] wr_lat_cycles;
  logic [31:0] wr_energy_fj;
  logic [7:0]  wr_msb1_cells;
  logic ev_wb_full, ev_raw_hold, ev_wtr_hold, ev_rb_hold, ev_drain;

  tiered_reram_top dut (.*);

  always #5 clk = ~clk;

  // reference state
  line_t  model [1024];
  bit     valid [1024] = '{default: 0};
  typedef struct { logic [9:0] a; line_t d; } wr_t;
  wr_t    wq[$];                 // writes accepted, not yet started
  line_t  rexp[$];               // expected read data, in order
  logic [9:0] raddr_q[$];
  int     exp_cyc = 0, exp_cnt = -1;
  longint exp_e;
  int     exp_m = 0, noflip_m = -1;
  longint far_msb1 = 0, far_noflip = 0;
  int     n_fewer_lrs = 0;
  longint near_cyc = 0, far_cyc = 0;
  bit     cur_near = 0;
  int     cyc_since_start = 0;

  // mechanism counters
  int n_near = 0, n_far = 0, n_iso = 0, n_wbfull = 0, n_raw = 0, n_wtr = 0, n_rb = 0, n_drain = 0;
  int n_idm[4] = '{default: 0};
  int n_dfs[5] = '{default: 0};
  int n_wr = 0, n_rd = 0;

  int pool[32];
  bit wr_took = 0, rd_took = 0;   // request accepted at the last edge

  function automatic logic [9:0] pick_addr();
    return 10'(pool[$urandom() % 32]);
  endfunction

  // one phase of traffic; probabilities per mille per cycle
  task automatic run(int cycles, int p_wr, int p_rd, int p_rsp, int max_pc);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      // a request that was not accepted is held unchanged
      if (!(wr_valid && !wr_took)) begin
        wr_valid = ($urandom() % 1000) < p_wr;
        wr_addr  = pick_addr();
        wr_data  = gen_line(int'($urandom() % (max_pc + 1)));
      end
      if (!(rd_valid && !rd_took)) begin
        rd_valid = (($urandom() % 1000) < p_rd);
        rd_addr  = pick_addr();
        if (!valid[rd_addr]) rd_valid = 0;
      end
      rsp_ready = ($urandom() % 1000) < p_rsp;
    end
  endtask

  // monitor
  always @(posedge clk) if (rst_n) begin
    wr_took = wr_valid && wr_ready;
    rd_took = rd_valid && rd_ready;
    // read accepted: expected data is what the model holds now
    if (rd_valid && rd_ready) begin
      `CHECK(valid[rd_addr], "read of an address never written")
      rexp.push_back(model[rd_addr]);
      raddr_q.push_back(rd_addr);
      n_rd++;
    end
    if (wr_valid && wr_ready) begin
      model[wr_addr] = wr_data;
      valid[wr_addr] = 1;
      wq.push_back('{wr_addr, wr_data});
    end
    if (rsp_valid && rsp_ready) begin
      `CHECK(rexp.size() > 0, "unexpected response")
      if (rexp.size() > 0) begin
        `CHECK(rsp_data == rexp[0] && rsp_addr == raddr_q[0],
               $sformatf("read of %0d returned wrong data", rsp_addr))
        void'(rexp.pop_front());
        void'(raddr_q.pop_front());
      end
    end
    if (exp_cnt >= 0) cyc_since_start++;
    if (wr_done) begin
      `CHECK(exp_cnt >= 0, "write done without a start")
      `CHECK(int'(wr_lat_cycles) == exp_cyc && cyc_since_start == exp_cyc,
             $sformatf("write latency %0d / %0d cycles, exp %0d", wr_lat_cycles, cyc_since_start, exp_cyc))
      `CHECK(longint'(wr_energy_fj) == exp_e, $sformatf("write energy %0d exp %0d", wr_energy_fj, exp_e))
      `CHECK(int'(wr_msb1_cells) == exp_m, $sformatf("MSB-1 cells %0d exp %0d", wr_msb1_cells, exp_m))
      if (cur_near) near_cyc += exp_cyc; else far_cyc += exp_cyc;
      if (noflip_m >= 0) begin
        // data cells only: the flip scheme never leaves more MSB-1 cells
        `CHECK(int'(wr_msb1_cells) - 4 <= noflip_m, "flip scheme raised the MSB-1 count")
        far_msb1 += int'(wr_msb1_cells); far_noflip += noflip_m;
        if (int'(wr_msb1_cells) - 4 < noflip_m) n_fewer_lrs++;
      end
      exp_cnt = -1;
    end
    if (wr_start) begin
      int rc[175], sv;
      bit nr;
      `CHECK(wq.size() > 0, "write start with empty queue")
      if (wq.size() > 0) begin
        nr = (wq[0].a < 256);
        ref_image(wq[0].d, nr, rc, sv);
        `CHECK(wr_start_near == nr && int'(wr_start_saved) == sv, "write start segment / saved")
        if (nr) begin
          `CHECK(int'(wr_start_idm) == ref_idm(sv), "IDM flag")
          n_near++; n_idm[ref_idm(sv)]++;
        end else begin
          `CHECK(int'(wr_start_dfs) == ref_dfs(sv), "0-DFS flag")
          n_far++; n_dfs[ref_dfs(sv)]++;
        end
        exp_cyc = ref_wr_cycles(rc, nr);
        exp_e   = ref_wr_energy(rc, nr);
        exp_m   = ref_msb1(rc);
        noflip_m = nr ? -1 : ref_msb1_noflip(wq[0].d);
        exp_cnt = 0;
        cur_near = nr;
        cyc_since_start = 0;
        void'(wq.pop_front());
        n_wr++;
      end
    end
    n_iso    += int'(iso_on);
    n_wbfull += int'(ev_wb_full);
    n_raw    += int'(ev_raw_hold);
    n_wtr    += int'(ev_wtr_hold);
    n_rb     += int'(ev_rb_hold);
    n_drain  += int'(ev_drain);
  end

  initial begin
    for (int k = 0; k < 16; k++) pool[k] = k * 13;             // near: 0..195
    for (int k = 16; k < 32; k++) pool[k] = 256 + k * 23;      // far
    wr_valid = 0; rd_valid = 0; rsp_ready = 1; wr_addr = 0; rd_addr = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(300, 1000, 0, 1000, 8);    // write burst: buffer fills
    run(20000, 4, 300, 800, 8);    // mixed traffic
    run(3000, 0, 600, 0, 8);       // host stops taking responses
    run(3000, 300, 500, 1000, 8);  // heavy writes while reads wait
    run(20000, 4, 300, 900, 3);    // weakly compressible lines
    run(20000, 4, 300, 900, 8);
    @(negedge clk);
    wr_valid = 0; rd_valid = 0; rsp_ready = 1;
    repeat (5000) @(posedge clk);
    `CHECK(rexp.size() == 0 && wq.size() == 0, "traffic left over")
    $display("writes %0d (near %0d far %0d) reads %0d", n_wr, n_near, n_far, n_rd);
    $display("IDM CDM/(8,6)/(8,4)/(8,2): %0d %0d %0d %0d", n_idm[0], n_idm[1], n_idm[2], n_idm[3]);
    $display("0-DFS W2/W4/W8/W16/none: %0d %0d %0d %0d %0d", n_dfs[0], n_dfs[1], n_dfs[2], n_dfs[3], n_dfs[4]);
    $display("iso %0d wbfull %0d raw %0d wtr %0d rbfull %0d drain %0d",
             n_iso, n_wbfull, n_raw, n_wtr, n_rb, n_drain);
    `CHECK(n_near > 0 && n_far > 0, "near and far writes")
    for (int m = 0; m < 4; m++) `CHECK(n_idm[m] > 0, $sformatf("IDM %0d never used", m))
    `CHECK(n_dfs[0] > 0 && n_dfs[1] > 0 && n_dfs[2] > 0 && n_dfs[4] > 0, "0-DFS word sizes")
    $display("far writes: MSB-1 cells %0d with flipping, %0d data cells without", far_msb1, far_noflip);
    $display("mean write cycles: near %0d far %0d", near_cyc / n_near, far_cyc / n_far);
    `CHECK(near_cyc * n_far < far_cyc * n_near, "near writes not faster than far writes on average")
    `CHECK(n_fewer_lrs > 0, "flip scheme never removed an MSB-1 cell")
    `CHECK(n_iso > 0, "isolation transistor never on")
    `CHECK(n_wbfull > 0, "write buffer never full")
    `CHECK(n_raw > 0, "read never held by a queued write")
    `CHECK(n_wtr > 0, "read never held by tWTR")
    `CHECK(n_rb > 0, "read never held by a full read buffer")
    `CHECK(n_drain > 0, "write never forced ahead of a read")
    `TB_DONE
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
