// tiered_reram_top: Tiered-ReRAM memory controller with its tiered crossbar
// arrays.
//
// Write path: host writes enter the write buffer. The head line is compressed
// by FPC and encoded for the segment its address falls in (encoder_module):
// CIDM for near-segment lines, CFS for far-segment lines. The write controller
// then programs the line's cells into tiered_crossbar and holds the array for
// the program-and-verify time of the slowest state in the line.
// Read path: the read controller fetches a line's cells after tRCD + tCL,
// decoder_module undoes CIDM or CFS and the compression, and the line waits
// in the read buffer until the host takes it.
//
// Scheduling (this design's choice; the published architecture gives the
// blocks but not their policy): one array access at a time. Reads go before
// queued writes, except when the write buffer is full, when it is drained
// first. A read whose address is still in the write buffer waits until that
// write is in the array, a read is held for tWTR after each write (and no new
// write starts in that gap while the read waits), and a read starts only when
// the read buffer has room for its result.
//
// Host ports: wr_* (valid/ready, address, 512-bit line), rd_* (valid/ready,
// address) and rsp_* (valid/ready, address, line). Status outputs: iso_on
// (isolation-transistor control), one pulse per write start (wr_start with the
// segment, IDM and 0-DFS flags and saved space of that line) and per write end
// (wr_done with its latency in cycles, energy in fJ and number of cells left
// with MSB 1), and pulses for each
// stall: write buffer full, read held by a queued write, read held by tWTR,
// read held by a full read buffer, queued write forced ahead of a read.
module tiered_reram_top
  import tr_pkg::*;
#(
  parameter int unsigned LINES    = 1024,
  parameter int unsigned WB_DEPTH = 8,
  parameter int unsigned RB_DEPTH = 8,
  parameter int unsigned ADDR_W   = $clog2(LINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host write requests
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  line_t              wr_data,
  // host read requests
  input  logic               rd_valid,
  output logic               rd_ready,
  input  logic [ADDR_W-1:0]  rd_addr,
  // read responses
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output logic [ADDR_W-1:0]  rsp_addr,
  output line_t              rsp_data,
  // status
  output logic               iso_on,
  output logic               wr_start,
  output logic               wr_start_near,
  output idm_t               wr_start_idm,
  output dfs_t               wr_start_dfs,
  output logic [SAVED_W-1:0] wr_start_saved,
  output logic               wr_done,
  output logic [15:0]        wr_lat_cycles,
  output logic [31:0]        wr_energy_fj,
  output logic [7:0]         wr_msb1_cells,
  output logic               ev_wb_full,
  output logic               ev_raw_hold,
  output logic               ev_wtr_hold,
  output logic               ev_rb_hold,
  output logic               ev_drain
);

  // ---- write buffer -------------------------------------------------------
  logic              wb_pop_valid, wb_pop_ready, wb_hit, wb_full;
  logic [ADDR_W-1:0] wb_pop_addr;
  line_t             wb_pop_data;
  logic [$clog2(WB_DEPTH+1)-1:0] wb_count;

  write_buffer #(.DEPTH(WB_DEPTH), .ADDR_W(ADDR_W)) u_wb (
    .clk, .rst_n,
    .push_valid (wr_valid),
    .push_ready (wr_ready),
    .push_addr  (wr_addr),
    .push_data  (wr_data),
    .pop_valid  (wb_pop_valid),
    .pop_ready  (wb_pop_ready),
    .pop_addr   (wb_pop_addr),
    .pop_data   (wb_pop_data),
    .lookup_addr(rd_addr),
    .lookup_hit (wb_hit),
    .full       (wb_full),
    .count      (wb_count)
  );

  // ---- tiered crossbar ----------------------------------------------------
  logic              arr_we, arr_re, waddr_near, raddr_near;
  logic [ADDR_W-1:0] arr_waddr, arr_raddr;
  cells_t            arr_wcells, arr_rcells;
  logic              head_near;

  tiered_crossbar #(.LINES(LINES), .ADDR_W(ADDR_W)) u_xbar (
    .clk,
    .we         (arr_we),
    .waddr      (arr_waddr),
    .wcells     (arr_wcells),
    .re         (arr_re),
    .raddr      (arr_raddr),
    .rcells     (arr_rcells),
    .waddr_near (waddr_near),
    .raddr_near (raddr_near),
    .iso_on     (iso_on)
  );

  // Segment of the write-buffer head (same mapping as the array).
  assign head_near = (32'(wb_pop_addr) < LINES / 4);

  // ---- encoder module -----------------------------------------------------
  cells_t             enc_cells;
  idm_t               enc_idm;
  dfs_t               enc_dfs;
  logic [SAVED_W-1:0] enc_saved;

  encoder_module u_enc (
    .line     (wb_pop_data),
    .near_seg (head_near),
    .cells    (enc_cells),
    .idm      (enc_idm),
    .dfs      (enc_dfs),
    .saved    (enc_saved)
  );

  // ---- controllers and scheduling -----------------------------------------
  logic wc_ready, wc_busy, wtr_block, rc_ready, rc_busy;
  logic rb_room, read_cand, array_free, read_go, write_go;
  logic rc_rsp_valid;
  logic [ADDR_W-1:0] rc_rsp_addr;
  cells_t rc_rsp_cells;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_count;

  // Room is reserved for the read in flight and for the line being pushed
  // this cycle, which rb_count does not yet include.
  assign rb_room  = (32'(rb_count) + 32'(rc_busy) + 32'(rc_rsp_valid)) < RB_DEPTH;
  // A read that only waits for the array or for tWTR keeps new writes off the
  // array, unless the write buffer is full and must drain.
  assign read_cand  = rd_valid && !wb_hit && rb_room;
  assign array_free = wc_ready && rc_ready;
  assign read_go    = read_cand && array_free && !wtr_block && !wb_full;
  assign write_go   = wb_pop_valid && array_free && !read_go && (wb_full || !read_cand);
  assign rd_ready = read_go;
  assign wb_pop_ready = write_go;

  write_controller #(.ADDR_W(ADDR_W)) u_wc (
    .clk, .rst_n,
    .req_valid  (write_go),
    .req_ready  (wc_ready),
    .req_addr   (wb_pop_addr),
    .req_cells  (enc_cells),
    .req_near   (head_near),
    .arr_we     (arr_we),
    .arr_waddr  (arr_waddr),
    .arr_wcells (arr_wcells),
    .busy       (wc_busy),
    .done       (wr_done),
    .lat_cycles (wr_lat_cycles),
    .energy_fj  (wr_energy_fj),
    .msb1_cells (wr_msb1_cells),
    .wtr_block  (wtr_block)
  );

  read_controller #(.ADDR_W(ADDR_W)) u_rc (
    .clk, .rst_n,
    .req_valid  (read_go),
    .req_ready  (rc_ready),
    .req_addr   (rd_addr),
    .arr_re     (arr_re),
    .arr_raddr  (arr_raddr),
    .arr_rcells (arr_rcells),
    .busy       (rc_busy),
    .rsp_valid  (rc_rsp_valid),
    .rsp_addr   (rc_rsp_addr),
    .rsp_cells  (rc_rsp_cells)
  );

  // ---- decoder module and read buffer -------------------------------------
  line_t dec_line;
  logic  rsp_near;
  logic  rb_push_ready;

  assign rsp_near = (32'(rc_rsp_addr) < LINES / 4);

  decoder_module u_dec (
    .cells    (rc_rsp_cells),
    .near_seg (rsp_near),
    .line     (dec_line)
  );

  read_buffer #(.DEPTH(RB_DEPTH), .ADDR_W(ADDR_W)) u_rb (
    .clk, .rst_n,
    .push_valid (rc_rsp_valid),
    .push_ready (rb_push_ready),
    .push_addr  (rc_rsp_addr),
    .push_data  (dec_line),
    .pop_valid  (rsp_valid),
    .pop_ready  (rsp_ready),
    .pop_addr   (rsp_addr),
    .pop_data   (rsp_data),
    .count      (rb_count)
  );

  // ---- status -------------------------------------------------------------
  assign wr_start       = write_go;
  assign wr_start_near  = head_near;
  assign wr_start_idm   = enc_idm;
  assign wr_start_dfs   = enc_dfs;
  assign wr_start_saved = enc_saved;
  assign ev_wb_full     = wr_valid && wb_full;
  assign ev_raw_hold    = rd_valid && wb_hit;
  assign ev_wtr_hold    = rd_valid && wtr_block;
  assign ev_rb_hold     = rd_valid && !rb_room;
  assign ev_drain       = read_cand && wb_full && write_go;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_exclusive: assert (!(wc_busy && rc_busy));
      a_rb_room:   assert (!rc_rsp_valid || rb_push_ready);
      a_seg_w:     assert (!arr_we || waddr_near == (32'(arr_waddr) < LINES / 4));
      a_seg_r:     assert (!arr_re || raddr_near == (32'(arr_raddr) < LINES / 4));
    end
  end

endmodule
