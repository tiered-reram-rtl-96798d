// write_buffer: queue of cache-line writes waiting for the ReRAM array.
//
// A first-in first-out queue of DEPTH entries, each a line address and its
// 512-bit data. `push_ready` is low when the queue is full (the host stalls).
// The head entry is presented on pop_* and leaves on pop_valid && pop_ready.
// A combinational lookup port reports whether any queued write targets
// `lookup_addr`; the controller holds back a read to such an address until the
// write has reached the array, so reads never return stale data.
// The buffer itself is named by the published architecture; its depth, the
// lookup port and the valid/ready handshakes are this design's choices.
module write_buffer
  import tr_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push_valid,
  output logic              push_ready,
  input  logic [ADDR_W-1:0] push_addr,
  input  line_t             push_data,
  output logic              pop_valid,
  input  logic              pop_ready,
  output logic [ADDR_W-1:0] pop_addr,
  output line_t             pop_data,
  input  logic [ADDR_W-1:0] lookup_addr,
  output logic              lookup_hit,
  output logic              full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0] addr_q [DEPTH];
  line_t             data_q [DEPTH];
  logic [DEPTH-1:0]  valid_q;
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic              do_push, do_pop;

  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign push_ready = !full;
  assign pop_valid  = (count != '0);
  assign pop_addr   = addr_q[rd_ptr];
  assign pop_data   = data_q[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  always_comb begin
    lookup_hit = 1'b0;
    for (int k = 0; k < int'(DEPTH); k++)
      if (valid_q[k] && addr_q[k] == lookup_addr) lookup_hit = 1'b1;
  end

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count   <= '0;
      valid_q <= '0;
    end else begin
      if (do_push) begin
        wr_ptr          <= next_ptr(wr_ptr);
        valid_q[wr_ptr] <= 1'b1;
      end
      if (do_pop) begin
        rd_ptr <= next_ptr(rd_ptr);
        if (!(do_push && wr_ptr == rd_ptr)) valid_q[rd_ptr] <= 1'b0;
      end
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      addr_q[wr_ptr] <= push_addr;
      data_q[wr_ptr] <= push_data;
    end
  end

endmodule
