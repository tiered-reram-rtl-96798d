// read_buffer: queue of decoded cache lines on their way back to the host.
//
// A first-in first-out queue of DEPTH entries of {line address, 512-bit data}.
// It is written by the read path after decoding and drained by the host with
// a valid/ready handshake. `count` lets the controller start a read only when
// an entry is free for its result. The buffer is named by the published
// architecture; depth and handshakes are this design's choices.
module read_buffer
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
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ADDR_W-1:0] addr_q [DEPTH];
  line_t             data_q [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic              do_push, do_pop;

  assign push_ready = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign pop_valid  = (count != '0);
  assign pop_addr   = addr_q[rd_ptr];
  assign pop_data   = data_q[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      addr_q[wr_ptr] <= push_addr;
      data_q[wr_ptr] <= push_data;
    end
  end

  // The controller reserves an entry before it starts a read.
  always_ff @(posedge clk) begin
    if (rst_n) a_no_overflow: assert (!push_valid || push_ready);
  end

endmodule
