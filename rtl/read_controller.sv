// read_controller: reads one line of cells from the tiered crossbar.
//
// Handshake: req_valid/req_ready (ready = idle). In the accepting cycle the
// array read is issued (`arr_re`, combinational; `arr_raddr` is `req_addr`
// passed straight through so that no cycle is lost); the registered array output
// is captured on the next edge. `rsp_valid` pulses so that it is sampled RD
// cycles after the accepting edge, RD = ceil((tRCD + tCL) / tCK), with the
// line's address and raw cells; decoding happens outside. tRCD and tCL are
// published values; tCK = 1.5 ns (DDR3-1333) is this design's choice.
module read_controller
  import tr_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              arr_re,
  output logic [ADDR_W-1:0] arr_raddr,
  input  cells_t            arr_rcells,
  output logic              busy,
  output logic              rsp_valid,
  output logic [ADDR_W-1:0] rsp_addr,
  output cells_t            rsp_cells
);

  localparam int unsigned RD_CYC = ps_to_cycles(T_RCD_PS + T_CL_PS);

  logic        active, first;
  logic [7:0]  cnt;

  assign req_ready = !active;
  assign busy      = active;
  assign arr_re    = req_valid && !active;
  assign arr_raddr = req_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      first     <= 1'b0;
      cnt       <= '0;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (!active) begin
        if (req_valid) begin
          active <= 1'b1;
          first  <= 1'b1;
          cnt    <= 8'(RD_CYC - 1);
        end
      end else begin
        first <= 1'b0;
        if (cnt == 8'd1) begin
          rsp_valid <= 1'b1;
          active    <= 1'b0;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!active && req_valid) rsp_addr <= req_addr;
    if (active && first)      rsp_cells <= arr_rcells;
  end

endmodule
