// write_controller: programs one encoded line into the tiered crossbar and
// holds the array for the line's program-and-verify time.
//
// A TLC cell is written with a SET pulse followed by a series of RESET pulses,
// each checked by a verify read, so its write time depends on the target
// state (S7 14.2 ns ... S3 383 ns in the far segment) and is about 60 % lower
// in the near segment. The cells of a line are programmed in parallel, so a
// line write lasts tRCD + tCWD + the worst-case time of the slowest state it
// contains; its energy is the sum over all CELLS cells.
//
// Handshake: req_valid/req_ready (ready = idle). In the cycle after the
// request is taken, `arr_we` writes the line into the array; `done` pulses so
// that it is sampled WR cycles after the accepting edge, WR = ceil((tRCD +
// tCWD + tWR) / tCK). `lat_cycles`, `energy_fj` and `msb1_cells` hold the
// last write's figures; `msb1_cells` counts the cells left in a low-resistance
// state (MSB 1, S4..S7), whose sneak currents the flip scheme reduces. After each write, `wtr_block` stays high for ceil(tWTR / tCK) cycles
// (write-to-read turnaround). Per-state latency/energy, tRCD, tCWD and tWTR
// are published values; tCK = 1.5 ns (DDR3-1333) and the uniform near-segment
// scaling are this design's choices.
module write_controller
  import tr_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  cells_t            req_cells,
  input  logic              req_near,
  output logic              arr_we,
  output logic [ADDR_W-1:0] arr_waddr,
  output cells_t            arr_wcells,
  output logic              busy,
  output logic              done,
  output logic [15:0]       lat_cycles,
  output logic [31:0]       energy_fj,
  output logic [7:0]        msb1_cells,
  output logic              wtr_block
);

  localparam int unsigned WTR_CYC = ps_to_cycles(T_WTR_PS);

  typedef enum logic [1:0] {W_IDLE, W_PROG, W_WAIT} wstate_t;
  wstate_t     st;
  logic [15:0] cnt;
  logic [15:0] cyc_need;
  logic [31:0] e_need;
  logic [7:0]  m_need;
  logic [7:0]  present;
  logic [3:0]  wtr_cnt;

  // Cycles and energy of the requested line.
  always_comb begin
    present = '0;
    e_need  = '0;
    m_need  = '0;
    for (int i = 0; i < int'(CELLS); i++) begin
      present[req_cells[i]] = 1'b1;
      e_need = e_need + state_energy_fj(req_cells[i], req_near);
      m_need = m_need + 8'(req_cells[i][2]);
    end
    cyc_need = '0;
    for (int s = 0; s < 8; s++) begin
      if (present[s] &&
          16'(ps_to_cycles(T_RCD_PS + T_CWD_PS + state_latency_ps(3'(s), req_near))) > cyc_need)
        cyc_need = 16'(ps_to_cycles(T_RCD_PS + T_CWD_PS + state_latency_ps(3'(s), req_near)));
    end
  end

  assign req_ready = (st == W_IDLE);
  assign busy      = (st != W_IDLE);
  assign wtr_block = (wtr_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= W_IDLE;
      cnt        <= '0;
      arr_we     <= 1'b0;
      done       <= 1'b0;
      lat_cycles <= '0;
      energy_fj  <= '0;
      msb1_cells <= '0;
      wtr_cnt    <= '0;
    end else begin
      arr_we <= 1'b0;
      done   <= 1'b0;
      if (wtr_cnt != '0) wtr_cnt <= wtr_cnt - 1'b1;
      case (st)
        W_IDLE: if (req_valid) begin
          st         <= W_PROG;
          arr_we     <= 1'b1;
          cnt        <= cyc_need - 1'b1;
          lat_cycles <= cyc_need;
          energy_fj  <= e_need;
          msb1_cells <= m_need;
        end
        default: begin
          st <= W_WAIT;
          if (cnt == 16'd1) begin
            done    <= 1'b1;
            wtr_cnt <= 4'(WTR_CYC);
            st      <= W_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == W_IDLE && req_valid) begin
      arr_waddr  <= req_addr;
      arr_wcells <= req_cells;
    end
  end

endmodule
