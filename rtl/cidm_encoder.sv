// cidm_encoder: compression-based incomplete data mapping (CIDM) for the
// near segment.
//
// The compressed line (`stream`, MSB-aligned, free bits = 1) and its saved
// space pick the densest-saving IDM that still fits the 171 data cells:
//   saved >= 341  IDM((8,2),1): 1 bit/cell in {S7,S6}, stream[511:341]
//   saved >= 170  IDM((8,4),1): 2 bits/cell in {S7,S6,S5,S0}, stream[511:170]
//   saved >=  85  IDM((8,6),2): 5 bits per cell pair in six states, plus 2
//                 bits in cell 0, stream[511:85]
//   otherwise     CDM: 3 bits/cell, the 513-bit slot {stream, 1'b1}
// Cell 170 holds the top of the stream. A bit group b is written as
// idm_state(~b), i.e. the fastest states take the most frequent patterns and
// all-ones (free space) becomes S7. The thresholds, the 2-bit flag values and
// the states used by the 2- and 4-state IDMs follow the published tables and
// worked examples; the pair mapping of IDM((8,6),2) (index u = ~b, cells
// idm_state(u / 6) and idm_state(u % 6)) is this design's choice.
// Combinational.
module cidm_encoder
  import tr_pkg::*;
(
  input  line_t               stream,
  input  logic [SAVED_W-1:0]  saved,
  output idm_t                idm,
  output data_cells_t         cells
);

  logic [SLOT_W-1:0] slot;
  logic [4:0]        u;

  always_comb begin
    idm  = select_idm(saved);
    slot = {stream, 1'b1};
    u    = '0;
    for (int i = 0; i < int'(DATA_CELLS); i++) cells[i] = slot[3*i +: 3];
    case (idm)
      IDM_82_1: begin
        for (int i = 0; i < int'(DATA_CELLS); i++)
          cells[i] = idm_state({2'b00, ~stream[341 + i]});
      end
      IDM_84_1: begin
        for (int i = 0; i < int'(DATA_CELLS); i++)
          cells[i] = idm_state({1'b0, ~stream[170 + 2*i +: 2]});
      end
      IDM_86_2: begin
        cells[0] = idm_state({1'b0, ~stream[86:85]});
        for (int j = 0; j < 85; j++) begin
          u            = ~stream[87 + 5*j +: 5];
          cells[1+2*j] = idm_state(3'(u % 5'd6));
          cells[2+2*j] = idm_state(3'(u / 5'd6));
        end
      end
      default: ;
    endcase
  end

endmodule
