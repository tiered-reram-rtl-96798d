// cidm_decoder: reverses cidm_encoder for a line read from the near segment.
//
// The 2-bit IDM flag stored with the line says how the 171 data cells map to
// the top of the 512-bit compressed stream (see cidm_encoder). Bits of the
// stream that the chosen IDM does not carry are returned as 1. A pair of
// IDM((8,6),2) cells gives index hi*6+lo, whose low five bits are inverted
// back into data. Combinational.
module cidm_decoder
  import tr_pkg::*;
(
  input  data_cells_t cells,
  input  idm_t        idm,
  output line_t       stream
);

  logic [SLOT_W-1:0] slot;
  logic [2:0]        lo, hi;
  logic [5:0]        u;

  always_comb begin
    for (int i = 0; i < int'(DATA_CELLS); i++) slot[3*i +: 3] = cells[i];
    stream = slot[SLOT_W-1:1];
    lo     = '0;
    hi     = '0;
    u      = '0;
    case (idm)
      IDM_82_1: begin
        stream = '1;
        for (int i = 0; i < int'(DATA_CELLS); i++) begin
          lo              = idm_index(cells[i]);
          stream[341 + i] = ~lo[0];
        end
      end
      IDM_84_1: begin
        stream = '1;
        for (int i = 0; i < int'(DATA_CELLS); i++) begin
          lo                     = idm_index(cells[i]);
          stream[170 + 2*i +: 2] = ~lo[1:0];
        end
      end
      IDM_86_2: begin
        stream = '1;
        lo            = idm_index(cells[0]);
        stream[86:85] = ~lo[1:0];
        for (int j = 0; j < 85; j++) begin
          lo = idm_index(cells[1+2*j]);
          hi = idm_index(cells[2+2*j]);
          u  = 6'(hi) * 6'd6 + 6'(lo);
          stream[87 + 5*j +: 5] = ~u[4:0];
        end
      end
      default: ;
    endcase
  end

endmodule
