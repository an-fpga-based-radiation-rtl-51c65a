// bitstream_table: where each Artix-7 bitstream lies on the configuration SD card.
//
// The SD card holds the full clean bitstream, then one clean partial bitstream
// per tile, then a corrupted partial bitstream per tile that is used to inject
// "bad bitstream" faults. Each entry is a byte start address and a byte length;
// every start address is a multiple of 512, so it is also a block number
// (start >> 9). The table values are those of the Artemis mission card.
// There is no corrupted full bitstream; asking for an invalid entry (a tile
// number above 8) returns valid = 0 and zero address and length.
// Interface: purely combinational lookup by kind and tile.
module bitstream_table
  import artemis_pkg::*;
(
  input  bs_kind_t    kind,
  input  tile_idx_t   tile,      // ignored for BS_FULL_GOOD
  output logic [31:0] start_addr,
  output logic [31:0] length,
  output logic        valid
);

  always_comb begin
    start_addr = '0;
    length     = '0;
    valid      = 1'b1;
    unique case (kind)
      BS_FULL_GOOD: begin start_addr = 32'h0000_0400; length = 32'h0094_7A5C; end
      BS_PART_GOOD: begin
        case (tile)
          4'd0: begin start_addr = 32'h0094_8000; length = 32'h000C_1530; end
          4'd1: begin start_addr = 32'h00A0_9600; length = 32'h000A_F2B0; end
          4'd2: begin start_addr = 32'h00AB_8A00; length = 32'h0010_9210; end
          4'd3: begin start_addr = 32'h00BC_1E00; length = 32'h0010_C470; end
          4'd4: begin start_addr = 32'h00CC_E400; length = 32'h0010_9210; end
          4'd5: begin start_addr = 32'h00DD_7800; length = 32'h0010_C470; end
          4'd6: begin start_addr = 32'h00EE_3E00; length = 32'h0011_E6F0; end
          4'd7: begin start_addr = 32'h0100_2600; length = 32'h0010_C470; end
          4'd8: begin start_addr = 32'h0110_EC00; length = 32'h000C_1530; end
          default: valid = 1'b0;
        endcase
      end
      BS_PART_BAD: begin
        case (tile)
          4'd0: begin start_addr = 32'h01B1_7E00; length = 32'h000C_1530; end
          4'd1: begin start_addr = 32'h01BD_9400; length = 32'h000A_F2B0; end
          4'd2: begin start_addr = 32'h01C8_8800; length = 32'h0010_9210; end
          4'd3: begin start_addr = 32'h01D9_1C00; length = 32'h0010_C470; end
          4'd4: begin start_addr = 32'h01E9_E200; length = 32'h0010_9210; end
          4'd5: begin start_addr = 32'h01FA_7600; length = 32'h0010_C470; end
          4'd6: begin start_addr = 32'h020B_3C00; length = 32'h0011_E6F0; end
          4'd7: begin start_addr = 32'h021D_2400; length = 32'h0010_C470; end
          4'd8: begin start_addr = 32'h022D_EA00; length = 32'h000C_1530; end
          default: valid = 1'b0;
        endcase
      end
      default: valid = 1'b0;
    endcase
  end

endmodule
