// artemis_tb_pkg: reference data shared by the testbenches.
//
// bs_start/bs_len give the SD card layout of the mission bitstreams (kind 0 =
// full clean, 1 = clean partial, 2 = corrupted partial, per tile). sd_byte is
// the content the SD card model serves: the first byte of each bitstream is a
// marker {2'b10, kind, tile} so a configuration-port model can tell which
// bitstream it receives; every other byte is a hash of its address.
package artemis_tb_pkg;

  function automatic longint unsigned bs_start(int kind, int tile);
    longint unsigned g[9] = '{64'h0094_8000, 64'h00A0_9600, 64'h00AB_8A00, 64'h00BC_1E00,
                              64'h00CC_E400, 64'h00DD_7800, 64'h00EE_3E00, 64'h0100_2600,
                              64'h0110_EC00};
    longint unsigned b[9] = '{64'h01B1_7E00, 64'h01BD_9400, 64'h01C8_8800, 64'h01D9_1C00,
                              64'h01E9_E200, 64'h01FA_7600, 64'h020B_3C00, 64'h021D_2400,
                              64'h022D_EA00};
    if (kind == 0) return 64'h400;
    if (kind == 1) return g[tile];
    return b[tile];
  endfunction

  function automatic longint unsigned bs_len(int kind, int tile);
    longint unsigned l[9] = '{64'h000C_1530, 64'h000A_F2B0, 64'h0010_9210, 64'h0010_C470,
                              64'h0010_9210, 64'h0010_C470, 64'h0011_E6F0, 64'h0010_C470,
                              64'h000C_1530};
    if (kind == 0) return 64'h0094_7A5C;
    return l[tile];
  endfunction

  function automatic byte unsigned sd_byte(longint unsigned addr);
    if (addr[8:0] == 0)   // every bitstream starts on a block boundary
    for (int k = 0; k < 3; k++)
      for (int t = 0; t < 9; t++)
        if (!(k == 0 && t > 0) && addr == bs_start(k, t))
          return byte'({2'b10, 2'(k), 4'(k == 0 ? 0 : t)});
    return byte'(addr[7:0] ^ addr[15:8] ^ (addr[23:16] * 8'd3) ^ 8'h5A);
  endfunction

endpackage
