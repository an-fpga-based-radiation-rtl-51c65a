// tb_bitstream_table: every entry of the card layout against the reference
// copy, block alignment of every start, and the invalid entries.
module tb_bitstream_table;
  import artemis_pkg::*;
  import artemis_tb_pkg::*;
  bs_kind_t kind;
  tile_idx_t tile;
  logic [31:0] start_addr, length;
  logic valid;
  int checks = 0, failures = 0;

  bitstream_table dut (.*);

  initial begin
    #1000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++)
      for (int t = 0; t < 9; t++) begin
        kind = bs_kind_t'(k); tile = tile_idx_t'(t); #1;
        checks++;
        if (!valid || start_addr != 32'(bs_start(k, t)) || length != 32'(bs_len(k, t)) ||
            start_addr[8:0] != 0) begin
          failures++; $display("FAIL kind %0d tile %0d: %h %h", k, t, start_addr, length);
        end
      end
    // bitstreams must not overlap: each partial ends before the next begins
    for (int t = 0; t < 8; t++) begin
      kind = BS_PART_GOOD; tile = tile_idx_t'(t); #1;
      checks++;
      if (start_addr + length > 32'(bs_start(1, t + 1))) begin failures++; $display("FAIL overlap %0d", t); end
    end
    kind = BS_PART_GOOD; tile = 4'd9; #1;  checks++; if (valid) failures++;
    kind = BS_PART_BAD;  tile = 4'd15; #1; checks++; if (valid) failures++;
    kind = bs_kind_t'(2'd3); tile = 4'd0; #1; checks++; if (valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
