// tb_sd_spi_reader: initialises the SD card model and reads blocks at the
// start of several bitstreams; every byte is compared with the card content,
// the number of bytes per block must be 512, and one byte must take at least
// 16 clocks (SCK = clk/2) on the wire.
module tb_sd_spi_reader;
  import artemis_tb_pkg::*;
  logic clk = 0, rst;
  logic ready, init_err, rd_req, out_valid, rd_done, rd_err;
  logic [31:0] rd_block;
  logic [7:0] out_data;
  logic sd_cs_n, sd_sck, sd_mosi, sd_miso;
  int checks = 0, failures = 0;

  sd_spi_reader #(.SLOW_HALF(4)) dut (.*);
  sd_card_model card (.cs_n(sd_cs_n), .sck(sd_sck), .mosi(sd_mosi), .miso(sd_miso));
  always #25 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned blocks[5] = '{64'h2, 64'h4A40, 64'h4A41, 64'h1158BF, 64'h116EF5};
    longint unsigned base;
    int n, first, last;
    rst = 1; rd_req = 0; rd_block = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (ready || init_err);
    checks++; if (init_err) begin failures++; $display("FAIL init"); end
    checks++; if (card.cmds < 6) begin failures++; $display("FAIL init cmds %0d", card.cmds); end
    foreach (blocks[b]) begin
      @(posedge clk); #1 rd_block = 32'(blocks[b]); rd_req = 1;
      @(posedge clk); #1 rd_req = 0;
      base = blocks[b] * 512; n = 0; first = -1; last = 0;
      while (!rd_done && !rd_err) begin
        @(posedge clk); #1;
        if (out_valid) begin
          checks++;
          if (out_data != sd_byte(base + longint'(n))) begin
            failures++;
            if (failures < 10) $display("FAIL byte %0d of block %h: %h exp %h", n, blocks[b], out_data, sd_byte(base + longint'(n)));
          end
          if (n == 1) first = $time / 50;
          last = $time / 50;
          n++;
        end
      end
      checks++; if (rd_err || n != 512) begin failures++; $display("FAIL block len %0d", n); end
      checks++; if ((last - first) < 16 * 510) begin failures++; $display("FAIL byte rate"); end
    end
    checks++; if (card.reads != 5) begin failures++; $display("FAIL reads %0d", card.reads); end
    $display("cycles for 510 bytes: %0d", last - first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
