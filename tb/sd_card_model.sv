// sd_card_model: behavioural SD card in SPI mode for simulation only.
//
// Answers CMD0 (R1 0x01), CMD8 (R7 echoing 0x1AA), CMD55 and ACMD41 (busy
// for BUSY_TRIES attempts, then ready), and CMD17 single-block reads with
// block addressing: R1 0x00, a few 0xFF bytes, the 0xFE token, 512 bytes of
// artemis_tb_pkg::sd_byte, two CRC bytes. Bits are taken on the rising edge
// of sck and the reply bit changes right after it. Counts commands seen.
module sd_card_model #(
  parameter int BUSY_TRIES = 3
) (
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  import artemis_tb_pkg::*;

  byte unsigned txq[$];
  byte unsigned cmd[6];
  logic [7:0]   rx_sh = 8'hFF, tx_sh = 8'hFF;
  int           bitn = 0, ncmd = 0;
  bit           app = 0;
  int           tries = 0;
  int           reads = 0, cmds = 0;

  assign miso = tx_sh[7];

  task automatic handle(byte unsigned b);
    if (ncmd == 0 && (b[7:6] != 2'b01 || cs_n)) return;
    cmd[ncmd++] = b;
    if (ncmd < 6) return;
    ncmd = 0;
    cmds++;
    txq.push_back(8'hFF);
    case (cmd[0][5:0])
      0:  begin txq.push_back(8'h01); app = 0; end
      8:  begin txq.push_back(8'h01); txq.push_back(8'h00); txq.push_back(8'h00);
                txq.push_back(8'h01); txq.push_back(8'hAA); end
      55: begin txq.push_back(8'h01); app = 1; end
      41: begin
            if (app && tries >= BUSY_TRIES) txq.push_back(8'h00);
            else begin txq.push_back(8'h01); tries++; end
            app = 0;
          end
      17: begin
            longint unsigned a;
            a = {cmd[1], cmd[2], cmd[3], cmd[4]};
            a = a * 512;
            reads++;
            txq.push_back(8'h00);
            repeat (3) txq.push_back(8'hFF);
            txq.push_back(8'hFE);
            for (int i = 0; i < 512; i++) txq.push_back(sd_byte(a + longint'(i)));
            txq.push_back(8'h12); txq.push_back(8'h34);
          end
      default: txq.push_back(8'h04);     // illegal command
    endcase
  endtask

  always @(posedge sck) begin
    rx_sh = {rx_sh[6:0], mosi};
    if (bitn == 7) begin
      bitn = 0;
      handle(rx_sh);
      if (cs_n) txq.delete();
      tx_sh <= (txq.size() > 0) ? txq.pop_front() : 8'hFF;
    end else begin
      bitn++;
      tx_sh <= {tx_sh[6:0], 1'b1};
    end
  end
endmodule
