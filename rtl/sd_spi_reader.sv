// sd_spi_reader: SD card controller, SPI mode, reading 512-byte blocks.
//
// The control FPGA keeps the full and partial Artix-7 bitstreams on an SD
// card and reads them through this controller. After reset it brings the card
// up in SPI mode: 80 clocks with chip select high, CMD0 (expects R1 = 0x01),
// CMD8 (R7, four bytes discarded), then CMD55 + ACMD41 with HCS set, repeated
// until R1 = 0x00. The card is taken to use block addressing (SDHC/SDXC), so
// rd_block is the 512-byte block number. A read (rd_req for one clock while
// ready) sends CMD17, waits for R1 = 0x00 and the 0xFE data token, passes the
// 512 data bytes out on out_valid/out_data (one clock per byte, no back
// pressure: a byte takes at least 16 clocks on the wire), drops the two CRC
// bytes and pulses rd_done. An unexpected response or a timeout ends the
// operation with rd_err (reads) or init_err (initialisation) instead.
// The command sequence is the standard SD SPI-mode protocol; the document
// only names an SD card controller. SCK runs at clk / (2*SLOW_HALF) during
// initialisation and clk / (2*FAST_HALF) afterwards.
module sd_spi_reader #(
  parameter int unsigned SLOW_HALF  = 25,    // 20 MHz / 50 = 400 kHz
  parameter int unsigned FAST_HALF  = 1,     // 20 MHz / 2  = 10 MHz
  parameter int unsigned INIT_TRIES = 4000,  // ACMD41 attempts
  parameter int unsigned POLL_LIMIT = 65535  // bytes polled for R1 or data token
) (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,       // initialised and idle
  output logic        init_err,
  input  logic        rd_req,
  input  logic [31:0] rd_block,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        rd_done,
  output logic        rd_err,
  output logic        sd_cs_n,
  output logic        sd_sck,
  output logic        sd_mosi,
  input  logic        sd_miso
);

  typedef enum logic [4:0] {
    S_POWERUP, S_CMD_LOAD, S_CMD_SEND, S_R1_POLL, S_R1_CHECK, S_EXTRA,
    S_GAP, S_IDLE, S_TOKEN, S_DATA, S_CRC, S_FAIL
  } state_t;

  // which command of the sequence is in flight
  typedef enum logic [2:0] { C_CMD0, C_CMD8, C_CMD55, C_ACMD41, C_CMD17 } cmd_t;

  state_t      st;
  cmd_t        cmd;
  logic [47:0] frame;
  logic [2:0]  nbyte;
  logic [15:0] poll;
  logic [9:0]  dcnt;
  logic [15:0] tries;
  logic [7:0]  r1;
  logic        fast;
  logic [31:0] blk;

  logic       xs, xbusy, xdone;
  logic [7:0] xtx, xrx;

  spi_byte_engine u_spi (
    .clk, .rst,
    .half_cycles(fast ? 8'(FAST_HALF) : 8'(SLOW_HALF)),
    .start(xs), .tx(xtx), .busy(xbusy), .done(xdone), .rx(xrx),
    .sck(sd_sck), .mosi(sd_mosi), .miso(sd_miso)
  );

  function automatic logic [47:0] mk_cmd(cmd_t c, logic [31:0] arg);
    case (c)
      C_CMD0:   return {8'h40, 32'h0000_0000, 8'h95};
      C_CMD8:   return {8'h48, 32'h0000_01AA, 8'h87};
      C_CMD55:  return {8'h77, 32'h0000_0000, 8'h65};
      C_ACMD41: return {8'h69, 32'h4000_0000, 8'h77};
      default:  return {8'h51, arg, 8'hFF};
    endcase
  endfunction

  assign ready = (st == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_POWERUP; cmd <= C_CMD0; frame <= '0; nbyte <= '0; poll <= '0;
      dcnt <= '0; tries <= '0; r1 <= '0; fast <= 1'b0; blk <= '0;
      xs <= 1'b0; xtx <= 8'hFF; sd_cs_n <= 1'b1;
      init_err <= 1'b0; rd_done <= 1'b0; rd_err <= 1'b0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      xs <= 1'b0; rd_done <= 1'b0; rd_err <= 1'b0; out_valid <= 1'b0;
      case (st)
        S_POWERUP: begin                       // 10 bytes of 0xFF, CS high
          if (!xbusy && !xs) begin
            if (xdone && dcnt == 10'd9) begin
              dcnt <= '0; cmd <= C_CMD0; st <= S_CMD_LOAD;
            end else begin
              if (xdone) dcnt <= dcnt + 10'd1;
              xtx <= 8'hFF; xs <= 1'b1;
            end
          end
        end
        S_CMD_LOAD: begin
          frame <= mk_cmd(cmd, blk); nbyte <= 3'd0; sd_cs_n <= 1'b0;
          st <= S_CMD_SEND;
        end
        S_CMD_SEND: begin
          if (!xbusy && !xs) begin
            if (xdone && nbyte == 3'd5) begin
              poll <= '0; st <= S_R1_POLL; xtx <= 8'hFF; xs <= 1'b1;
            end else begin
              if (xdone) begin nbyte <= nbyte + 3'd1; frame <= {frame[39:0], 8'hFF}; end
              xtx <= xdone ? frame[39:32] : frame[47:40]; xs <= 1'b1;
            end
          end
        end
        S_R1_POLL: begin                       // wait for a byte with MSB low
          if (xdone) begin
            if (!xrx[7]) begin
              r1 <= xrx; st <= S_R1_CHECK;
            end else if (poll == 16'(POLL_LIMIT)) begin
              st <= S_FAIL;
            end else begin
              poll <= poll + 16'd1; xtx <= 8'hFF; xs <= 1'b1;
            end
          end
        end
        S_R1_CHECK: begin
          case (cmd)
            C_CMD0:  st <= (r1 == 8'h01) ? S_GAP : S_FAIL;
            C_CMD8:  begin                      // four R7 bytes follow
              if (r1 == 8'h01) begin dcnt <= '0; st <= S_EXTRA; xtx <= 8'hFF; xs <= 1'b1; end
              else st <= S_FAIL;
            end
            C_CMD55: st <= (r1[7:1] == 7'd0) ? S_GAP : S_FAIL;
            C_ACMD41: begin
              if (r1 == 8'h00) begin st <= S_GAP; end
              else if (r1 == 8'h01 && tries < 16'(INIT_TRIES)) begin
                tries <= tries + 16'd1; st <= S_GAP;
              end else st <= S_FAIL;
            end
            default: begin                      // CMD17
              if (r1 == 8'h00) begin poll <= '0; st <= S_TOKEN; xtx <= 8'hFF; xs <= 1'b1; end
              else st <= S_FAIL;
            end
          endcase
        end
        S_EXTRA: begin
          if (xdone) begin
            if (dcnt == 10'd3) st <= S_GAP;
            else begin dcnt <= dcnt + 10'd1; xtx <= 8'hFF; xs <= 1'b1; end
          end
        end
        S_GAP: begin                           // CS high, one idle byte
          if (!xbusy && !xs) begin
            if (xdone) begin
              // choose what follows
              case (cmd)
                C_CMD0:   begin cmd <= C_CMD8;  st <= S_CMD_LOAD; end
                C_CMD8:   begin cmd <= C_CMD55; st <= S_CMD_LOAD; end
                C_CMD55:  begin cmd <= C_ACMD41; st <= S_CMD_LOAD; end
                C_ACMD41: begin
                  if (r1 == 8'h00) begin fast <= 1'b1; st <= S_IDLE; end
                  else begin cmd <= C_CMD55; st <= S_CMD_LOAD; end
                end
                default:  begin rd_done <= 1'b1; st <= S_IDLE; end
              endcase
            end else begin
              sd_cs_n <= 1'b1; xtx <= 8'hFF; xs <= 1'b1;
            end
          end
        end
        S_IDLE: begin
          sd_cs_n <= 1'b1;
          if (rd_req) begin
            blk <= rd_block; cmd <= C_CMD17; st <= S_CMD_LOAD;
          end
        end
        S_TOKEN: begin
          if (xdone) begin
            if (xrx == 8'hFE) begin
              dcnt <= '0; st <= S_DATA; xtx <= 8'hFF; xs <= 1'b1;
            end else if (xrx != 8'hFF || poll == 16'(POLL_LIMIT)) begin
              st <= S_FAIL;
            end else begin
              poll <= poll + 16'd1; xtx <= 8'hFF; xs <= 1'b1;
            end
          end
        end
        S_DATA: begin
          if (xdone) begin
            out_valid <= 1'b1; out_data <= xrx;
            if (dcnt == 10'd511) begin dcnt <= '0; st <= S_CRC; end
            else dcnt <= dcnt + 10'd1;
            xtx <= 8'hFF; xs <= 1'b1;
          end
        end
        S_CRC: begin
          if (xdone) begin
            if (dcnt == 10'd1) st <= S_GAP;
            else begin dcnt <= 10'd1; xtx <= 8'hFF; xs <= 1'b1; end
          end
        end
        default: begin                         // S_FAIL
          sd_cs_n <= 1'b1;
          if (!xbusy) begin
            if (cmd == C_CMD17) begin rd_err <= 1'b1; st <= S_IDLE; end
            else init_err <= 1'b1;             // stays here until reset
          end
        end
      endcase
    end
  end

endmodule
