// tb_tmr_voter: random words with no fault, one faulted slot or all three
// different; Health_Tile, voted word and no_majority are compared with a
// reference computed here, one clock after the inputs.
module tb_tmr_voter;
  import artemis_pkg::*;
  logic clk = 0, rst;
  tile_word_t [2:0] in;
  tile_word_t voted;
  health_t health_tile;
  logic no_majority;
  int checks = 0, failures = 0;
  int nfault[4];

  tmr_voter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tile_word_t w, x, y;
    int mode, exp_h;
    bit exp_nm;
    tile_word_t exp_v;
    rst = 1; in = '0; @(posedge clk); #1 rst = 0;
    checks++; if (health_tile != HEALTH_OK) failures++;
    for (int i = 0; i < 4000; i++) begin
      w = tile_word_t'($urandom); mode = $urandom_range(0, 4);
      x = w ^ tile_word_t'(1 << $urandom_range(0, 13));
      y = x ^ tile_word_t'(1 << $urandom_range(0, 13));
      if (y == w) y = ~w;
      exp_nm = 0; exp_v = w;
      case (mode)
        0: begin in = {w, w, w}; exp_h = 3; end
        1: begin in = {w, w, x}; exp_h = 0; end
        2: begin in = {w, x, w}; exp_h = 1; end
        3: begin in = {x, w, w}; exp_h = 2; end
        default: begin in = {y, x, w}; exp_h = 3; exp_nm = 1;
                 exp_v = (w & x) | (w & y) | (x & y); end
      endcase
      @(posedge clk); #1;
      checks++;
      if (int'(health_tile) != exp_h || voted != exp_v || no_majority != exp_nm) begin
        failures++;
        $display("FAIL mode %0d: h=%0d exp %0d voted=%h exp %h nm=%0d", mode, health_tile, exp_h, voted, exp_v, no_majority);
      end
      nfault[exp_h]++;
    end
    $display("slot faults %0d %0d %0d", nfault[0], nfault[1], nfault[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
