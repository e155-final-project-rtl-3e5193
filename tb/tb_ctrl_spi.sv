// tb_ctrl_spi: self-checking test of the SCK-domain SPI slave.
//
// A behavioural master (clock idle low, drives sdi before each rising edge,
// samples sdo on each rising edge, 16 bits MSB first) writes error words with
// load high and reads angle words with done high. Checks: the error register
// holds each written word, every read returns the presented angle bit for
// bit, bits written during a read-out leave the error alone, tx_toggle flips
// once per 16-bit read-out, and clocks with neither line high change nothing.
module tb_ctrl_spi;
  import seesaw_pkg::*;

  logic  sck = 1'b0, reset = 1'b0, sdi = 1'b0, load = 1'b0, done = 1'b0;
  logic  sdo, tx_toggle;
  word_t angle = '0, error;
  int    checks = 0, failures = 0;
  localparam time HALF = 125;   // 4 MHz SPI clock

  ctrl_spi dut (.*);

  initial begin
    #2ms;   // 8000 SPI clock periods
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one 16-bit full-duplex transfer
  task automatic xfer(input logic [15:0] tx, output logic [15:0] rx);
    for (int i = 15; i >= 0; i--) begin
      sdi = tx[i];
      #HALF sck = 1'b1;
      rx[i] = sdo;
      #HALF sck = 1'b0;
    end
  endtask

  logic [15:0] rx, w;
  logic        tg;

  initial begin
    #10 reset = 1'b1;
    #400 reset = 1'b0;
    #400;
    for (int n = 0; n < 40; n++) begin
      w = 16'($urandom);
      load = 1'b1;
      #200 xfer(w, rx);
      #200 load = 1'b0;
      check("error word received", error == word_t'(w));
      // idle clocks change nothing
      if (n % 5 == 0) begin
        tg = tx_toggle;
        xfer(16'hFFFF, rx);
        check("idle clocks ignored", error == word_t'(w) && tx_toggle == tg);
      end
      angle = word_t'($urandom);
      #300 done = 1'b1;
      tg = tx_toggle;
      #200 check("msb presented before first edge", sdo == angle[15]);
      xfer(16'h4148, rx);
      check("angle read out", rx == 16'(angle));
      if (rx != 16'(angle)) $display("rx %h angle %h", rx, angle);
      check("tx_toggle flipped", tx_toggle == ~tg);
      check("error kept during read-out", error == word_t'(w));
      #200 done = 1'b0;
      #300;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
