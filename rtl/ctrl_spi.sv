// ctrl_spi: SPI slave of the see-saw controller, clocked by the SPI clock.
//
// The link carries one 16-bit word in each direction per control step and
// uses no chip select. Two side lines frame the transfers instead:
//   * load (driven by the microcontroller) is high while it shifts the new
//     error word in. Every rising sck edge with load high shifts sdi into the
//     error register, most significant bit first, so after 16 edges `error`
//     holds the word.
//   * done (driven by the controller core) is high while the new angle is
//     ready. The microcontroller then clocks 16 bits out; the angle leaves
//     MSB first. Bits written on sdi during the read-out are ignored, so the
//     error register keeps the last error.
// Timing follows the controller's original hardware: sdi is sampled on the
// rising sck edge and sdo changes after the falling edge (SPI mode 0, clock
// idle low). Bit 15 is on sdo as soon as done rises, before the first edge.
// After the 16th read-out edge the module flips `tx_toggle`; the core side
// synchronises it to learn that the angle has been read and lowers done.
// The bit counter wraps at 16, so it realigns itself every read-out; the
// asynchronous reset (held high for milliseconds by the microcontroller while
// sck is idle) clears it at start-up.
// `load` and `done` are used directly in the sck domain: by protocol each is
// stable for the whole time sck toggles. The read-out index, rather than a
// shift register, selects the sdo bit from the held angle word, which the
// core keeps constant while done is high.
module ctrl_spi
  import seesaw_pkg::*;
(
  input  logic  sck,
  input  logic  reset,      // asynchronous, active high
  input  logic  sdi,
  output logic  sdo,
  input  logic  load,
  input  logic  done,
  input  word_t angle,
  output word_t error,
  output logic  tx_toggle
);

  logic [3:0] tx_cnt;   // read-out bits already sampled by the master
  logic [3:0] tx_idx;   // tx_cnt re-timed to the falling edge

  always_ff @(posedge sck or posedge reset) begin
    if (reset) begin
      error     <= '0;
      tx_cnt    <= '0;
      tx_toggle <= 1'b0;
    end else if (load) begin
      error <= {error[WORD_W-2:0], sdi};
    end else if (done) begin
      tx_cnt <= tx_cnt + 4'd1;
      if (tx_cnt == 4'd15) tx_toggle <= ~tx_toggle;
    end
  end

  always_ff @(negedge sck or posedge reset) begin
    if (reset) tx_idx <= '0;
    else       tx_idx <= tx_cnt;
  end

  assign sdo = angle[4'd15 - tx_idx];

endmodule
