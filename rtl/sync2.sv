// sync2: two-flop synchronizer for a single asynchronous level.
//
// Brings a signal that changes in another clock domain (the microcontroller's
// load line, or a toggle from the SPI clock domain) into the controller clock
// domain. The output follows the input two clock edges later. Reset clears
// both stages asynchronously; RST_VAL sets the value they reset to.
module sync2 #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
