// pid_controller: the FPGA side of the see-saw, an SPI-attached PID
// accelerator.
//
// Per control step the microcontroller (1) raises load and shifts a 16-bit
// signed error in over sdi, (2) lowers load, (3) waits for done, (4) clocks
// the 16-bit signed control word out over sdo while writing don't-care bits,
// after which done falls again. The error is the ball position error in
// millimetres (metres x 1000); the returned word is scaled to an angle by the
// microcontroller.
//
// Structure: ctrl_spi runs on sck; pid_core runs on clk. load is brought into
// clk through a two-flop synchroniser, and the read-out-complete toggle from
// ctrl_spi through another, whose edges become the one-cycle tx_done pulse.
// The error word crosses to clk without synchronisers: it was last written
// before load fell and is read two clk cycles after the fall. done and the
// angle cross to sck likewise, being stable whenever sck toggles.
// Latency: done rises 3 clk edges after load falls (2 synchroniser stages and
// the update edge) and falls about 3 clk edges after the last read-out sck
// edge. reset is active high and asynchronous in both clock domains; the
// microcontroller holds it for milliseconds before the first transfer.
module pid_controller
  import seesaw_pkg::*;
#(
  parameter int KP = 2,
  parameter int KI = 0,
  parameter int KD = 16
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  sck,
  input  logic  sdi,
  output logic  sdo,
  input  logic  load,
  output logic  done,
  output word_t angle     // current controller output, for observation
);

  word_t error;
  logic  load_s;
  logic  tx_toggle, tx_toggle_s, tx_toggle_q;
  logic  tx_done;

  ctrl_spi u_spi (
    .sck       (sck),
    .reset     (reset),
    .sdi       (sdi),
    .sdo       (sdo),
    .load      (load),
    .done      (done),
    .angle     (angle),
    .error     (error),
    .tx_toggle (tx_toggle)
  );

  sync2 u_sync_load (.clk(clk), .reset(reset), .d(load),      .q(load_s));
  sync2 u_sync_tx   (.clk(clk), .reset(reset), .d(tx_toggle), .q(tx_toggle_s));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) tx_toggle_q <= 1'b0;
    else       tx_toggle_q <= tx_toggle_s;
  end

  assign tx_done = tx_toggle_s ^ tx_toggle_q;

  pid_core #(.KP(KP), .KI(KI), .KD(KD)) u_core (
    .clk     (clk),
    .reset   (reset),
    .load    (load_s),
    .tx_done (tx_done),
    .e_in    (error),
    .u_out   (angle),
    .done    (done)
  );

endmodule
