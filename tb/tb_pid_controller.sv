// tb_pid_controller: SPI-level test of the FPGA controller.
//
// A behavioural microcontroller runs the four-phase exchange the controller
// expects: raise load, shift a 16-bit error in (MSB first, 4 MHz SPI clock,
// clock idle low, data set up before each rising edge), lower load, wait for
// done, clock 16 bits out while writing the filler word 0x4148, wait for done
// to fall. The controller clock is 40 MHz. Each returned word is compared
// with an integer model of the PID difference equation at the default gains;
// the angle port must match too. Checked latencies: done rises exactly 3 clk
// edges after load falls and falls within 4 clk edges after the last
// read-out edge. Also covered: a skipped read-out (the next load clears
// done), a reset between runs, and errors large enough to wrap 16 bits.
module tb_pid_controller;
  import seesaw_pkg::*;

  localparam int KP = 2, KI = 0, KD = 16;

  logic  clk = 1'b0, reset = 1'b0, sck = 1'b0, sdi = 1'b0, load = 1'b0;
  logic  sdo, done;
  word_t angle;
  int    checks = 0, failures = 0;
  int    wraps = 0, skipped = 0;

  pid_controller dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
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

  task automatic xfer(input logic [15:0] tx, output logic [15:0] rx);
    for (int i = 15; i >= 0; i--) begin
      sdi = tx[i];
      #125 sck = 1'b1;
      rx[i] = sdo;
      #125 sck = 1'b0;
    end
  endtask

  int u = 0, e1 = 0, e2 = 0;

  function automatic int wrap16(input int v);
    return int'(signed'(16'(v)));
  endfunction

  task automatic control_step(input int e, input bit read_back);
    logic [15:0] rx;
    int cyc, full;
    load = 1'b1;
    #300 xfer(16'(e), rx);
    #300 load = 1'b0;
    full = u + (KP+KI+KD)*e + (-KP-2*KD)*e1 + KD*e2;
    if (full != wrap16(full)) wraps++;
    u = wrap16(full); e2 = e1; e1 = e;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; #1; end
    check("done 3 clk edges after load falls", cyc == 3);
    check("angle port", int'(angle) == u);
    if (read_back) begin
      #400 xfer(16'h4148, rx);
      check("angle over SPI", int'(signed'(rx)) == u);
      cyc = 0;
      while (done && cyc < 10) begin @(posedge clk); cyc++; #1; end
      check("done falls after read-out", !done && cyc <= 4);
    end else begin
      skipped++;
      #2000 check("done held while unread", done);
    end
    #1000;
  endtask

  initial begin
    #5 reset = 1'b1;
    #1000 reset = 1'b0;
    #500 check("idle after reset", !done && angle == 0);
    control_step(12, 1);
    control_step(-40, 1);
    control_step(3, 0);        // read-out skipped: next load clears done
    control_step(0, 1);
    for (int i = 0; i < 40; i++) control_step(int'($urandom_range(0, 600)) - 300, 1);
    control_step(15000, 1);    // large errors wrap the 16-bit output
    control_step(-15000, 1);
    check("wrap seen", wraps > 0);
    check("skip seen", skipped > 0);
    #200 reset = 1'b1;
    #500 reset = 1'b0;
    u = 0; e1 = 0; e2 = 0;
    #200 check("reset clears output", angle == 0 && !done);
    control_step(100, 1);
    control_step(-7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
