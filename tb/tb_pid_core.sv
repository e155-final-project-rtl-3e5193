// tb_pid_core: self-checking test of the PID difference-equation core.
//
// Two instances run side by side: one with the default gains and one with a
// non-zero integral gain. Random and hand-picked errors (including ones large
// enough to wrap the 16-bit output) are applied through the load handshake;
// a reference model written with plain integers, wrapped to 16 bits, predicts
// every output. Also checked: done rises exactly one clock after load is seen
// low, stays high while idle, and clears on a tx_done pulse or a new load.
module tb_pid_core;
  import seesaw_pkg::*;

  localparam int KP_A = 2, KI_A = 0, KD_A = 16;
  localparam int KP_B = 3, KI_B = 1, KD_B = 5;

  logic  clk = 1'b0, reset = 1'b0, load = 1'b0, tx_done = 1'b0;
  word_t e_in;
  word_t u_a, u_b;
  logic  done_a, done_b;
  int    checks = 0, failures = 0;

  pid_core u_a_dut (.clk, .reset, .load, .tx_done, .e_in, .u_out(u_a), .done(done_a));
  pid_core #(.KP(KP_B), .KI(KI_B), .KD(KD_B)) u_b_dut
    (.clk, .reset, .load, .tx_done, .e_in, .u_out(u_b), .done(done_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int ua = 0, ea1 = 0, ea2 = 0, ub = 0, eb1 = 0, eb2 = 0;
  int wraps = 0;

  function automatic int wrap16(input longint v);
    logic signed [15:0] t;
    t = 16'(v);
    return int'(t);
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(input int e, input bit clear_by_tx);
    longint ra, rb;
    @(negedge clk);
    e_in = word_t'(e);
    load = 1'b1;
    @(negedge clk);
    check("done cleared by load", done_a == 1'b0 && done_b == 1'b0);
    load = 1'b0;
    @(posedge clk); #1;              // update edge
    ra = longint'(ua + (KP_A+KI_A+KD_A)*e + (-KP_A-2*KD_A)*ea1 + KD_A*ea2);
    rb = longint'(ub + (KP_B+KI_B+KD_B)*e + (-KP_B-2*KD_B)*eb1 + KD_B*eb2);
    if (ra != longint'(wrap16(ra))) wraps++;
    ua = wrap16(ra); ea2 = ea1; ea1 = e;
    ub = wrap16(rb); eb2 = eb1; eb1 = e;
    check("done one cycle after load falls", done_a && done_b);
    check("u_out default gains", int'(u_a) == ua);
    check("u_out with integral gain", int'(u_b) == ub);
    e_in = word_t'($urandom);      // input changes must not matter now
    repeat (3) @(posedge clk);
    #1 check("done held and output stable", done_a && int'(u_a) == ua && int'(u_b) == ub);
    if (clear_by_tx) begin
      @(negedge clk) tx_done = 1'b1;
      @(negedge clk) tx_done = 1'b0;
      check("done cleared by tx_done", !done_a && !done_b);
    end
  endtask

  initial begin
    e_in = '0;
    #1 reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 check("reset clears output and done", u_a == 0 && !done_a && u_b == 0 && !done_b);
    @(negedge clk) reset = 1'b0;
    repeat (3) @(posedge clk);
    #1 check("no update without a load", !done_a && u_a == 0);
    step(10, 1'b1);
    step(-25, 1'b1);
    step(0, 1'b0);
    step(7, 1'b1);
    for (int i = 0; i < 60; i++) step(int'($urandom_range(0, 400)) - 200, i[0]);
    step(9000, 1'b1);
    step(9000, 1'b1);
    step(-20000, 1'b1);
    check("16-bit wrap exercised", wraps > 0);
    // reset in the middle of operation clears the history
    @(negedge clk) reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    ua = 0; ea1 = 0; ea2 = 0; ub = 0; eb1 = 0; eb2 = 0;
    check("reset clears history", u_a == 0 && u_b == 0);
    step(50, 1'b1);
    step(50, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
