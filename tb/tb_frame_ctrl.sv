// tb_frame_ctrl: runs frames and checks the phase sequence and cycle counts:
// rd only with start while idle, one load/clear cycle, 17 step cycles with
// t = 0..16, then one learn/done cycle, 19 cycles from start to done; a start
// during a frame is ignored.
module tb_frame_ctrl;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, rd, load, clear, step, learn, done;
  logic [4:0] t;
  phase_e phase;
  int checks = 0, failures = 0;

  frame_ctrl #(.DW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic frame(int idle_before);
    int cyc, nsteps, nload, nlearn;
    start = 0;
    repeat (idle_before) begin
      @(negedge clk);
      expect1("idle busy", busy, 0);
      expect1("idle rd", rd, 0);
    end
    start = 1; #1;
    expect1("rd with start", rd, 1);
    @(negedge clk);
    cyc = 1; nsteps = 0; nload = 0; nlearn = 0;
    // keep start high: must be ignored while busy
    while (!done && cyc < 40) begin
      expect1("busy", busy, 1);
      expect1("no rd while busy", rd, 0);
      if (load) begin nload++; expect1("clear with load", clear, 1); end
      if (step) begin
        checks++;
        if (int'(t) != nsteps) begin failures++; $display("FAIL t=%0d exp %0d", t, nsteps); end
        nsteps++;
      end
      @(negedge clk);
      cyc++;
    end
    expect1("learn with done", learn, 1);
    checks++;
    if (cyc != 19 || nsteps != 17 || nload != 1) begin
      failures++;
      $display("FAIL frame: %0d cycles, %0d steps, %0d loads", cyc, nsteps, nload);
    end
    start = 0;
    @(negedge clk);
    expect1("idle after done", busy, 0);
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(2); frame(0); frame(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
