// tb_soma: feeds the 32-input soma frames of random sparse weighted inputs and
// compares the membrane potential, the spike, and the first-spike record with
// a cycle-by-cycle reference model of the leaky integrate-and-fire rule
// (sum, threshold 640, reset to -64, linear leak of 4 towards 0). Counts
// firings, leak steps and steps spent hyper-polarized, and fails if any of
// them never happened.
module tb_soma;
  localparam int NI = 32, TH = 640, HYP = -64, LEAK = 4;
  logic clk = 0, rst_n = 0;
  logic clear, integ;
  logic [4:0] t;
  logic [NI-1:0][7:0] psp;
  logic spike, fired;
  logic [4:0] fire_time;
  logic signed [15:0] mp;
  int checks = 0, failures = 0;
  int n_fire = 0, n_leak = 0, n_hyper = 0, n_multi = 0;

  soma #(.NI(NI), .WW(8), .TW(5), .MPW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic frame(int density, int maxw);
    int m, sum, ftime, nf;
    bit sp, fd;
    clear = 1;
    @(negedge clk);
    clear = 0;
    m = 0; sp = 0; fd = 0; ftime = 0; nf = 0;
    for (int s = 0; s <= 16; s++) begin
      t = 5'(s); integ = 1; sum = 0;
      for (int i = 0; i < NI; i++) begin
        psp[i] = ($urandom_range(0, 99) < density) ? 8'($urandom_range(0, maxw)) : 8'd0;
        sum += int'(psp[i]);
      end
      #1;
      chk("mp", int'(mp), m);
      chk("spike", int'(spike), int'(sp));
      // the first spike is recorded with the step it is seen in
      if (sp && !fd) begin fd = 1; ftime = s; end
      if (m < 0) n_hyper++;
      // reference update
      sp = 0;
      if (sum == 0) begin
        if (m > 0) begin m = (m > LEAK) ? m - LEAK : 0; n_leak++; end
      end else begin
        m = m + sum;
        if (m >= TH) begin m = HYP; sp = 1; n_fire++; nf++; end
      end
      @(negedge clk);
    end
    integ = 0; t = 5'd17;
    for (int i = 0; i < NI; i++) psp[i] = 0;
    #1;
    if (sp && !fd) begin fd = 1; ftime = 17; end
    chk("spike after last step", int'(spike), int'(sp));
    @(negedge clk);
    chk("fired", int'(fired), int'(fd));
    if (fd) chk("fire_time", int'(fire_time), ftime);
    if (nf > 1) n_multi++;
  endtask

  initial begin
    clear = 0; integ = 0; t = 0; psp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (100) frame(5, 60);     // weak: leaks, rarely fires
    repeat (100) frame(20, 255);   // strong: fires, often more than once
    repeat (100) frame(10, 150);
    checks++; if (n_fire == 0)  begin failures++; $display("FAIL never fired"); end
    checks++; if (n_leak == 0)  begin failures++; $display("FAIL never leaked"); end
    checks++; if (n_hyper == 0) begin failures++; $display("FAIL never hyper-polarized"); end
    $display("fired %0d, leak steps %0d, hyper-polarized steps %0d, frames with several spikes %0d",
             n_fire, n_leak, n_hyper, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
