// tb_input_block: encodes a set of input values (the ends of the range, every
// field centre and random values) and checks that every one of the 16 input
// neurons fires exactly once, in the time step given by an independent model
// of the receptive fields, counted from the first step after load.
module tb_input_block;
  localparam int XW = 8, NR = 16, DW = 4;
  logic clk = 0, rst_n = 0;
  logic [XW-1:0] x;
  logic rd, load, step;
  logic [NR-1:0] spike;
  logic [NR-1:0][DW-1:0] delays;
  int checks = 0, failures = 0;

  input_block #(.XW(XW), .NR(NR), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int k, int xv);
    int a, r;
    a = (xv > 17 * k) ? xv - 17 * k : 17 * k - xv;
    r = (a < 30) ? 35 - $rtoi($floor(a * 35.0 / 30.0)) : 0;
    return 15 - $rtoi($floor(3.0 * r / 7.0 + 0.5));
  endfunction

  task automatic encode(int xv);
    int at [NR];
    int n  [NR];
    for (int k = 0; k < NR; k++) begin at[k] = -1; n[k] = 0; end
    x = XW'(xv); rd = 1;
    @(negedge clk);
    rd = 0; x = XW'($urandom);  // the value need only be valid with rd
    load = 1;
    @(negedge clk);
    load = 0; step = 1;
    for (int s = 0; s < 18; s++) begin
      #1;
      for (int k = 0; k < NR; k++) if (spike[k]) begin n[k]++; at[k] = s; end
      @(negedge clk);
    end
    step = 0;
    for (int k = 0; k < NR; k++) begin
      checks++;
      if (n[k] != 1 || at[k] != model(k, xv)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d neuron %0d: %0d spikes, at %0d, exp %0d", xv, k, n[k], at[k], model(k, xv));
      end
      checks++;
      if (int'(delays[k]) != model(k, xv)) failures++;
    end
  endtask

  initial begin
    rd = 0; load = 0; step = 0; x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    encode(0); encode(255); encode(25);
    for (int k = 0; k < NR; k++) encode(17 * k);
    repeat (60) encode(int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
