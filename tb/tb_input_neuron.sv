// tb_input_neuron: for every delay 0..15 loads the neuron, runs 17 time steps
// and checks that exactly one spike occurs, in the step equal to the delay;
// also checks that no spike occurs while step is low and none before a load.
module tb_input_neuron;
  logic clk = 0, rst_n = 0;
  logic load, step;
  logic [3:0] delay;
  logic spike;
  int checks = 0, failures = 0;

  input_neuron #(.DW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, at;
    load = 0; step = 0; delay = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no spike after reset
    step = 1;
    repeat (20) begin @(negedge clk); checks++; if (spike) failures++; end
    step = 0;
    for (int d = 0; d < 16; d++) begin
      load = 1; delay = 4'(d);
      @(negedge clk);
      load = 0; delay = 4'($urandom);
      n = 0; at = -1;
      for (int s = 0; s < 17; s++) begin
        // a pause without a step must not advance the neuron
        if (s == 3) begin
          step = 0; #1;
          checks++; if (spike) failures++;
          @(negedge clk);
        end
        step = 1; #1;
        if (spike) begin n++; at = s; end
        @(negedge clk);
      end
      step = 0;
      checks++;
      if (n != 1 || at != d) begin
        failures++;
        $display("FAIL delay %0d: %0d spikes, last at step %0d", d, n, at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
