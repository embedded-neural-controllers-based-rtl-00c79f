// tb_synapse: drives frames with a pre-synaptic spike at step tp and an
// optional post-synaptic spike at step tq (plus a later second post spike
// that must be ignored), then the learning strobe, and compares the weight
// with a reference of the four-window Hebbian rule with saturation. Also
// checks psp (weight during the pre spike, zero otherwise), weight loading,
// that learn_en low or a missing post spike leaves the weight unchanged, and
// counts how often each window and each saturation bound was exercised.
module tb_synapse;
  logic clk = 0, rst_n = 0;
  logic clear, pre_spike, post_spike, learn, learn_en, w_we;
  logic [4:0] t;
  logic [7:0] w_wdata, psp, weight;
  int checks = 0, failures = 0;
  int hits [6];  // sharp, moderate, slight, heavy, clip high, clip low

  synapse #(.WW(8), .TW(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_w(int w, int tp, int tq, bit post, bit en);
    int dt, nw;
    if (!post || !en) return w;
    dt = tq - tp;
    if (tp > tq)       begin nw = w - 8; hits[3]++; end
    else if (dt <= 5)  begin nw = w + 8; hits[0]++; end
    else if (dt <= 10) begin nw = w + 4; hits[1]++; end
    else               begin nw = w - 1; hits[2]++; end
    if (nw > 255) begin nw = 255; hits[4]++; end
    if (nw < 0)   begin nw = 0;   hits[5]++; end
    return nw;
  endfunction

  task automatic frame(int w0, int tp, int tq, bit post, bit en);
    int exp;
    w_we = 1; w_wdata = 8'(w0);
    @(negedge clk);
    w_we = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int s = 0; s <= 16; s++) begin
      t = 5'(s);
      pre_spike  = (s == tp);
      post_spike = post && (s == tq || s == tq + 2);
      #1;
      checks++;
      if (psp !== (pre_spike ? 8'(w0) : 8'd0)) begin
        failures++; $display("FAIL psp %0d at step %0d", psp, s);
      end
      @(negedge clk);
    end
    pre_spike = 0; post_spike = 0;
    learn = 1; learn_en = en;
    @(negedge clk);
    learn = 0; learn_en = 0;
    exp = ref_w(w0, tp, tq, post, en);
    checks++;
    if (int'(weight) != exp) begin
      failures++;
      $display("FAIL w0=%0d tp=%0d tq=%0d post=%0b en=%0b: got %0d exp %0d", w0, tp, tq, post, en, weight, exp);
    end
  endtask

  initial begin
    clear = 0; pre_spike = 0; post_spike = 0; learn = 0; learn_en = 0;
    w_we = 0; w_wdata = 0; t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 checks++; if (weight != 8'd128) failures++;
    // each window at a known weight
    frame(100, 3, 4, 1, 1);   // dt = 1
    frame(100, 3, 8, 1, 1);   // dt = 5
    frame(100, 3, 9, 1, 1);   // dt = 6
    frame(100, 0, 10, 1, 1);  // dt = 10
    frame(100, 0, 11, 1, 1);  // dt = 11
    frame(100, 9, 4, 1, 1);   // pre after post
    frame(252, 1, 2, 1, 1);   // clip high
    frame(3, 9, 2, 1, 1);     // clip low
    frame(100, 3, 4, 0, 1);   // no post spike
    frame(100, 3, 4, 1, 0);   // learning disabled
    repeat (400)
      frame(int'($urandom_range(0, 255)), int'($urandom_range(0, 15)),
            int'($urandom_range(1, 16)), 1'($urandom_range(0, 7) != 0), 1'($urandom_range(0, 5) != 0));
    // a load in the same cycle as learn wins
    frame(50, 3, 4, 1, 1);
    w_we = 1; w_wdata = 8'd77; learn = 1; learn_en = 1;
    @(negedge clk);
    w_we = 0; learn = 0; learn_en = 0;
    checks++; if (weight != 8'd77) begin failures++; $display("FAIL load vs learn"); end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL case %0d never exercised", i); end
    end
    $display("windows: sharp %0d moderate %0d slight %0d heavy %0d clip_hi %0d clip_lo %0d",
             hits[0], hits[1], hits[2], hits[3], hits[4], hits[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
