// tb_snn_top: end-to-end test of the whole network at its default sizes
// (2 inputs x 16 receptive fields, 96 synapses, 3 output neurons).
//
// A reference model of the network, written independently of the RTL
// (receptive-field delays, leaky integrate-and-fire somas, four-window
// Hebbian learning with saturation), runs alongside the design. The test
//   1. checks the reset weights and the weight load/store port,
//   2. checks that all-zero weights give a frame in which nothing fires,
//   3. loads random weights and trains the network on samples drawn around
//      three focus points of the 256x256 input space, with winner-take-all
//      learning (only the first output neuron to fire learns),
//   4. after every frame compares the input spike times, out_fired, out_time
//      and the 19-cycle frame latency with the model, and every 20 frames all
//      96 weights,
//   5. counts each mechanism (output spike, silent frame, repeated firing,
//      hyper-polarization, leak, the four learning windows, both saturation
//      bounds, a start ignored while busy) and fails for any that never
//      happened,
//   6. prints, for each focus point, the output neurons' firing times.
module tb_snn_top;
  import snn_pkg::*;
  localparam int NV = 2, NR = 16, NO = 3, NI = NV * NR;
  localparam int TH = 640, HYP = -64, LEAK = 4;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [NV-1:0][7:0] x;
  logic [NO-1:0] learn_en;
  logic w_we;
  logic [1:0] w_out;
  logic [4:0] w_in;
  logic [7:0] w_wdata, w_rdata;
  logic busy, done;
  phase_e phase;
  logic [NV-1:0][NR-1:0][3:0] in_delay;
  logic [NI-1:0] in_spike;
  logic [NO-1:0] out_spike, out_fired;
  logic [NO-1:0][4:0] out_time;
  logic [NO-1:0][15:0] out_mp;

  snn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int W [NO][NI];           // reference weights
  // mechanism counters
  int n_fire = 0, n_silent = 0, n_multi = 0, n_hyper = 0, n_leak = 0, n_ignored = 0;
  int n_win [4];            // sharp, moderate, slight, heavy
  int n_clip_hi = 0, n_clip_lo = 0;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int model_delay(int k, int xv);
    int a, r;
    a = (xv > 17 * k) ? xv - 17 * k : 17 * k - xv;
    r = (a < 30) ? 35 - $rtoi($floor(a * 35.0 / 30.0)) : 0;
    return 15 - $rtoi($floor(3.0 * r / 7.0 + 0.5));
  endfunction

  task automatic write_w(int j, int i, int v);
    w_we = 1; w_out = 2'(j); w_in = 5'(i); w_wdata = 8'(v);
    @(negedge clk);
    w_we = 0;
    W[j][i] = v;
  endtask

  task automatic check_weights(string when);
    for (int j = 0; j < NO; j++)
      for (int i = 0; i < NI; i++) begin
        w_out = 2'(j); w_in = 5'(i); #1;
        chk($sformatf("%s weight[%0d][%0d]", when, j, i), int'(w_rdata), W[j][i]);
      end
    @(negedge clk);
  endtask

  // One frame: sample (x0, x1); if wta, the first neuron to fire learns.
  task automatic frame(int x0, int x1, bit wta, output int ft_o [NO], output bit fd_o [NO]);
    int tpre [NI];
    int m [NO], ft [NO], nsp [NO];
    bit fd [NO];
    int sum, cyc, st, win, dt, nw, prev_mp [NO];
    int got_t [NI], got_n [NI];
    bit learned [NO];

    // reference: input delays, then the somas over steps 0..16
    for (int v = 0; v < NV; v++)
      for (int k = 0; k < NR; k++) tpre[v*NR+k] = model_delay(k, v == 0 ? x0 : x1);
    for (int j = 0; j < NO; j++) begin
      m[j] = 0; fd[j] = 0; ft[j] = 0; nsp[j] = 0;
      for (int s = 0; s <= 16; s++) begin
        sum = 0;
        for (int i = 0; i < NI; i++) if (tpre[i] == s) sum += W[j][i];
        if (sum == 0) begin
          if (m[j] > 0) m[j] = (m[j] > LEAK) ? m[j] - LEAK : 0;
        end else begin
          m[j] += sum;
          if (m[j] >= TH) begin
            m[j] = HYP; nsp[j]++;
            if (!fd[j]) begin fd[j] = 1; ft[j] = s + 1; end
          end
        end
      end
    end

    // drive the design
    for (int i = 0; i < NI; i++) begin got_n[i] = 0; got_t[i] = -1; end
    for (int j = 0; j < NO; j++) prev_mp[j] = 0;
    start = 1; x[0] = 8'(x0); x[1] = 8'(x1);
    @(negedge clk);
    x = '0;  // start stays high: must be ignored while busy
    cyc = 1; st = -1;
    while (!done && cyc < 40) begin
      if (phase == PH_RUN || phase == PH_SETTLE) begin
        st++;
        for (int i = 0; i < NI; i++) if (in_spike[i]) begin got_n[i]++; got_t[i] = st; end
      end
      if (busy) n_ignored++;
      for (int j = 0; j < NO; j++) begin
        if (int'($signed(out_mp[j])) < 0) n_hyper++;
        if (phase == PH_RUN && int'($signed(out_mp[j])) > 0 && int'($signed(out_mp[j])) < prev_mp[j]) n_leak++;
        prev_mp[j] = int'($signed(out_mp[j]));
      end
      @(negedge clk);
      cyc++;
    end
    start = 0;
    chk("frame latency", cyc, 19);
    for (int i = 0; i < NI; i++) begin
      chk($sformatf("input %0d spikes", i), got_n[i], 1);
      chk($sformatf("input %0d time", i), got_t[i], tpre[i]);
    end
    for (int j = 0; j < NO; j++) begin
      chk($sformatf("out %0d fired", j), int'(out_fired[j]), int'(fd[j]));
      if (fd[j]) chk($sformatf("out %0d time", j), int'(out_time[j]), ft[j]);
      if (fd[j]) n_fire++;
      if (nsp[j] > 1) n_multi++;
    end
    if (!fd[0] && !fd[1] && !fd[2]) n_silent++;

    // winner-take-all learning, applied at the learn edge of this cycle
    win = -1;
    for (int j = 0; j < NO; j++)
      if (fd[j] && (win < 0 || ft[j] < ft[win])) win = j;
    for (int j = 0; j < NO; j++) learned[j] = wta && (j == win);
    learn_en = {learned[2], learned[1], learned[0]};
    @(negedge clk);
    learn_en = '0;
    for (int j = 0; j < NO; j++) if (learned[j])
      for (int i = 0; i < NI; i++) begin
        dt = ft[j] - tpre[i];
        nw = W[j][i];
        if (dt < 0)        begin nw -= 8; n_win[3]++; end
        else if (dt <= 5)  begin nw += 8; n_win[0]++; end
        else if (dt <= 10) begin nw += 4; n_win[1]++; end
        else               begin nw -= 1; n_win[2]++; end
        if (nw > 255) begin nw = 255; n_clip_hi++; end
        if (nw < 0)   begin nw = 0;   n_clip_lo++; end
        W[j][i] = nw;
      end
    ft_o = ft; fd_o = fd;
  endtask

  int fx [3] = '{40, 200, 120};
  int fy [3] = '{50, 90, 210};

  initial begin
    int ft [NO];
    bit fd [NO];
    int ft2 [NO];
    bit fd2 [NO];
    int winner [3];
    int c, prev_t, cur_t;
    start = 0; x = '0; learn_en = '0; w_we = 0; w_out = 0; w_in = 0; w_wdata = 0;
    for (int j = 0; j < NO; j++) for (int i = 0; i < NI; i++) W[j][i] = 128;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_weights("reset");

    // load/store: all zero weights -> silent frame
    for (int j = 0; j < NO; j++) for (int i = 0; i < NI; i++) write_w(j, i, 0);
    check_weights("zeroed");
    frame(100, 100, 0, ft, fd);

    // random initial weights
    for (int j = 0; j < NO; j++) for (int i = 0; i < NI; i++) write_w(j, i, int'($urandom_range(64, 192)));
    check_weights("loaded");

    // training around three focus points
    for (int n = 0; n < 300; n++) begin
      c = int'($urandom_range(0, 2));
      frame(fx[c] + int'($urandom_range(0, 30)) - 15, fy[c] + int'($urandom_range(0, 30)) - 15, 1, ft, fd);
      if (n % 20 == 19) check_weights("training");
    end
    check_weights("trained");

    // evaluation without learning: each focus point gets its own winner,
    // whose firing time grows with the distance from the focus point
    for (c = 0; c < 3; c++) begin
      frame(fx[c], fy[c], 0, ft, fd);
      winner[c] = -1;
      for (int j = 0; j < NO; j++) if (fd[j] && (winner[c] < 0 || ft[j] < ft[winner[c]])) winner[c] = j;
      prev_t = (winner[c] >= 0) ? ft[winner[c]] : 99;
      for (int d = 10; d <= 60; d += 10) begin
        frame(fx[c] > 128 ? fx[c] - d : fx[c] + d, fy[c], 0, ft2, fd2);
        cur_t = (winner[c] >= 0 && fd2[winner[c]]) ? ft2[winner[c]] : 99;
        chk($sformatf("focus %0d: firing time not earlier at distance %0d", c, d), int'(cur_t >= prev_t), 1);
        $display("focus %0d, distance %0d: winner fires at %0d (99 = silent)", c, d, cur_t);
        prev_t = cur_t;
      end
      $display("focus (%0d,%0d): neuron0 %s%0d  neuron1 %s%0d  neuron2 %s%0d", fx[c], fy[c],
               fd[0] ? "t=" : "silent ", fd[0] ? ft[0] : 0,
               fd[1] ? "t=" : "silent ", fd[1] ? ft[1] : 0,
               fd[2] ? "t=" : "silent ", fd[2] ? ft[2] : 0);
    end

    chk("each focus point has its own output neuron", int'(winner[0] >= 0 && winner[1] >= 0 && winner[2] >= 0 &&
        winner[0] != winner[1] && winner[1] != winner[2] && winner[0] != winner[2]), 1);
    $display("mechanisms: fire %0d silent %0d multi %0d hyper %0d leak %0d ignored-start %0d",
             n_fire, n_silent, n_multi, n_hyper, n_leak, n_ignored);
    $display("learning: sharp %0d moderate %0d slight %0d heavy %0d clip_hi %0d clip_lo %0d",
             n_win[0], n_win[1], n_win[2], n_win[3], n_clip_hi, n_clip_lo);
    chk("fire happened", int'(n_fire > 0), 1);
    chk("silent frame happened", int'(n_silent > 0), 1);
    chk("repeated firing happened", int'(n_multi > 0), 1);
    chk("hyper-polarization happened", int'(n_hyper > 0), 1);
    chk("leak happened", int'(n_leak > 0), 1);
    chk("start ignored while busy", int'(n_ignored > 0), 1);
    for (int k = 0; k < 4; k++) chk($sformatf("learning window %0d happened", k), int'(n_win[k] > 0), 1);
    chk("weight saturation high happened", int'(n_clip_hi > 0), 1);
    chk("weight saturation low happened", int'(n_clip_lo > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
