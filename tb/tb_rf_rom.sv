// tb_rf_rom: checks every word of the encoding memory on both ports against
// an independent model of the triangular receptive fields (real arithmetic),
// the one-cycle read latency, that a disabled read holds the output, and that
// every input value stimulates between two and four fields (delay < 15).
module tb_rf_rom;
  localparam int XW = 8, NR = 16, DW = 4;
  logic clk = 0;
  logic en;
  logic [XW:0] addr_a, addr_b;
  logic [NR/2*DW-1:0] data_a, data_b;
  int checks = 0, failures = 0;

  rf_rom #(.XW(XW), .NR(NR), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent model: centre 17k, activation 35 at the centre, zero at 30
  function automatic int model(int k, int x);
    int a, r;
    a = (x > 17 * k) ? x - 17 * k : 17 * k - x;
    r = (a < 30) ? 35 - $rtoi($floor(a * 35.0 / 30.0)) : 0;
    return 15 - $rtoi($floor(3.0 * r / 7.0 + 0.5));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int active;
    en = 0; addr_a = 0; addr_b = 0;
    @(negedge clk);
    for (int x = 0; x < 256; x++) begin
      en = 1; addr_a = {1'b0, 8'(x)}; addr_b = {1'b1, 8'(x)};
      @(negedge clk);
      en = 0; addr_a = 0; addr_b = 0;
      active = 0;
      for (int k = 0; k < 8; k++) begin
        check($sformatf("x=%0d field %0d", x, k), int'(data_a[k*4 +: 4]), model(k, x));
        check($sformatf("x=%0d field %0d", x, k + 8), int'(data_b[k*4 +: 4]), model(k + 8, x));
        if (data_a[k*4 +: 4] != 4'd15) active++;
        if (data_b[k*4 +: 4] != 4'd15) active++;
      end
      checks++;
      if (active < 2 || active > 4) begin
        failures++;
        $display("FAIL x=%0d stimulates %0d fields", x, active);
      end
      // data held while en is low
      @(negedge clk);
      check("hold", int'(data_a[3:0]), model(0, x));
    end
    // peak: field k at its centre fires at step 0
    for (int k = 0; k < 16; k++) begin
      en = 1; addr_a = {1'b0, 8'(17 * k)}; addr_b = {1'b1, 8'(17 * k)};
      @(negedge clk);
      check($sformatf("peak %0d", k), int'({data_b, data_a} >> (4 * k)) & 15, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
