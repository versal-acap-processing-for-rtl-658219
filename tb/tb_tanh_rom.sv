// tb_tanh_rom: reads every entry of the tanh table and compares it with
// tanh() of the bin centre, computed two ways (the rounded $tanh value must
// match exactly, an exp()-based value to within one LSB). Also checks the
// one-cycle read latency, that data holds while en is low, that the table is
// monotonic and that out-of-range addresses read the last entry.
module tb_tanh_rom;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic en;
  logic [LUT_ADDR_W-1:0] addr;
  q_t data;
  int checks = 0, failures = 0;

  tanh_rom dut (.clk, .en, .addr, .data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint prev;
    real xc, ex;
    en = 1; addr = '0;
    @(negedge clk);
    for (int i = 0; i < LUT_DEPTH; i++) begin
      addr = LUT_ADDR_W'(i);
      @(negedge clk);
      xc = (real'(LUT_ZMIN_Q) + (real'(i) + 0.5) * 1.5 * 16384.0 / real'(LUT_DEPTH)) / 16384.0;
      ex = ($exp(2.0 * xc) - 1.0) / ($exp(2.0 * xc) + 1.0) * 16384.0;
      check(longint'(data) == ref_rom(i), $sformatf("entry %0d = %0d, expected %0d", i, data, ref_rom(i)));
      check(real'(data) - ex < 1.0 && ex - real'(data) < 1.0, $sformatf("entry %0d far from tanh", i));
      if (i > 0) check(longint'(data) >= prev, $sformatf("not monotonic at %0d", i));
      prev = longint'(data);
    end
    // end values: tanh(-0.7) ~ -0.604, tanh(0.8) ~ 0.664
    addr = '0; @(negedge clk);
    check(data > -16'sd9920 && data < -16'sd9880, "first entry not tanh(-0.7)");
    addr = LUT_ADDR_W'(LUT_DEPTH - 1); @(negedge clk);
    check(data > 16'sd10860 && data < 16'sd10900, "last entry not tanh(0.8)");
    // latency: data changes on the first edge after addr
    addr = '0; @(negedge clk);
    addr = LUT_ADDR_W'(LUT_DEPTH - 1);
    @(posedge clk); #1;
    check(longint'(data) == ref_rom(LUT_DEPTH - 1), "read latency is not one cycle");
    // hold while en is low
    en = 0; addr = '0;
    repeat (3) @(negedge clk);
    check(longint'(data) == ref_rom(LUT_DEPTH - 1), "data changed while en low");
    // out of range address reads last entry
    en = 1; addr = '1; @(negedge clk);
    check(longint'(data) == ref_rom(LUT_DEPTH - 1), "out-of-range address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
