// tb_tanh_index: drives the table-address stage with every Q2.14 input value
// around and inside the table interval plus random values over the whole
// range, and compares address and clamp flags with an exact integer division.
// Also checks the one-cycle latency, hold while en is low, and reset.
module tb_tanh_index;
  import tilecal_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n, en;
  q_t   z;
  logic [LUT_ADDR_W-1:0] addr;
  logic clamp_lo, clamp_hi;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0;

  tanh_index dut (.clk, .rst_n, .en, .z, .addr, .clamp_lo, .clamp_hi);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint zv);
    bit lo, hi;
    int exp_a;
    z = q_t'(zv);
    @(negedge clk);
    exp_a = ref_index(zv, lo, hi);
    checks++;
    if (int'(addr) != exp_a || clamp_lo != lo || clamp_hi != hi) begin
      failures++;
      if (failures < 10) $display("FAIL z=%0d addr=%0d lo=%b hi=%b expected %0d %b %b",
                                  zv, addr, clamp_lo, clamp_hi, exp_a, lo, hi);
    end
    n_lo += int'(lo);
    n_hi += int'(hi);
  endtask

  initial begin
    rst_n = 0; en = 1; z = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (addr != 0 || clamp_lo || clamp_hi) failures++;
    rst_n = 1;
    for (longint v = LUT_ZMIN_Q - 50; v <= LUT_ZMIN_Q + LUT_SPAN_Q + 50; v++) apply(v);
    for (int i = 0; i < 5000; i++) apply(longint'($signed(16'($urandom))));
    apply(-32768);
    apply(32767);
    // hold while en low
    apply(0);
    en = 0; z = q_t'(LUT_ZMIN_Q - 1);
    repeat (3) @(negedge clk);
    checks++;
    if (int'(addr) != 2333 || clamp_lo) begin
      failures++;
      $display("FAIL hold: addr=%0d", addr);
    end
    checks++;
    if (n_lo < 50 || n_hi < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
