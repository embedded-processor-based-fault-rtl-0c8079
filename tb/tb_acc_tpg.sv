// tb_acc_tpg: checks the accumulator TPG. Over one 4096-clock phase every
// pattern must equal k * 0xCA6691 mod 2**12 for step k, all 4096 patterns
// must appear (exhaustive in 2**12 clocks), the pattern MSB must toggle 3361 times (a
// binary counter toggles it twice), en = 0 must hold the pattern and
// clear must restart it at zero.
module tb_acc_tpg;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [11:0] pattern;
  bit seen [4096];
  int checks = 0, failures = 0;
  int unsigned distinct = 0, msb_toggles = 0;
  logic [11:0] prev;

  always #5 clk = ~clk;

  acc_tpg dut (.clk, .rst, .clear, .en, .pattern);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0; en = 1;
    for (int unsigned k = 0; k < 4096; k++) begin
      check(pattern == 12'((k * 32'hCA6691) & 32'hFFF), $sformatf("pattern %0d", k));
      if (!seen[pattern]) distinct++;
      seen[pattern] = 1;
      if (k > 0 && pattern[11] != prev[11]) msb_toggles++;
      prev = pattern;
      @(negedge clk);
    end
    check(distinct == 4096, $sformatf("distinct patterns %0d", distinct));
    check(pattern == 12'h000, "period of 4096 clocks");
    check(msb_toggles == 3361, $sformatf("MSB toggles %0d", msb_toggles));
    en = 0; prev = pattern;
    repeat (5) @(negedge clk);
    check(pattern == prev, "hold with en low");
    en = 1; repeat (7) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(pattern == 12'h000, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
