// tb_fault_list_bram: checks the dual-port fault-list RAM. Port B (scan
// clock) writes random words, port A (system clock) and port B read them
// back with one clock of latency; the expected values come from a
// testbench copy of what was written.
module tb_fault_list_bram;
  localparam int unsigned AW = 10;
  logic clk = 0, tck = 0, we_b = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [35:0] dout_a, dout_b, din_b = '0;
  logic [35:0] model [2**AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always #6 tck = ~tck;

  fault_list_bram dut (.clk_a (clk), .addr_a, .dout_a,
    .clk_b (tck), .we_b, .addr_b, .din_b, .dout_b);

  initial begin
    for (int i = 0; i < 2**AW; i++) model[i] = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge tck);
      we_b = 1; addr_b = AW'($urandom); din_b = {4'($urandom), 32'($urandom)};
      model[addr_b] = din_b;
    end
    @(negedge tck); we_b = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); addr_a = AW'($urandom);
      @(negedge clk);
      checks++;
      if (dout_a != model[addr_a]) begin failures++; $display("FAIL: port A %0d", addr_a); end
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge tck); addr_b = AW'($urandom);
      @(negedge tck);
      checks++;
      if (dout_b != model[addr_b]) begin failures++; $display("FAIL: port B %0d", addr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
