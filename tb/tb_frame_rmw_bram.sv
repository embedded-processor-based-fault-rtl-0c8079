// tb_frame_rmw_bram: checks the frame RAM. Writes a 41-word frame at word
// addresses (15-bit address, word in bits 14:5) with random low bits, reads
// it back with one clock of latency and checks that the low five address
// bits do not change which word is accessed.
module tb_frame_rmw_bram;
  logic clk = 0, we = 0;
  logic [14:0] addr = '0;
  logic [31:0] din = '0, dout;
  logic [31:0] model [41];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_rmw_bram dut (.clk, .we, .addr, .din, .dout);

  initial begin
    for (int w = 0; w < 41; w++) begin
      @(negedge clk);
      we = 1; addr = {10'(w), 5'($urandom)}; din = $urandom; model[w] = din;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 200; k++) begin
      int w;
      w = $urandom % 41;
      @(negedge clk); addr = {10'(w), 5'($urandom)};
      @(negedge clk);
      checks++;
      if (dout != model[w]) begin failures++; $display("FAIL: word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
