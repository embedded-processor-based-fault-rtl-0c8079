// tb_fault_list_init: checks that the fault list can be preloaded, as a
// block RAM initialised with the configuration bitstream. The RAM is built
// with INIT_FILE pointing at an eight-entry image; the entries must read
// back on port A in order and the rest of the RAM must be zero.
module tb_fault_list_init;
  logic clk = 0;
  logic [9:0]  addr_a = '0;
  logic [35:0] dout_a, dout_b;
  logic [35:0] expected [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fault_list_bram #(.INIT_FILE("tb/fault_list_init.hex")) dut (
    .clk_a (clk), .addr_a, .dout_a,
    .clk_b (clk), .we_b (1'b0), .addr_b (10'd0), .din_b (36'h0), .dout_b);

  initial begin
    // the same words as the image file, written out independently
    expected = '{36'h49f767c45, 36'h5bde5c099, 36'hbcb91ce37, 36'hdf1446bea, 36'habd69fe29, 36'h8ec1d7da0, 36'hd076ce2ef, 36'hc77330bdb};
    for (int k = 0; k < 12; k++) begin
      @(negedge clk); addr_a = 10'(k);
      @(negedge clk);
      checks++;
      if (dout_a != (k < 8 ? expected[k] : 36'h0)) begin
        failures++; $display("FAIL: entry %0d = %h", k, dout_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
