// tb_bscan_if: checks the boundary-scan user register with a fault-list
// RAM behind it. Scans write random entries, read scans return them on
// tdo, a scan without the write flag leaves the RAM unchanged, and the
// register ignores shift pulses while SEL is low.
module tb_bscan_if;
  localparam int unsigned AW = 10;
  logic tck = 0, rst = 1, sel = 0, capture = 0, shift = 0, update = 0, tdi = 0, tdo;
  logic ram_we;
  logic [AW-1:0] ram_addr, addr_a = '0;
  logic [35:0] ram_din, ram_dout, dout_a;
  logic [35:0] model [16];
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  bscan_if dut (.tck, .rst, .sel, .capture, .shift, .update, .tdi, .tdo,
                .ram_we, .ram_addr, .ram_din, .ram_dout);
  fault_list_bram #(.AW(AW)) u_ram (.clk_a (tck), .addr_a, .dout_a,
    .clk_b (tck), .we_b (ram_we), .addr_b (ram_addr), .din_b (ram_din), .dout_b (ram_dout));

  task automatic scan(input logic [46:0] v, output logic [46:0] out, input bit s = 1);
    @(negedge tck); sel = s; capture = 1;
    @(negedge tck); capture = 0; shift = 1;
    for (int k = 0; k < 47; k++) begin
      tdi = v[k]; out[k] = tdo;
      @(negedge tck);
    end
    shift = 0; update = 1;
    @(negedge tck); update = 0; sel = 0;
  endtask

  logic [46:0] o;

  initial begin
    repeat (2) @(negedge tck);
    rst = 0;
    for (int k = 0; k < 16; k++) begin
      model[k] = {4'($urandom), 32'($urandom)};
      scan({1'b1, 10'(k * 3), model[k]}, o);
    end
    // a scan with SEL low must not write
    scan({1'b1, 10'(0), 36'h0}, o, 0);
    // a read-only scan must not write
    scan({1'b0, 10'(3), 36'hF_FFFF_FFFF}, o);
    for (int k = 0; k < 16; k++) begin
      scan({1'b0, 10'(k * 3), 36'h0}, o);
      scan({1'b0, 10'(k * 3), 36'h0}, o);
      checks++;
      if (o[35:0] != model[k]) begin failures++; $display("FAIL: read %0d", k); end
      addr_a = 10'(k * 3);
      @(negedge tck); @(negedge tck);
      checks++;
      if (dout_a != model[k]) begin failures++; $display("FAIL: ram %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
