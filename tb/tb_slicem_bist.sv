// tb_slicem_bist: runs the SliceM BIST session on a 2 x 4 array of
// modelled 256 x 1 LUT RAMs (synchronous write, asynchronous read). A
// fault-free array must pass; a stuck-at cell in one RAM must be caught by
// the two analysers of its column that compare that RAM, and by the chain.
module tb_slicem_bist;
  localparam int R = 2, C = 4;
  logic clk = 0, rst = 1, start = 0, done, fail;
  logic [7:0] ram_addr [R];
  logic       ram_we [R], ram_din [R];
  logic       ram_dout [R][C];
  logic       pass [R][C];
  bit         mem [R][C][256];
  int         bad_r = -1, bad_c = -1, bad_a = 0;
  bit         bad_v = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slicem_bist dut (.clk, .rst, .start, .done, .ram_addr, .ram_we, .ram_din,
                   .ram_dout, .pass, .fail);

  always @(posedge clk)
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (ram_we[r]) mem[r][c][ram_addr[r]] <= ram_din[r];

  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        ram_dout[r][c] = (r == bad_r && c == bad_c && ram_addr[r] == 8'(bad_a))
                         ? bad_v : mem[r][c][ram_addr[r]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic session();
    int cyc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    check(cyc > 2048 && cyc < 2060, $sformatf("session length %0d", cyc));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    session();
    check(!fail, "fault-free session passes");
    for (int k = 0; k < 3; k++) begin
      bad_r = $urandom % R; bad_c = $urandom % C; bad_a = $urandom % 256; bad_v = 1'($urandom);
      session();
      check(fail, "stuck-at cell detected");
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          check(pass[r][c] == (c != bad_c), $sformatf("ORA %0d,%0d", r, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
