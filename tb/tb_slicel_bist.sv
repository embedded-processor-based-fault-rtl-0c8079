// tb_slicel_bist: runs SliceL BIST phases on a 3 x 4 array of modelled
// blocks under test, each a pair of 64-entry look-up functions of its
// 12-bit pattern (x from bits 5:0, y from bits 11:6). A fault-free phase
// must pass; a phase with one wrong LUT entry in one BUT must be caught by
// exactly the two analysers that compare that BUT, and the chain must
// report it. A stuck output bit of one of the two pattern generators must
// also be caught, since neighbouring columns use different generators. The
// phase must take 2**12 clocks from start to done.
module tb_slicel_bist;
  localparam int R = 3, C = 4;
  logic clk = 0, rst = 1, start = 0, running, done, fail;
  logic [11:0] but_in [C];
  logic [1:0]  but_out [R][C];
  logic        pass [R][C];
  logic [63:0] lut_x, lut_y;
  int          bad_r = -1, bad_c = -1, bad_idx = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slicel_bist dut (.clk, .rst, .start, .running, .done, .but_in, .but_out, .pass, .fail);

  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [63:0] lx;
        lx = lut_x;
        if (r == bad_r && c == bad_c) lx[bad_idx] = ~lx[bad_idx];
        but_out[r][c] = {lut_y[but_in[c][11:6]], lx[but_in[c][5:0]]};
      end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic phase(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
  endtask

  int cyc;

  initial begin
    lut_x = {$urandom, $urandom};
    lut_y = {$urandom, $urandom};
    repeat (2) @(negedge clk); rst = 0;
    phase(cyc);
    check(cyc == 4096, $sformatf("phase length %0d", cyc));
    check(!fail, "fault-free phase passes");
    for (int k = 0; k < 4; k++) begin
      bad_r = $urandom % R; bad_c = $urandom % C; bad_idx = $urandom % 64;
      phase(cyc);
      check(fail, "fault detected");
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          bit exp_fail;
          exp_fail = (r == bad_r) && (c == bad_c || (c + 1) % C == bad_c);
          check(pass[r][c] == !exp_fail, $sformatf("ORA %0d,%0d", r, c));
        end
    end
    bad_r = -1;
    phase(cyc);
    check(!fail, "pass again after fault removed");
    // a faulty pattern generator: TPG 1 output bit 3 stuck at 1
    force dut.tpg_pat[1][3] = 1'b1;
    phase(cyc);
    release dut.tpg_pat[1][3];
    check(fail, "faulty TPG detected");
    phase(cyc);
    check(!fail, "pass after TPG fault removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
