// tb_march_tpg: checks the March Y vector stream for a 256 x 1 RAM. The
// expected sequence is built independently from the four march elements;
// the generator must produce exactly 8N = 2048 vectors, one per clock, in
// that order. The vectors are then applied to a modelled RAM: a good RAM
// must return every expected value, a RAM with one stuck-at cell must not.
module tb_march_tpg;
  localparam int N = 256;
  logic clk = 0, rst = 1, start = 0, valid, done, we, data, check_o;
  logic [7:0] addr;
  int checks = 0, failures = 0;

  typedef struct { int a; bit w; bit d; } op_t;
  op_t exp_ops [$];

  always #5 clk = ~clk;

  march_tpg dut (.clk, .rst, .start, .valid, .done, .addr, .we, .data, .check (check_o));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run the stream into a RAM model; returns read mismatches.
  task automatic run(input int stuck_addr, input bit stuck_val,
                     output int n_vec, output int mism, output int order_err);
    bit ram [N];
    int cyc;
    for (int i = 0; i < N; i++) ram[i] = 1'($urandom);
    n_vec = 0; mism = 0; order_err = 0; cyc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && cyc < 5000) begin
      if (valid) begin
        if (n_vec < exp_ops.size()) begin
          if (addr != 8'(exp_ops[n_vec].a) || we != exp_ops[n_vec].w ||
              data != exp_ops[n_vec].d || check_o != !exp_ops[n_vec].w)
            order_err++;
        end
        if (we) ram[addr] = data;
        if (stuck_addr >= 0) ram[stuck_addr] = stuck_val;
        if (check_o && ram[addr] != data) mism++;
        n_vec++;
      end
      @(negedge clk); cyc++;
    end
  endtask

  int nv, mm, oe;

  initial begin
    for (int a = 0; a < N; a++) exp_ops.push_back('{a, 1, 0});
    for (int a = 0; a < N; a++) begin
      exp_ops.push_back('{a, 0, 0}); exp_ops.push_back('{a, 1, 1}); exp_ops.push_back('{a, 0, 1});
    end
    for (int a = N - 1; a >= 0; a--) begin
      exp_ops.push_back('{a, 0, 1}); exp_ops.push_back('{a, 1, 0}); exp_ops.push_back('{a, 0, 0});
    end
    for (int a = 0; a < N; a++) exp_ops.push_back('{a, 0, 0});

    repeat (2) @(negedge clk); rst = 0;
    run(-1, 0, nv, mm, oe);
    check(nv == 8 * N, $sformatf("vector count %0d", nv));
    check(oe == 0, $sformatf("vectors out of order: %0d", oe));
    check(mm == 0, "good RAM passes");
    run(77, 1, nv, mm, oe);
    check(mm > 0, "stuck-at-1 cell detected");
    run(200, 0, nv, mm, oe);
    check(mm > 0, "stuck-at-0 cell detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
