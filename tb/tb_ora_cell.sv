// tb_ora_cell: checks a chain of four analysers against a reference model:
// after init every pass flag is 1, the first mismatch while compare is high
// latches 0 until the next init, mismatches with compare low are ignored,
// and the chain end is the OR of every cell's failure.
module tb_ora_cell;
  localparam int N = 4;
  logic clk = 0, init = 1, compare = 0;
  logic [1:0] bj [N], bk [N];
  logic chain [N+1];
  logic pass [N];
  bit   ref_pass [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign chain[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g
    ora_cell u (.clk, .init, .compare, .but_j (bj[i]), .but_k (bk[i]),
                .chain_in (chain[i]), .chain_out (chain[i+1]), .pass (pass[i]));
  end

  initial begin
    for (int i = 0; i < N; i++) begin bj[i] = 0; bk[i] = 0; end
    for (int round = 0; round < 20; round++) begin
      init = 1; @(negedge clk); init = 0;
      for (int i = 0; i < N; i++) ref_pass[i] = 1;
      for (int t = 0; t < 30; t++) begin
        bit any_fail;
        compare = ($urandom % 4) != 0;
        for (int i = 0; i < N; i++) begin
          bj[i] = 2'($urandom);
          bk[i] = (($urandom % 16) == 0) ? 2'($urandom) : bj[i];
        end
        @(negedge clk);
        any_fail = 0;
        for (int i = 0; i < N; i++) begin
          if (compare && bj[i] != bk[i]) ref_pass[i] = 0;
          checks++;
          if (pass[i] != ref_pass[i]) begin failures++; $display("FAIL: pass %0d", i); end
          any_fail |= !ref_pass[i];
        end
        checks++;
        if (chain[N] != any_fail) begin failures++; $display("FAIL: chain"); end
      end
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
