// tb_fault_campaign: a full fault-injection campaign of 614 stuck-at faults
// on the configuration bits of the SliceL blocks under test, at the default
// sizes, measuring the fault coverage of one BIST phase.
//
// As in tb_fi_bist_top, BUT (r, c) takes its two 64-entry look-up tables
// from words 0-3 of configuration frame 4r + c. The campaign picks 614
// distinct used table bits and, for each, an entry forcing the bit to the
// opposite of its value followed by an entry restoring it, both with the
// "pause" delimiter. That is 1228 entries, more than the 1024-entry list, so
// the list is loaded twice through the boundary-scan register: the first
// load fills all 1024 entries and ends at the last RAM word (no EOF entry;
// the controller raises EOF there itself),
// the second holds the remaining 204 and ends with an EOF entry. After each
// injection one SliceL BIST phase runs. Every fault changes a used bit, so
// every fault must be detected (100 % coverage), every restore must bring
// the memory back, and the list must end at the RAM end and at the EOF.
module tb_fault_campaign;
  import fi_pkg::*;

  localparam int FW = 41, NF = 16, R = 3, C = 4, MR = 2, MC = 4;
  localparam int NFAULTS = 614, DEPTH = 1024;

  logic clk = 0, tck = 0, rst = 1, go = 0;
  logic eof, paused, fi_busy;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  logic bs_sel = 0, bs_capture = 0, bs_shift = 0, bs_update = 0, bs_tdi = 0, bs_tdo;
  logic l_start = 0, l_running, l_done, l_fail;
  logic [11:0] l_but_in [C];
  logic [1:0]  l_but_out [R][C];
  logic        l_pass [R][C];
  logic m_start = 0, m_done, m_fail;
  logic [7:0] m_ram_addr [MR];
  logic       m_ram_we [MR], m_ram_din [MR];
  logic       m_ram_dout [MR][MC];
  logic       m_pass [MR][MC];

  int checks = 0, failures = 0;
  int detected = 0, restored_bad = 0, ended_at_ram_end = 0, ended_at_eof = 0;

  always #5 clk = ~clk;
  always #7 tck = ~tck;

  fi_bist_top dut (.*);

  icap_model #(.FRAME_WORDS(FW), .NFRAMES(NF), .LAT(3)) u_icap (
    .clk, .ce_n (icap_ce_n), .write_n (icap_write_n), .i (icap_i), .o (icap_o),
    .busy (icap_busy));

  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [63:0] tx, ty;
        tx = {u_icap.cfg[r*C+c][1], u_icap.cfg[r*C+c][0]};
        ty = {u_icap.cfg[r*C+c][3], u_icap.cfg[r*C+c][2]};
        l_but_out[r][c] = {ty[l_but_in[c][11:6]], tx[l_but_in[c][5:0]]};
      end
  always_comb
    for (int r = 0; r < MR; r++)
      for (int c = 0; c < MC; c++) m_ram_dout[r][c] = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_write(int unsigned addr, logic [35:0] w);
    logic [46:0] v;
    v = {1'b1, 10'(addr), w};
    @(negedge tck); bs_sel = 1; bs_shift = 1;
    for (int k = 0; k < 47; k++) begin
      bs_tdi = v[k];
      @(negedge tck);
    end
    bs_shift = 0; bs_update = 1;
    @(negedge tck); bs_update = 0; bs_sel = 0;
  endtask

  task automatic inject_group();
    int cyc = 0;
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    repeat (2) @(negedge clk);
    while (fi_busy && cyc < 50000) begin @(negedge clk); cyc++; end
  endtask

  task automatic bist_phase();
    int cyc = 0;
    @(negedge clk); l_start = 1;
    @(negedge clk); l_start = 0;
    while (!l_done && cyc < 10000) begin @(negedge clk); cyc++; end
  endtask

  logic [31:0] golden [NF][FW];
  logic [35:0] entries [$];
  bit          used [R*C][128];

  function automatic logic [35:0] mk(logic [1:0] d, logic [1:0] code, int b, int f);
    return {d, code, 11'(b), 21'(f)};
  endfunction

  initial begin
    logic [31:0] t [4];
    int n_pairs;
    for (int w = 0; w < 4; w++) t[w] = $urandom;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FW; w++) begin
        u_icap.cfg[f][w] = (w < 4) ? t[w] : $urandom;
        golden[f][w]     = u_icap.cfg[f][w];
      end
    // 614 distinct used bits, each forced to its opposite value, then restored
    while (entries.size() < 2 * NFAULTS) begin
      int f, b;
      logic v;
      f = $urandom % (R * C);
      b = $urandom % 128;
      if (!used[f][b]) begin
        used[f][b] = 1;
        v = golden[f][b / 32][b % 32];
        entries.push_back(mk(2'b01, {1'b0, ~v}, b, f));
        entries.push_back(mk(2'b01, {1'b0, v}, b, f));
      end
    end
    entries[2 * NFAULTS - 1][35:34] = 2'b10;     // end of list on the last entry

    repeat (3) @(negedge clk); rst = 0;
    for (int load = 0; load < 2; load++) begin
      int first, n;
      first = load * DEPTH;
      n = (load == 0) ? DEPTH : 2 * NFAULTS - DEPTH;
      for (int k = 0; k < n; k++) scan_write(k, entries[first + k]);
      n_pairs = n / 2;
      for (int p = 0; p < n_pairs; p++) begin
        inject_group();
        bist_phase();
        if (l_fail) detected++;
        inject_group();
        for (int f = 0; f < R * C; f++)
          for (int w = 0; w < 4; w++)
            if (u_icap.cfg[f][w] != golden[f][w]) restored_bad++;
      end
      if (load == 0) begin
        check(eof && paused, "first load: EOF and PAUSED at the RAM end");
        check(dut.u_fi.u_ctrl.ptr == 0, "first load: pointer wrapped at the RAM end");
        if (dut.u_fi.u_ctrl.ptr == 0) ended_at_ram_end++;
      end else begin
        check(eof, "second load: EOF at the last entry");
        if (eof) ended_at_eof++;
      end
    end
    $display("coverage: %0d of %0d faults detected", detected, NFAULTS);
    check(detected == NFAULTS, "100% coverage of changed used bits");
    check(restored_bad == 0, "every fault removed by its restoring entry");
    check(u_icap.errors == 0, "ICAP protocol");
    check(ended_at_ram_end > 0 && ended_at_eof > 0, "both list endings occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
