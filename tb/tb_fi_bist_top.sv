// tb_fi_bist_top: end-to-end test of the fault injection core together with
// the CLB BIST, at the default sizes.
//
// The configuration memory (ICAP model) holds one frame per SliceL block
// under test; BUT (r, c) uses frame 4r + c, and its two outputs are look-up
// functions whose 64-entry tables are frame words 0-1 (output x, indexed by
// pattern bits 5:0) and 2-3 (output y, pattern bits 11:6). All BUTs start
// identically configured. A fault list, loaded through the boundary-scan
// register, holds for each fault an injecting entry and an entry restoring
// the original bit, each ending a group with "pause". After each GO the test
// runs a SliceL BIST phase and compares the BIST verdict with the expected
// one: a fault is detected exactly when it changed a bit of a used table.
// One group injects several faults at once (continue delimiters), random
// ICAP stalls are on for part of the run, and the list ends with an EOF
// entry. A SliceM BIST session on modelled LUT RAMs runs fault-free and with
// a stuck cell. Each mechanism is counted and must occur at least once.
module tb_fi_bist_top;
  import fi_pkg::*;

  localparam int FW = 41, NF = 16, R = 3, C = 4, MR = 2, MC = 4;

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
  int n_sa0 = 0, n_sa1 = 0, n_flip = 0, n_pause = 0, n_eof = 0, n_multi = 0,
      n_detect = 0, n_undetect = 0, n_bs_read = 0, n_m_detect = 0;

  always #5 clk = ~clk;
  always #7 tck = ~tck;

  fi_bist_top dut (.*);

  icap_model #(.FRAME_WORDS(FW), .NFRAMES(NF), .LAT(3)) u_icap (
    .clk, .ce_n (icap_ce_n), .write_n (icap_write_n), .i (icap_i), .o (icap_o),
    .busy (icap_busy));

  // SliceL blocks under test, configured from the configuration memory.
  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [63:0] tx, ty;
        tx = {u_icap.cfg[r*C+c][1], u_icap.cfg[r*C+c][0]};
        ty = {u_icap.cfg[r*C+c][3], u_icap.cfg[r*C+c][2]};
        l_but_out[r][c] = {ty[l_but_in[c][11:6]], tx[l_but_in[c][5:0]]};
      end

  // SliceM LUT RAMs under test.
  bit mram [MR][MC][256];
  int m_bad_r = -1, m_bad_c = 0, m_bad_a = 0;
  always @(posedge clk)
    for (int r = 0; r < MR; r++)
      for (int c = 0; c < MC; c++)
        if (m_ram_we[r]) mram[r][c][m_ram_addr[r]] <= m_ram_din[r];
  always_comb
    for (int r = 0; r < MR; r++)
      for (int c = 0; c < MC; c++)
        m_ram_dout[r][c] = (r == m_bad_r && c == m_bad_c && m_ram_addr[r] == 8'(m_bad_a))
                           ? 1'b1 : mram[r][c][m_ram_addr[r]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan(input logic [46:0] v, output logic [46:0] out);
    @(negedge tck); bs_sel = 1; bs_capture = 1;
    @(negedge tck); bs_capture = 0; bs_shift = 1;
    for (int k = 0; k < 47; k++) begin
      bs_tdi = v[k]; out[k] = bs_tdo;
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
    check(paused, "PAUSED after group");
  endtask

  task automatic bist_phase();
    int cyc = 0;
    @(negedge clk); l_start = 1;
    @(negedge clk); l_start = 0;
    while (!l_done && cyc < 10000) begin @(negedge clk); cyc++; end
    check(cyc == 4096, "SliceL phase of 4096 clocks");
  endtask

  typedef struct { int f; int b; logic [1:0] code; } flt_t;
  flt_t        faults [$];
  logic [35:0] list [$];
  logic [46:0] o;
  logic [31:0] golden [NF][FW];
  int          grp_first [$], grp_len [$];

  function automatic logic [35:0] mk(logic [1:0] d, logic [1:0] code, int b, int f);
    return {d, code, 11'(b), 21'(f)};
  endfunction

  initial begin
    logic [31:0] t0, t1, t2, t3;
    int idx;
    t0 = $urandom; t1 = $urandom; t2 = $urandom; t3 = $urandom;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FW; w++)
        u_icap.cfg[f][w] = (w == 0) ? t0 : (w == 1) ? t1 : (w == 2) ? t2 : (w == 3) ? t3 : $urandom;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FW; w++) golden[f][w] = u_icap.cfg[f][w];

    // Faults: bits 0..127 are used table bits, 128.. are unused.
    for (int k = 0; k < 24; k++) begin
      flt_t x;
      x.f = $urandom % (R * C);
      x.b = (k % 3 == 2) ? 128 + $urandom % 1184 : $urandom % 128;
      x.code = 2'(k % 3 == 0 ? 2'b10 : k % 3 == 1 ? 2'b00 : 2'(1 + k % 2));
      if (k % 4 == 1) x.code = 2'b01;
      faults.push_back(x);
    end
    // List: per fault an injecting entry and a restoring entry, both pause.
    foreach (faults[k]) begin
      logic orig;
      orig = golden[faults[k].f][faults[k].b / 32][faults[k].b % 32];
      list.push_back(mk(2'b01, faults[k].code, faults[k].b, faults[k].f));
      list.push_back(mk(2'b01, {1'b0, orig}, faults[k].b, faults[k].f));
    end
    // A multiple-fault group: three continue entries and a pause entry,
    // then one group restoring all four bits, ending the list (EOF).
    for (int k = 0; k < 4; k++)
      list.push_back(mk(k == 3 ? 2'b01 : 2'b00, 2'b10, 3 + 17 * k, k));
    for (int k = 0; k < 4; k++)
      list.push_back(mk(k == 3 ? 2'b10 : 2'b00, 2'b10, 3 + 17 * k, k));

    repeat (3) @(negedge clk); rst = 0;
    foreach (list[k]) scan({1'b1, 10'(k), list[k]}, o);
    for (int k = 0; k < 4; k++) begin
      idx = $urandom % list.size();
      scan({1'b0, 10'(idx), 36'h0}, o);
      scan({1'b0, 10'(idx), 36'h0}, o);
      check(o[35:0] == list[idx], "fault list read back through scan");
      n_bs_read++;
    end

    // fault-free BIST first
    bist_phase();
    check(!l_fail, "fault-free SliceL BIST passes");

    foreach (faults[k]) begin
      bit changed, exp_detect;
      logic old;
      u_icap.stall_en = (k >= 12);
      old = u_icap.cfg[faults[k].f][faults[k].b / 32][faults[k].b % 32];
      inject_group();
      n_pause++;
      case (faults[k].code)
        2'b00: n_sa0++;
        2'b01: n_sa1++;
        default: n_flip++;
      endcase
      changed = u_icap.cfg[faults[k].f][faults[k].b / 32][faults[k].b % 32] != old;
      check(changed == (faults[k].code[1] || faults[k].code[0] != old), "bit changed as coded");
      exp_detect = changed && faults[k].b < 128;
      bist_phase();
      check(l_fail == exp_detect, $sformatf("BIST verdict for fault %0d (frame %0d bit %0d)",
                                            k, faults[k].f, faults[k].b));
      if (l_fail) n_detect++; else n_undetect++;
      inject_group();                 // restore
      check(!eof, "no EOF before the end");
      for (int f = 0; f < NF; f++)
        for (int w = 0; w < FW; w++)
          if (u_icap.cfg[f][w] != golden[f][w]) begin
            check(0, $sformatf("frame %0d word %0d restored", f, w));
          end
    end
    // multiple faults in one GO
    inject_group();
    n_multi++;
    bist_phase();
    check(l_fail, "multiple faults detected");
    inject_group();
    check(eof, "EOF at end of list");
    if (eof) n_eof++;
    bist_phase();
    check(!l_fail, "BIST passes after the last faults are removed");
    check(u_icap.errors == 0, "ICAP protocol");

    // SliceM BIST
    @(negedge clk); m_start = 1; @(negedge clk); m_start = 0;
    while (!m_done) @(negedge clk);
    check(!m_fail, "fault-free SliceM BIST passes");
    m_bad_r = 1; m_bad_c = 2; m_bad_a = 99;
    @(negedge clk); m_start = 1; @(negedge clk); m_start = 0;
    while (!m_done) @(negedge clk);
    check(m_fail && !m_pass[1][2] && m_pass[1][1], "SliceM stuck cell detected");
    if (m_fail) n_m_detect++;

    $display("mechanisms: sa0=%0d sa1=%0d flip=%0d pause=%0d multi=%0d eof=%0d stalls=%0d",
             n_sa0, n_sa1, n_flip, n_pause, n_multi, n_eof, u_icap.stall_cycles);
    $display("            scan_reads=%0d detected=%0d undetected=%0d slicem_detect=%0d",
             n_bs_read, n_detect, n_undetect, n_m_detect);
    check(n_sa0 > 0 && n_sa1 > 0 && n_flip > 0, "all fault codes used");
    check(n_pause > 0 && n_multi > 0 && n_eof > 0, "pause, continue and EOF used");
    check(u_icap.stall_cycles > 0, "ICAP stalls occurred");
    check(n_bs_read > 0, "scan read-back used");
    check(n_detect > 0 && n_undetect > 0, "both detected and undetected faults");
    check(n_m_detect > 0, "SliceM detection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
