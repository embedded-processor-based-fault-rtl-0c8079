// tb_fltinject_v4: the fault injection core in its Virtex-4 sizing
// (512 x 36 fault list, FL_AW = 9, 46-bit scan register), with two pad
// words around every frame transfer and an ICAP read latency of 5. It runs
// the same checks as tb_fltinject: fault codes, pause, end of list and
// rewind, memory against a reference copy, busy clocks per fault
// (42 + LAT + 2 * (41 + PAD)), the FDRI burst length and ICAP stalls.
module tb_fltinject_v4;
  import fi_pkg::*;

  localparam int unsigned FW      = 41;
  localparam int unsigned NFRAMES = 16;
  localparam int unsigned LAT     = 5;
  localparam int unsigned FL_AW   = 9;
  localparam int unsigned PAD     = 2;
  localparam int unsigned SRW     = 1 + FL_AW + 36;

  logic clk = 0, tck = 0, rst = 1, go = 0;
  logic eof, paused, busy;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  logic bs_sel = 0, bs_capture = 0, bs_shift = 0, bs_update = 0, bs_tdi = 0, bs_tdo;

  int checks = 0, failures = 0;
  logic [31:0] ref_cfg [NFRAMES][FW];

  always #5 clk = ~clk;
  always #7 tck = ~tck;

  fltinject #(.FL_AW(FL_AW), .PAD_WORDS(PAD)) dut (
    .clk, .rst, .go, .eof, .paused, .busy,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy,
    .tck, .bs_sel, .bs_capture, .bs_shift, .bs_update, .bs_tdi, .bs_tdo
  );

  icap_model #(.FRAME_WORDS(FW), .PAD_WORDS(PAD), .NFRAMES(NFRAMES), .LAT(LAT)) u_icap (
    .clk, .ce_n (icap_ce_n), .write_n (icap_write_n), .i (icap_i), .o (icap_o),
    .busy (icap_busy)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One scan of the 47-bit user register: shift in v, return what came out.
  task automatic scan(input logic [SRW-1:0] v, output logic [SRW-1:0] out);
    @(negedge tck); bs_sel = 1; bs_capture = 1;
    @(negedge tck); bs_capture = 0; bs_shift = 1;
    for (int k = 0; k < SRW; k++) begin
      bs_tdi = v[k];
      out[k] = bs_tdo;
      @(negedge tck);
    end
    bs_shift = 0; bs_update = 1;
    @(negedge tck); bs_update = 0; bs_sel = 0;
  endtask

  task automatic bs_write(int unsigned addr, logic [35:0] w);
    logic [SRW-1:0] dummy;
    scan({1'b1, FL_AW'(addr), w}, dummy);
  endtask

  task automatic bs_read(int unsigned addr, output logic [35:0] w);
    logic [SRW-1:0] out;
    scan({1'b0, FL_AW'(addr), 36'h0}, out);
    scan({1'b0, FL_AW'(addr), 36'h0}, out);
    w = out[35:0];
  endtask

  function automatic logic [35:0] mk(logic [1:0] delim, logic [1:0] code,
                                     int unsigned bitidx, int unsigned frame);
    return {delim, code, 11'(bitidx), 21'(frame)};
  endfunction

  // Reference: apply one entry to the reference memory.
  task automatic ref_apply(logic [35:0] e);
    int unsigned f, b;
    f = 32'(e[20:0]);
    b = 32'(e[31:21]);
    case (e[33:32])
      2'b00:   ref_cfg[f][b/32][b%32] = 1'b0;
      2'b01:   ref_cfg[f][b/32][b%32] = 1'b1;
      default: ref_cfg[f][b/32][b%32] = ~ref_cfg[f][b/32][b%32];
    endcase
  endtask

  function automatic int unsigned mem_diffs();
    int unsigned n = 0;
    for (int f = 0; f < NFRAMES; f++)
      for (int w = 0; w < FW; w++)
        if (u_icap.cfg[f][w] != ref_cfg[f][w]) n++;
    return n;
  endfunction

  int unsigned busy_cycles;
  always @(posedge clk) if (busy) busy_cycles++;

  task automatic pulse_go_and_wait(int unsigned max_cycles);
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < max_cycles && busy; k++) @(negedge clk);
  endtask

  logic [35:0] list [8];
  logic [35:0] rd;
  logic        orig_bit;

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int w = 0; w < FW; w++) begin
        u_icap.cfg[f][w] = $urandom;
        ref_cfg[f][w]    = u_icap.cfg[f][w];
      end
    // force known values under the stuck-at entries so each one changes a bit
    u_icap.cfg[3][0][5]  = 1'b1;  ref_cfg[3][0][5]  = 1'b1;   // SA0 target
    u_icap.cfg[7][40][31] = 1'b0; ref_cfg[7][40][31] = 1'b0;  // SA1 target

    list[0] = mk(2'b00, 2'b00, 5,    3);     // continue, SA0, word 0 bit 5
    list[1] = mk(2'b00, 2'b01, 1311, 7);     // continue, SA1, last bit of frame
    list[2] = mk(2'b01, 2'b10, 672,  3);     // pause, flip, word 21 bit 0
    list[3] = mk(2'b01, 2'b11, 100,  12);    // pause, flip
    list[4] = mk(2'b00, 2'b10, 100,  12);    // continue, flip back (SEU removed)
    list[5] = mk(2'b11, 2'b01, 33,   0);     // end of list, SA1

    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge tck);
    for (int k = 0; k < 6; k++) bs_write(k, list[k]);
    for (int k = 0; k < 6; k++) begin
      bs_read(k, rd);
      check(rd == list[k], $sformatf("scan read-back of entry %0d", k));
    end
    check(mem_diffs() == 0, "memory untouched before GO");

    // group 1: entries 0..2
    busy_cycles = 0;
    pulse_go_and_wait(5000);
    for (int k = 0; k < 3; k++) ref_apply(list[k]);
    check(paused && !eof, "paused after first group");
    check(mem_diffs() == 0, "memory after first group");
    check(u_icap.cfg[3][0][5] == 1'b0, "stuck-at-0 bit");
    check(u_icap.cfg[7][40][31] == 1'b1, "stuck-at-1 bit");
    check(busy_cycles == 3 * (42 + LAT + 2 * (FW + PAD)),
          $sformatf("busy cycles for 3 faults: %0d", busy_cycles));
    check(u_icap.max_burst == FW + PAD, $sformatf("FDRI burst length %0d", u_icap.max_burst));
    check(u_icap.frames_read == 3 && u_icap.frames_written == 3, "frames read/written");

    // group 2: entry 3 alone
    orig_bit = u_icap.cfg[12][3][4];
    pulse_go_and_wait(5000);
    ref_apply(list[3]);
    check(paused && !eof, "paused after second group");
    check(mem_diffs() == 0, "memory after bit flip");
    check(u_icap.cfg[12][3][4] != orig_bit, "flipped bit inverted");

    // group 3: entries 4..5 with random ICAP stalls, ends the list
    u_icap.stall_en = 1;
    pulse_go_and_wait(20000);
    ref_apply(list[4]);
    ref_apply(list[5]);
    check(eof && paused, "EOF after last entry");
    check(mem_diffs() == 0, "memory after end of list (with stalls)");
    check(u_icap.stall_cycles > 0, "ICAP stalls happened");
    check(dut.u_ctrl.ptr == 0, "pointer rewound");

    // GO again restarts at entry 0 and clears EOF
    u_icap.stall_en = 0;
    pulse_go_and_wait(20000);
    for (int k = 0; k < 3; k++) ref_apply(list[k]);
    check(paused && !eof, "list restarted from entry 0");
    check(mem_diffs() == 0, "memory after restart");
    check(u_icap.errors == 0, $sformatf("ICAP protocol errors: %0d", u_icap.errors));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
