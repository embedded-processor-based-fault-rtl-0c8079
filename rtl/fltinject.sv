// fltinject: embedded fault and SEU injection core for Virtex-4/Virtex-5.
//
// The core emulates faults in an FPGA's configuration memory from inside the
// device. A fault list in block RAM names, per entry, a frame address, a bit
// within the frame and a fault type (stuck-at-0, stuck-at-1, bit flip). When
// GO is pulsed, the controller injects faults one after another: each frame is
// read back through the internal configuration access port (ICAP) into a
// second block RAM, the bit is changed there, and the frame is written back.
// Entries are grouped by their delimiter: a group ends at a "pause" entry,
// which raises PAUSED, or at the "end of list" entry, which raises EOF (and
// PAUSED) and rewinds the list. An optional boundary-scan register loads or
// reads the list while the system runs.
//
// The external interface is the published one (GO, CLK, EOF, PAUSED) plus the
// ports of the two vendor primitives the core sits beside, which are outside
// this RTL: the ICAP (ce_n, write_n, 32-bit in/out, busy) and the
// boundary-scan primitive (tck, sel, capture, shift, update, tdi, tdo). A
// synchronous active-high reset replaces the device's global set/reset.
// The published DEVICE generic chose between the Virtex-4 and Virtex-5
// models; here the sizes it implies are parameters (FL_AW = 10 for a 1024 x
// 36 Virtex-5 list, 9 for the 512 x 36 Virtex-4 list).
module fltinject
  import fi_pkg::*;
#(
  parameter int unsigned FL_AW       = 10,
  parameter int unsigned FR_AW       = 15,
  parameter int unsigned FRAME_WORDS = 41,
  parameter int unsigned PAD_WORDS   = 0,
  parameter string       INIT_FILE   = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        go,
  output logic        eof,
  output logic        paused,
  output logic        busy,
  // ICAP primitive
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic        icap_busy,
  // boundary-scan primitive
  input  logic        tck,
  input  logic        bs_sel,
  input  logic        bs_capture,
  input  logic        bs_shift,
  input  logic        bs_update,
  input  logic        bs_tdi,
  output logic        bs_tdo
);

  logic [FL_AW-1:0]   fl_addr_a, fl_addr_b;
  logic [FAULT_W-1:0] fl_dout_a, fl_dout_b, fl_din_b;
  logic               fl_we_b;
  logic               fr_we;
  logic [FR_AW-1:0]   fr_addr;
  logic [31:0]        fr_din, fr_dout, icap_cmd;
  logic               icap_sel;

  fault_list_bram #(.AW(FL_AW), .W(FAULT_W), .INIT_FILE(INIT_FILE)) u_fault_list (
    .clk_a (clk), .addr_a (fl_addr_a), .dout_a (fl_dout_a),
    .clk_b (tck), .we_b (fl_we_b), .addr_b (fl_addr_b), .din_b (fl_din_b),
    .dout_b(fl_dout_b)
  );

  frame_rmw_bram #(.AW(FR_AW), .W(32)) u_frame_ram (
    .clk (clk), .we (fr_we), .addr (fr_addr), .din (fr_din), .dout (fr_dout)
  );

  fi_controller #(
    .FL_AW(FL_AW), .FR_AW(FR_AW), .FRAME_WORDS(FRAME_WORDS), .PAD_WORDS(PAD_WORDS)
  ) u_ctrl (
    .clk, .rst, .go, .eof, .paused, .busy,
    .fl_addr (fl_addr_a), .fl_dout (fl_dout_a),
    .fr_we, .fr_addr, .fr_din, .fr_dout,
    .icap_ce_n, .icap_write_n, .icap_sel, .icap_cmd,
    .icap_o, .icap_busy
  );

  icap_mux #(.W(32)) u_icap_mux (
    .sel (icap_sel), .cmd_word (icap_cmd), .frame_word (fr_dout), .icap_i (icap_i)
  );

  bscan_if #(.AW(FL_AW), .W(FAULT_W)) u_bscan (
    .tck, .rst, .sel (bs_sel), .capture (bs_capture), .shift (bs_shift),
    .update (bs_update), .tdi (bs_tdi), .tdo (bs_tdo),
    .ram_we (fl_we_b), .ram_addr (fl_addr_b), .ram_din (fl_din_b), .ram_dout (fl_dout_b)
  );

endmodule
