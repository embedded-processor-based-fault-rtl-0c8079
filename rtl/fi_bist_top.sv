// fi_bist_top: embedded fault injection core together with CLB BIST circuitry.
//
// The fault injection core is built into the same FPGA as the BIST circuitry
// whose fault coverage it verifies: the BIST (test pattern generators and
// output response analysers, SliceL and SliceM) tests the CLBs configured as
// blocks under test, while the core flips or forces configuration bits of
// those CLBs through the ICAP. The two share only the clock and reset; the
// link between them is the configuration memory, which is outside this RTL
// (as are the ICAP and boundary-scan primitives and the CLBs under test),
// so the ports of those parts are brought out here.
module fi_bist_top
  import fi_pkg::*;
#(
  parameter int unsigned FL_AW   = 10,
  parameter int unsigned L_ROWS  = 3,
  parameter int unsigned L_COLS  = 4,
  parameter int unsigned M_ROWS  = 2,
  parameter int unsigned M_COLS  = 4,
  parameter int unsigned PAT_W   = 12,
  parameter int unsigned M_AW    = 8
) (
  input  logic        clk,
  input  logic        rst,
  // fault injection control
  input  logic        go,
  output logic        eof,
  output logic        paused,
  output logic        fi_busy,
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
  output logic        bs_tdo,
  // SliceL BIST and its blocks under test
  input  logic             l_start,
  output logic             l_running,
  output logic             l_done,
  output logic [PAT_W-1:0] l_but_in  [L_COLS],
  input  logic [1:0]       l_but_out [L_ROWS][L_COLS],
  output logic             l_pass    [L_ROWS][L_COLS],
  output logic             l_fail,
  // SliceM BIST and its RAMs under test
  input  logic             m_start,
  output logic             m_done,
  output logic [M_AW-1:0]  m_ram_addr [M_ROWS],
  output logic             m_ram_we   [M_ROWS],
  output logic             m_ram_din  [M_ROWS],
  input  logic             m_ram_dout [M_ROWS][M_COLS],
  output logic             m_pass     [M_ROWS][M_COLS],
  output logic             m_fail
);

  fltinject #(.FL_AW(FL_AW)) u_fi (
    .clk, .rst, .go, .eof, .paused, .busy (fi_busy),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy,
    .tck, .bs_sel, .bs_capture, .bs_shift, .bs_update, .bs_tdi, .bs_tdo
  );

  slicel_bist #(.ROWS(L_ROWS), .COLS(L_COLS), .PAT_W(PAT_W)) u_slicel (
    .clk, .rst, .start (l_start), .running (l_running), .done (l_done),
    .but_in (l_but_in), .but_out (l_but_out), .pass (l_pass), .fail (l_fail)
  );

  slicem_bist #(.ROWS(M_ROWS), .COLS(M_COLS), .N_AW(M_AW)) u_slicem (
    .clk, .rst, .start (m_start), .done (m_done),
    .ram_addr (m_ram_addr), .ram_we (m_ram_we), .ram_din (m_ram_din),
    .ram_dout (m_ram_dout), .pass (m_pass), .fail (m_fail)
  );

endmodule
