// slicem_bist: BIST test circuitry for the LUT RAMs (SliceM) of a CLB array.
//
// The RAMs under test are SliceM LUT RAMs of the FPGA fabric, configured
// identically and kept outside this RTL: their address / write-enable /
// data inputs and their read data are ports. NTPG block RAM March Y
// generators (march_tpg) drive alternating rows of RAMs (row r from
// generator r mod NTPG). Comparison is column-based and circular: the
// analyser at (r, c) compares the read data of RAM (r, c) with RAM
// ((r+1) mod ROWS, c) on every read operation of the march. All analysers
// form one iterative-OR chain, column-major; fail is 1 if any mismatch was
// seen, pass[][] gives each analyser's flag. A start pulse begins the single
// multi-phase session and resets the analysers; done follows the last vector.
// The 2 x 4 default array is the published example drawing. Read data are
// taken as combinational from the address (LUT RAM asynchronous read).
module slicem_bist #(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 4,
  parameter int unsigned NTPG = 2,
  parameter int unsigned N_AW = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            done,
  output logic [N_AW-1:0] ram_addr [ROWS],
  output logic            ram_we   [ROWS],
  output logic            ram_din  [ROWS],
  input  logic            ram_dout [ROWS][COLS],
  output logic            pass     [ROWS][COLS],
  output logic            fail
);

  logic [N_AW-1:0] t_addr  [NTPG];
  logic            t_we    [NTPG];
  logic            t_data  [NTPG];
  logic            t_check [NTPG];
  logic            t_done  [NTPG];
  logic            chain   [ROWS*COLS+1];

  for (genvar t = 0; t < NTPG; t++) begin : g_tpg
    march_tpg #(.N_AW(N_AW)) u_tpg (
      .clk, .rst, .start, .valid (), .done (t_done[t]),
      .addr (t_addr[t]), .we (t_we[t]), .data (t_data[t]), .check (t_check[t])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign ram_addr[r] = t_addr[r % NTPG];
    assign ram_we[r]   = t_we[r % NTPG];
    assign ram_din[r]  = t_data[r % NTPG];
  end

  assign chain[0] = 1'b0;
  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_ora
      ora_cell #(.NPAIR(1)) u_ora (
        .clk,
        .init      (rst || start),
        .compare   (t_check[0]),
        .but_j     (ram_dout[r][c]),
        .but_k     (ram_dout[(r + 1) % ROWS][c]),
        .chain_in  (chain[c*ROWS + r]),
        .chain_out (chain[c*ROWS + r + 1]),
        .pass      (pass[r][c])
      );
    end
  end
  assign fail = chain[ROWS*COLS];
  assign done = t_done[0];

endmodule
