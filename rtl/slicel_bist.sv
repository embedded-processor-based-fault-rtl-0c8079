// slicel_bist: BIST test circuitry for the logic blocks (SliceL) of a CLB array.
//
// The blocks under test (BUTs) are CLBs of the FPGA itself, configured
// identically, and lie outside this RTL: their pattern inputs and their
// outputs are ports. NTPG identical accumulator TPGs drive alternating
// columns of BUTs (column c from TPG c mod NTPG), so neighbouring BUTs get
// their patterns from different generators and a faulty generator shows up
// as a mismatch too. Each row is compared circularly: the analyser at
// (r, c) compares BUT (r, c) with BUT (r, (c+1) mod COLS). All analysers
// form one iterative-OR chain in row-major order; its end, fail, is 1 if any
// analyser saw a mismatch, and pass[] gives each analyser's own flag.
//
// A test phase starts with a one-cycle start pulse, which clears the TPGs and
// sets every pass flag to 1. The phase then applies 2**PAT_W patterns, one
// per clock, comparing the BUT outputs in the same cycle (the BUT outputs
// are taken as combinational functions of their pattern), and raises done.
// The 3 x 4 default array is the published example drawing; arrangement, TPG
// sharing and comparison follow the published description, phase sequencing
// is this design's choice.
module slicel_bist #(
  parameter int unsigned ROWS  = 3,
  parameter int unsigned COLS  = 4,
  parameter int unsigned NTPG  = 2,
  parameter int unsigned PAT_W = 12,
  parameter int unsigned NPAIR = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  output logic                  running,
  output logic                  done,
  output logic [PAT_W-1:0]      but_in  [COLS],
  input  logic [NPAIR-1:0]      but_out [ROWS][COLS],
  output logic                  pass    [ROWS][COLS],
  output logic                  fail
);

  logic [PAT_W-1:0] tpg_pat [NTPG];
  logic [PAT_W-1:0] cnt;
  logic             chain [ROWS*COLS+1];

  for (genvar t = 0; t < NTPG; t++) begin : g_tpg
    acc_tpg #(.ACC_W(24), .PAT_W(PAT_W)) u_tpg (
      .clk, .rst, .clear (start), .en (running), .pattern (tpg_pat[t])
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    assign but_in[c] = tpg_pat[c % NTPG];
  end

  assign chain[0] = 1'b0;
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_ora
      ora_cell #(.NPAIR(NPAIR)) u_ora (
        .clk,
        .init      (rst || start),
        .compare   (running),
        .but_j     (but_out[r][c]),
        .but_k     (but_out[r][(c + 1) % COLS]),
        .chain_in  (chain[r*COLS + c]),
        .chain_out (chain[r*COLS + c + 1]),
        .pass      (pass[r][c])
      );
    end
  end
  assign fail = chain[ROWS*COLS];

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
      cnt     <= '0;
    end else if (running) begin
      cnt <= cnt + PAT_W'(1);
      if (cnt == '1) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

endmodule
