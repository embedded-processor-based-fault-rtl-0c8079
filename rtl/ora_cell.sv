// ora_cell: comparison-based output response analyser with iterative-OR chain.
//
// Each analyser compares NPAIR output pairs of two identically configured
// blocks under test. Its pass flag starts at 1 (on init) and any mismatch
// between a pair, while compare is enabled, latches it to 0 for the rest of
// the test. The cells of a row or column form an iterative-OR chain: a cell
// passes a failure indication on if it has failed itself or one came in from
// the previous cell, so one bit at the end of the chain tells whether any
// analyser saw a mismatch. The individual pass flags are also visible, as
// they are when the configuration memory is read back for diagnosis.
// Pass flag, init value and OR chain follow the published description;
// NPAIR = 2 (outputs x and y) follows the published analyser drawing.
// Timing: pass drops one clock after the mismatching cycle; chain_out is
// combinational from chain_in.
module ora_cell #(
  parameter int unsigned NPAIR = 2
) (
  input  logic             clk,
  input  logic             init,
  input  logic             compare,
  input  logic [NPAIR-1:0] but_j,
  input  logic [NPAIR-1:0] but_k,
  input  logic             chain_in,
  output logic             chain_out,
  output logic             pass
);

  always_ff @(posedge clk) begin
    if (init)                          pass <= 1'b1;
    else if (compare && (but_j != but_k)) pass <= 1'b0;
  end

  assign chain_out = chain_in | ~pass;

endmodule
