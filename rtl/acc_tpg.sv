// acc_tpg: accumulator-based test pattern generator for CLB BIST.
//
// A DSP block configured as an accumulator adds the constant 0xCA6691 every
// clock. Because the constant is odd, the low PAT_W accumulator bits step
// through all 2**PAT_W values in 2**PAT_W clocks (an exhaustive set for the
// 12 inputs of a logic element) and, unlike a binary counter, the most
// significant pattern bits also toggle often. The constant, the 12-bit
// pattern and the 2**12-cycle period are the published ones; taking the
// pattern from the accumulator's low bits and the 24-bit accumulator width
// are this design's choices. en advances the accumulator; clear returns it to
// zero (start of a test phase). pattern is registered: it changes one clock
// after an enabled edge.
module acc_tpg #(
  parameter int unsigned          ACC_W = 24,
  parameter int unsigned          PAT_W = 12,
  parameter logic [ACC_W-1:0]     INC   = ACC_W'(24'hCA6691)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             en,
  output logic [PAT_W-1:0] pattern
);

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst || clear) acc <= '0;
    else if (en)      acc <= acc + INC;
  end

  assign pattern = acc[PAT_W-1:0];

endmodule
