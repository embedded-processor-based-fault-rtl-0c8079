// frame_rmw_bram: buffer for one configuration frame during read-modify-write.
//
// A single-port synchronous block RAM of 32-bit words. Its address is the
// 15-bit block RAM address of the published diagram, in which, as in a
// 36 Kb block RAM used 32 bits wide, bits 14:5 select the 32-bit word and
// bits 4:0 are not used by the data port (the controller puts the bit number
// there). So 1024 words are addressable, of which a 41-word frame uses the
// first 41. A write stores din at the addressed word; every cycle the
// addressed word is read and appears on dout one cycle later (read-first).
module frame_rmw_bram #(
  parameter int unsigned AW = 15,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  localparam int unsigned WORD_AW = AW - 5;

  logic [W-1:0]       mem [2**WORD_AW];
  logic [WORD_AW-1:0] waddr;

  assign waddr = addr[AW-1:5];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    dout <= mem[waddr];
  end

endmodule
