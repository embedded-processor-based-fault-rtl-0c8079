// icap_mux: input multiplexer of the configuration access port.
//
// The ICAP data input takes either a command / header word generated by the
// controller (sel = 0) or a frame word read from the read-modify-write RAM
// (sel = 1), as drawn in the published block diagram. Purely combinational.
module icap_mux #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] cmd_word,
  input  logic [W-1:0] frame_word,
  output logic [W-1:0] icap_i
);

  always_comb icap_i = sel ? frame_word : cmd_word;

endmodule
