// fault_list_bram: the fault list memory of the fault injection core.
//
// A true dual-port block RAM of 2**AW words of W bits (defaults: 1024 x 36,
// one 36 Kb Virtex-5 block RAM; a Virtex-4 build uses AW = 9, 512 x 36 in an
// 18 Kb RAM). Port A is read by the controller with a 10-bit address; port B
// belongs to the optional boundary-scan interface, which can write new entries
// and read them back while the system runs. Both ports read synchronously: the
// word addressed in one cycle appears on the data output in the next one.
// Port B may run on its own clock (the scan clock).
//
// The list can also be preloaded at configuration time; here that is the
// INIT_FILE parameter (a $readmemh image), empty by default meaning the RAM
// starts cleared. Size and port roles follow the published block diagram;
// the port B write-first/read behaviour is this design's choice.
module fault_list_bram #(
  parameter int unsigned AW        = 10,
  parameter int unsigned W         = 36,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk_a,
  input  logic [AW-1:0] addr_a,
  output logic [W-1:0]  dout_a,

  input  logic          clk_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  din_b,
  output logic [W-1:0]  dout_b
);

  logic [W-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk_a) dout_a <= mem[addr_a];

  always_ff @(posedge clk_b) begin
    if (we_b) mem[addr_b] <= din_b;
    dout_b <= mem[addr_b];
  end

endmodule
