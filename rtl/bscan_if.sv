// bscan_if: boundary-scan user register for loading the fault list in system.
//
// The fault list can be written and read back through a user-defined
// boundary-scan data register while the FPGA runs. This module is that
// register, placed behind the device's boundary-scan primitive (whose
// SEL / CAPTURE / SHIFT / UPDATE / TDI / TDO signals it takes) and in front
// of port B of the fault-list RAM. All of it runs on the scan clock tck.
//
// The register is 1 + AW + W bits, shifted in LSB first from tdi, with tdo
// the current LSB:
//   [W-1:0]        fault-list word (data to write / data read back)
//   [W+AW-1:W]     fault-list address
//   [W+AW]         write flag
// UPDATE (with SEL) latches the address and, when the write flag is set,
// writes the data word into the RAM. CAPTURE (with SEL) loads the word the
// RAM holds at the last updated address into the data field, so a read is
// one scan with the address and write flag 0 followed by a second scan that
// shifts the word out. The register layout and this protocol are this
// design's own; only the purpose of the interface is given.
module bscan_if #(
  parameter int unsigned AW = 10,
  parameter int unsigned W  = 36
) (
  input  logic          tck,
  input  logic          rst,
  input  logic          sel,
  input  logic          capture,
  input  logic          shift,
  input  logic          update,
  input  logic          tdi,
  output logic          tdo,
  // fault list RAM port B
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [W-1:0]  ram_din,
  input  logic [W-1:0]  ram_dout
);

  localparam int unsigned SR_W = 1 + AW + W;

  logic [SR_W-1:0] sr;
  logic [AW-1:0]   addr_q;

  assign tdo      = sr[0];
  assign ram_addr = (sel && update) ? sr[W +: AW] : addr_q;
  assign ram_din  = sr[W-1:0];
  assign ram_we   = sel && update && sr[SR_W-1];

  always_ff @(posedge tck) begin
    if (rst) begin
      sr     <= '0;
      addr_q <= '0;
    end else if (sel) begin
      if (capture)     sr[W-1:0] <= ram_dout;
      else if (shift)  sr        <= {tdi, sr[SR_W-1:1]};
      else if (update) addr_q    <= sr[W +: AW];
    end
  end

endmodule
