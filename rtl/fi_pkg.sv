// fi_pkg: types and constants shared by the embedded fault injection core.
//
// A fault-list entry is one 36-bit block RAM word. Its four parity bits carry
// control: bits 35:34 are the delimiter (00 continue with the next fault,
// 01 pause after this fault, 1x end of list) and bits 33:32 the fault code
// (00 stuck-at-0, 01 stuck-at-1, 1x bit flip / SEU). Bits 31:21 give the bit
// index inside the 41-word (1312-bit) configuration frame and bits 20:0 the
// frame address. These encodings follow the published word layout.
//
// The ICAP packet constants are the standard Virtex-5 configuration packet
// headers (type-1 / type-2 packets, CMD, FAR, FDRI and FDRO registers). The
// exact command sequence sent through them is this design's own choice.
package fi_pkg;

  localparam int unsigned FAULT_W  = 36;  // fault-list word width
  localparam int unsigned FAR_W    = 21;  // frame address field
  localparam int unsigned BITIDX_W = 11;  // bit index field

  typedef enum logic [1:0] {
    DELIM_CONTINUE = 2'b00,
    DELIM_PAUSE    = 2'b01,
    DELIM_EOF      = 2'b10,   // 2'b11 is also end of list
    DELIM_EOF_ALT  = 2'b11
  } delim_e;

  typedef enum logic [1:0] {
    FLT_SA0      = 2'b00,
    FLT_SA1      = 2'b01,
    FLT_FLIP     = 2'b10,     // 2'b11 is also a bit flip
    FLT_FLIP_ALT = 2'b11
  } fault_code_e;

  typedef struct packed {
    delim_e                delim;     // [35:34]
    fault_code_e           code;      // [33:32]
    logic [BITIDX_W-1:0]   bit_idx;   // [31:21]
    logic [FAR_W-1:0]      frame;     // [20:0]
  } fault_entry_t;

  // Configuration packet words (Virtex-5 encoding).
  localparam logic [31:0] ICAP_DUMMY   = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC    = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP    = 32'h2000_0000;
  localparam logic [31:0] HDR_WR_CMD   = 32'h3000_8001;  // type 1, write CMD, 1 word
  localparam logic [31:0] HDR_WR_FAR   = 32'h3000_2001;  // type 1, write FAR, 1 word
  localparam logic [31:0] HDR_WR_FDRI  = 32'h3000_4000;  // type 1, write FDRI, 0 words
  localparam logic [31:0] HDR_RD_FDRO  = 32'h2800_6000;  // type 1, read FDRO, 0 words
  localparam logic [31:0] HDR_T2_WR    = 32'h5000_0000;  // type 2 write, OR word count
  localparam logic [31:0] HDR_T2_RD    = 32'h4800_0000;  // type 2 read, OR word count
  localparam logic [31:0] CMD_WCFG     = 32'h0000_0001;
  localparam logic [31:0] CMD_RCFG     = 32'h0000_0004;
  localparam logic [31:0] CMD_DESYNC   = 32'h0000_000D;

  // Micro-ROM entry kinds of the controller.
  typedef enum logic [2:0] {
    OP_LIT,     // write a literal word to ICAP
    OP_FAR,     // write the frame address of the current fault
    OP_T2RD,    // write type-2 read header with the frame length
    OP_T2WR,    // write type-2 write header with the frame length
    OP_RDATA,   // read the frame from ICAP into the RMW RAM
    OP_WDATA,   // write the frame from the RMW RAM to ICAP
    OP_END      // end of sequence
  } rom_op_e;

  typedef struct packed {
    rom_op_e     op;
    logic [31:0] word;
  } rom_entry_t;

  function automatic logic is_eof(delim_e d);
    return d[1];
  endfunction

  function automatic logic is_pause(delim_e d);
    return (d == DELIM_PAUSE);
  endfunction

  // Apply a fault code to one configuration bit.
  function automatic logic apply_fault(fault_code_e c, logic b);
    case (c)
      FLT_SA0: return 1'b0;
      FLT_SA1: return 1'b1;
      default: return ~b;
    endcase
  endfunction

endpackage
