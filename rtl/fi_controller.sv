// fi_controller: the "ROM & FSM" of the embedded fault injection core.
//
// On a GO pulse the controller works through the fault list, one entry per
// pass, following the published flowchart: read the entry, read the frame it
// names out of configuration memory through the ICAP, modify the addressed
// bit in the frame RAM (stuck-at-0, stuck-at-1 or bit flip), write the frame
// back, and then look at the entry's delimiter. "Continue" moves to the next
// entry at once, so several faults can be injected by one GO; "pause" stops
// with PAUSED set and the pointer on the next entry; "end of list" sets EOF
// and PAUSED and returns the pointer to the first entry. An entry in the last
// RAM word ends the list even without an EOF delimiter.
//
// The ICAP command traffic comes from a small micro-ROM (function rom_word):
// a readback sequence (sync, RCFG, FAR, FDRO read of the frame, desync) and a
// write sequence (sync, WCFG, FAR, FDRI write of the frame, desync). Literal
// words come from the ROM, the frame address and packet lengths are filled
// in from the current fault. Readback stalls while the ICAP holds BUSY high;
// PAD_WORDS leading readback words are dropped and the same number of zero
// words follow the frame on a write (0 by default). The packet words are
// the Virtex-5 ones; the sequence, the ROM layout, the pointer advance on a
// pause and PAUSED also marking the end of the list are this design's choices.
//
// Interface timing: every ICAP output is registered. A write-mode word is
// transferred in each cycle with icap_ce_n = 0 and icap_write_n = 0, a
// readback word in each cycle with icap_ce_n = 0, icap_write_n = 1 and
// icap_busy = 0. Both RAMs read synchronously (data one cycle after address).
// Frame RAM address bits 14:11 stay 0: a 41-word frame needs word addresses
// up to 40 only, and the bit index is 11 bits wide.
module fi_controller
  import fi_pkg::*;
#(
  parameter int unsigned FL_AW       = 10,  // fault list address width
  parameter int unsigned FR_AW       = 15,  // frame RAM address width
  parameter int unsigned FRAME_WORDS = 41,  // words per configuration frame
  parameter int unsigned PAD_WORDS   = 0    // readback/write pad words
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                go,
  output logic                eof,
  output logic                paused,
  output logic                busy,
  // fault list RAM, port A
  output logic [FL_AW-1:0]    fl_addr,
  input  logic [FAULT_W-1:0]  fl_dout,
  // frame read-modify-write RAM
  output logic                fr_we,
  output logic [FR_AW-1:0]    fr_addr,
  output logic [31:0]         fr_din,
  input  logic [31:0]         fr_dout,
  // ICAP
  output logic                icap_ce_n,
  output logic                icap_write_n,
  output logic                icap_sel,     // 1: frame RAM data to ICAP
  output logic [31:0]         icap_cmd,
  input  logic [31:0]         icap_o,
  input  logic                icap_busy
);

  localparam int unsigned TOTAL   = FRAME_WORDS + PAD_WORDS;
  localparam int unsigned CNT_W   = $clog2(TOTAL + 1);
  localparam logic [4:0]  WR_SEQ  = 5'd17;   // start of the write sequence

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_LATCH, S_SEQ, S_RD_TURN, S_RD_START, S_RDATA,
    S_WR_TURN, S_WDATA, S_MOD_RD, S_MOD_WR, S_CHECK
  } state_e;

  state_e        state;
  fault_entry_t  entry;
  logic [FL_AW-1:0] ptr;
  logic [4:0]    rom_idx;
  logic          phase_wr;
  logic [CNT_W-1:0] cnt;
  logic          go_q;
  rom_entry_t    rom;
  logic [CNT_W-1:0] rd_word;

  assign rd_word = cnt - CNT_W'(PAD_WORDS);

  // Readback words at or past the leading pad words are stored.
  logic rd_keep;
  if (PAD_WORDS == 0) begin : g_nopad
    assign rd_keep = 1'b1;
  end else begin : g_pad
    assign rd_keep = (cnt >= CNT_W'(PAD_WORDS));
  end

  // Micro-ROM holding the two ICAP command sequences.
  function automatic rom_entry_t rom_word(logic [4:0] idx);
    case (idx)
      // frame readback
      5'd0:  return '{OP_LIT,   ICAP_DUMMY};
      5'd1:  return '{OP_LIT,   ICAP_SYNC};
      5'd2:  return '{OP_LIT,   ICAP_NOOP};
      5'd3:  return '{OP_LIT,   HDR_WR_CMD};
      5'd4:  return '{OP_LIT,   CMD_RCFG};
      5'd5:  return '{OP_LIT,   ICAP_NOOP};
      5'd6:  return '{OP_LIT,   HDR_WR_FAR};
      5'd7:  return '{OP_FAR,   32'h0};
      5'd8:  return '{OP_LIT,   HDR_RD_FDRO};
      5'd9:  return '{OP_T2RD,  32'h0};
      5'd10: return '{OP_LIT,   ICAP_NOOP};
      5'd11: return '{OP_LIT,   ICAP_NOOP};
      5'd12: return '{OP_RDATA, 32'h0};
      5'd13: return '{OP_LIT,   HDR_WR_CMD};
      5'd14: return '{OP_LIT,   CMD_DESYNC};
      5'd15: return '{OP_LIT,   ICAP_NOOP};
      5'd16: return '{OP_END,   32'h0};
      // frame write
      5'd17: return '{OP_LIT,   ICAP_DUMMY};
      5'd18: return '{OP_LIT,   ICAP_SYNC};
      5'd19: return '{OP_LIT,   ICAP_NOOP};
      5'd20: return '{OP_LIT,   HDR_WR_CMD};
      5'd21: return '{OP_LIT,   CMD_WCFG};
      5'd22: return '{OP_LIT,   ICAP_NOOP};
      5'd23: return '{OP_LIT,   HDR_WR_FAR};
      5'd24: return '{OP_FAR,   32'h0};
      5'd25: return '{OP_LIT,   HDR_WR_FDRI};
      5'd26: return '{OP_T2WR,  32'h0};
      5'd27: return '{OP_WDATA, 32'h0};
      5'd28: return '{OP_LIT,   HDR_WR_CMD};
      5'd29: return '{OP_LIT,   CMD_DESYNC};
      5'd30: return '{OP_LIT,   ICAP_NOOP};
      default: return '{OP_END, 32'h0};
    endcase
  endfunction

  always_comb rom = rom_word(rom_idx);

  assign fl_addr = ptr;
  assign busy    = (state != S_IDLE);

  // Frame RAM address, write enable and write data.
  always_comb begin
    fr_we   = 1'b0;
    fr_din  = icap_o;
    fr_addr = '0;
    case (state)
      S_RDATA: begin
        fr_addr = {(FR_AW-5)'(rd_word), 5'b0};
        fr_we   = !icap_busy && rd_keep;
      end
      S_WDATA:  fr_addr = {(FR_AW-5)'(cnt), 5'b0};
      S_MOD_RD: fr_addr = FR_AW'(entry.bit_idx);
      S_MOD_WR: begin
        fr_addr = FR_AW'(entry.bit_idx);
        fr_we   = 1'b1;
        fr_din  = fr_dout;
        fr_din[entry.bit_idx[4:0]] = apply_fault(entry.code, fr_dout[entry.bit_idx[4:0]]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      entry        <= '0;
      ptr          <= '0;
      rom_idx      <= '0;
      phase_wr     <= 1'b0;
      cnt          <= '0;
      go_q         <= 1'b0;
      eof          <= 1'b0;
      paused       <= 1'b0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b0;
      icap_sel     <= 1'b0;
      icap_cmd     <= '0;
    end else begin
      go_q <= go;
      case (state)
        S_IDLE: begin
          icap_ce_n <= 1'b1;
          if (go && !go_q) begin
            eof    <= 1'b0;
            paused <= 1'b0;
            state  <= S_FETCH;
          end
        end
        S_FETCH: state <= S_LATCH;
        S_LATCH: begin
          entry    <= fault_entry_t'(fl_dout);
          rom_idx  <= '0;
          phase_wr <= 1'b0;
          state    <= S_SEQ;
        end
        S_SEQ: begin
          icap_write_n <= 1'b0;
          icap_sel     <= 1'b0;
          case (rom.op)
            OP_LIT: begin
              icap_ce_n <= 1'b0;
              icap_cmd  <= rom.word;
              rom_idx   <= rom_idx + 5'd1;
            end
            OP_FAR: begin
              icap_ce_n <= 1'b0;
              icap_cmd  <= 32'(entry.frame);
              rom_idx   <= rom_idx + 5'd1;
            end
            OP_T2RD, OP_T2WR: begin
              icap_ce_n <= 1'b0;
              icap_cmd  <= ((rom.op == OP_T2RD) ? HDR_T2_RD : HDR_T2_WR) | 32'(TOTAL);
              rom_idx   <= rom_idx + 5'd1;
            end
            OP_RDATA: begin
              icap_ce_n <= 1'b1;
              cnt       <= '0;
              state     <= S_RD_TURN;
            end
            OP_WDATA: begin
              icap_ce_n <= 1'b1;
              cnt       <= '0;
              state     <= S_WDATA;
            end
            default: begin  // OP_END
              icap_ce_n <= 1'b1;
              if (phase_wr) begin
                state <= S_CHECK;
              end else begin
                state <= S_MOD_RD;
              end
            end
          endcase
        end
        S_RD_TURN: begin          // CE is high; turn the port around
          icap_write_n <= 1'b1;
          state        <= S_RD_START;
        end
        S_RD_START: begin
          icap_ce_n <= 1'b0;
          state     <= S_RDATA;
        end
        S_RDATA: begin
          if (!icap_busy) begin
            cnt <= cnt + CNT_W'(1);
            if (cnt == CNT_W'(TOTAL - 1)) begin
              icap_ce_n <= 1'b1;
              state     <= S_WR_TURN;
            end
          end
        end
        S_WR_TURN: begin
          icap_write_n <= 1'b0;
          rom_idx      <= rom_idx + 5'd1;
          state        <= S_SEQ;
        end
        S_WDATA: begin
          if (cnt == CNT_W'(TOTAL)) begin
            icap_ce_n <= 1'b1;
            icap_sel  <= 1'b0;
            rom_idx   <= rom_idx + 5'd1;
            state     <= S_SEQ;
          end else begin
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
            icap_sel     <= (cnt < CNT_W'(FRAME_WORDS));
            icap_cmd     <= '0;        // pad words
            cnt          <= cnt + CNT_W'(1);
          end
        end
        S_MOD_RD: state <= S_MOD_WR;
        S_MOD_WR: begin
          rom_idx  <= WR_SEQ;
          phase_wr <= 1'b1;
          state    <= S_SEQ;
        end
        S_CHECK: begin
          if (is_eof(entry.delim) || ptr == '1) begin
            ptr    <= '0;
            eof    <= 1'b1;
            paused <= 1'b1;
            state  <= S_IDLE;
          end else if (is_pause(entry.delim)) begin
            ptr    <= ptr + FL_AW'(1);
            paused <= 1'b1;
            state  <= S_IDLE;
          end else begin
            ptr   <= ptr + FL_AW'(1);
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The port is only turned around while CE is inactive.
  a_turnaround: assert property (@(posedge clk) disable iff (rst)
    $changed(icap_write_n) |-> $past(icap_ce_n));

endmodule
