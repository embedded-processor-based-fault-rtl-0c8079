// icap_model: behavioural model of the internal configuration access port
// (ICAP) and of the configuration memory behind it. Not synthesizable; for
// testbenches only.
//
// The memory holds NFRAMES frames of FRAME_WORDS 32-bit words, indexed by the
// frame address register (FAR). Write-mode words (ce_n = 0, write_n = 0) are
// parsed as configuration packets after the sync word: type-1 writes to CMD
// (WCFG, RCFG, DESYNC) and FAR, type-1 FDRI / FDRO headers followed by a
// type-2 word count, and FDRI frame data. A frame read queues PAD_WORDS
// dummy words followed by the frame; in read mode (ce_n = 0, write_n = 1) the
// port holds busy high for LAT cycles and then presents one word per cycle,
// with random extra busy cycles when STALL is set. On a frame write the
// first FRAME_WORDS data words go to the frame, trailing pad words are
// dropped. Anything unexpected is counted in errors. Traffic before CE has
// first been seen inactive (power-up, before reset) is ignored.
module icap_model #(
  parameter int unsigned FRAME_WORDS = 41,
  parameter int unsigned PAD_WORDS   = 0,
  parameter int unsigned NFRAMES     = 16,
  parameter int unsigned LAT         = 3,
  parameter bit          STALL       = 1'b0
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] i,
  output logic [31:0] o,
  output logic        busy
);

  logic [31:0] cfg [NFRAMES][FRAME_WORDS];

  int unsigned errors        = 0;
  int unsigned frames_read   = 0;
  int unsigned frames_written = 0;
  int unsigned stall_cycles  = 0;
  int unsigned max_burst     = 0;   // longest run of back-to-back FDRI words
  bit          stall_en      = STALL;

  bit          synced   = 0;
  int unsigned far      = 0;
  logic [4:0]  reg_addr = '0;
  int unsigned wc_left  = 0;       // data words still expected for reg_addr
  int unsigned wr_idx   = 0;
  int unsigned burst    = 0;
  bit          last_fdri = 0;
  logic [31:0] q [$];
  int unsigned rd_ptr   = 0;
  int unsigned lat_cnt  = 0;
  bit          armed    = 0;       // set once CE has been seen inactive

  initial begin
    busy = 1'b1;
    o    = '0;
  end

  task automatic write_word(logic [31:0] w);
    bit fdri_now;
    fdri_now = 0;
    if (!synced) begin
      if (w == 32'hAA99_5566) synced = 1;
      else if (w != 32'hFFFF_FFFF && w != 32'h2000_0000) begin errors++; $display("icap_model: unexpected word %h", w); end
    end else if (wc_left > 0) begin
      wc_left--;
      case (reg_addr)
        5'd4: begin  // CMD
          if (w == 32'h0000_000D) synced = 0;
          else if (w != 32'h1 && w != 32'h4) begin errors++; $display("icap_model: unexpected word %h", w); end
        end
        5'd1: far = w;
        5'd2: begin  // FDRI
          fdri_now = 1;
          if (wr_idx < FRAME_WORDS) begin
            if (far < NFRAMES) cfg[far][wr_idx] = w;
            else begin errors++; $display("icap_model: unexpected word %h", w); end
          end
          wr_idx++;
          if (wc_left == 0) frames_written++;
        end
        default: begin errors++; $display("icap_model: unexpected word %h", w); end
      endcase
    end else begin
      case (w[31:29])
        3'b001: begin
          if (w[28:27] == 2'b00) ;                    // NOOP
          else begin
            reg_addr = w[17:13];
            wc_left  = (w[28:27] == 2'b10) ? int'(w[10:0]) : 0;
            wr_idx   = 0;
          end
        end
        3'b010: begin
          if (w[28:27] == 2'b10 && reg_addr == 5'd2) begin
            wc_left = int'(w[26:0]);
            wr_idx  = 0;
          end else if (w[28:27] == 2'b01 && reg_addr == 5'd3) begin
            q.delete();
            repeat (PAD_WORDS) q.push_back(32'hDEAD_BEEF);
            for (int k = 0; k < FRAME_WORDS; k++)
              q.push_back(far < NFRAMES ? cfg[far][k] : 32'h0);
            if (int'(w[26:0]) != PAD_WORDS + FRAME_WORDS) begin errors++; $display("icap_model: unexpected word %h", w); end
            rd_ptr = 0;
            frames_read++;
          end else begin errors++; $display("icap_model: unexpected word %h", w); end
        end
        default: begin errors++; $display("icap_model: unexpected word %h", w); end
      endcase
    end
    if (fdri_now && last_fdri) burst++;
    else if (fdri_now) burst = 1;
    if (burst > max_burst) max_burst = burst;
    last_fdri = fdri_now;
  endtask

  always @(posedge clk) begin
    if (ce_n) armed <= 1;
    if (!armed) begin
      busy <= 1'b1;
    end else if (!ce_n && write_n) begin
      int unsigned p;
      last_fdri = 0;
      p = rd_ptr;
      if (!busy) p++;
      rd_ptr <= p;
      if (lat_cnt > 0) begin
        lat_cnt <= lat_cnt - 1;
        busy    <= 1'b1;
      end else if (p < q.size() && !(stall_en && ($urandom % 4 == 0))) begin
        busy <= 1'b0;
        o    <= q[p];
      end else begin
        busy <= 1'b1;
        if (p < q.size()) stall_cycles++;
      end
    end else begin
      busy    <= 1'b1;
      lat_cnt <= LAT;
      if (!ce_n) write_word(i);
      else last_fdri = 0;
    end
  end

endmodule
