// march_tpg: block RAM test pattern generator for LUT RAM (SliceM) BIST.
//
// A block RAM of 8N vectors (2048 x 18 for N = 256, the 256 x 1 LUT RAM of a
// SliceM) holds a March Y test, which is exactly 8N operations:
//   up-or-down (w0); up (r0, w1, r1); down (r1, w0, r0); up-or-down (r0).
// After a start pulse the generator reads the vectors out in order, one per
// clock, and raises done after the last one. Each vector drives the RAMs
// under test: address, write enable and a data bit that is the value to
// write, or on a read the value the RAM must return. The vector layout is
// this design's choice (only 18-bit words and the 8N count are given):
//   [7:0] address   [8] write enable   [9] data / expected value
//   [10] read check (1 on read operations)   [12:11] operation within the
//   march element   [14:13] element number   [17:15] zero
// The ROM contents are computed when the RAM is initialised, from the
// March Y definition above, rather than loaded from a file.
// Timing: vector fields are valid in the cycles where valid = 1, the first
// one two clocks after start (RAM address register plus read register).
module march_tpg #(
  parameter int unsigned N_AW = 8,    // RAM under test: 2**N_AW words of 1 bit
  parameter int unsigned VW   = 18
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            valid,
  output logic            done,
  output logic [N_AW-1:0] addr,
  output logic            we,
  output logic            data,
  output logic            check
);

  localparam int unsigned N     = 2**N_AW;
  localparam int unsigned DEPTH = 8 * N;
  localparam int unsigned DAW   = N_AW + 3;

  // Vector number i -> March Y vector.
  function automatic logic [VW-1:0] march_y(int unsigned i);
    logic [VW-1:0] v;
    int unsigned   a, op, elem;
    v = '0;
    if (i < N) begin                       // M0: (w0), ascending
      elem = 0; op = 0; a = i;
      v[8] = 1'b1; v[9] = 1'b0;
    end else if (i < 4*N) begin            // M1: up (r0, w1, r1)
      elem = 1; op = (i - N) % 3; a = (i - N) / 3;
      v[8]  = (op == 1);
      v[9]  = (op != 0);
      v[10] = (op != 1);
    end else if (i < 7*N) begin            // M2: down (r1, w0, r0)
      elem = 2; op = (i - 4*N) % 3; a = N - 1 - (i - 4*N) / 3;
      v[8]  = (op == 1);
      v[9]  = (op == 0);
      v[10] = (op != 1);
    end else begin                         // M3: (r0), ascending
      elem = 3; op = 0; a = i - 7*N;
      v[9] = 1'b0; v[10] = 1'b1;
    end
    v[N_AW-1:0] = N_AW'(a);
    v[12:11]    = 2'(op);
    v[14:13]    = 2'(elem);
    return v;
  endfunction

  logic [VW-1:0]  rom [DEPTH];
  logic [VW-1:0]  vec;
  logic [DAW-1:0] ptr;
  logic           rd_act, rd_q;

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = march_y(i);
  end

  always_ff @(posedge clk) vec <= rom[ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr    <= '0;
      rd_act <= 1'b0;
      rd_q   <= 1'b0;
      done   <= 1'b0;
    end else begin
      rd_q <= rd_act;
      done <= rd_q && !rd_act;
      if (start) begin
        ptr    <= '0;
        rd_act <= 1'b1;
      end else if (rd_act) begin
        ptr <= ptr + DAW'(1);
        if (ptr == DAW'(DEPTH - 1)) rd_act <= 1'b0;
      end
    end
  end

  assign valid = rd_q;
  assign addr  = vec[N_AW-1:0];
  assign we    = rd_q && vec[8];
  assign data  = vec[9];
  assign check = rd_q && vec[10];

endmodule
