// blowfish_f: accelerator for the F() hotspot of Blowfish,
//   F(x) = ((S0[a] + S1[b]) ^ S2[c]) + S3[d],  x = {a, b, c, d} (a = MSB),
// with additions modulo 2^32.
//
// Three FSM states, as in the original design: (1) the 32-bit input is split into
// four 8-bit indices, (2) the four S-box tables are read in parallel,
// (3) the four words are combined with two adders and one XOR. done pulses
// 3 cycles after start.
//
// The S-boxes of Blowfish depend on the key, so the four 256 x 32-bit tables
// are RAMs filled by the host through the write port (sb_we, sb_sel selects
// the table, sb_addr the entry) once the key schedule has been computed in
// software. Writes are only allowed while the unit is idle (asserted). The
// write port is this design's choice; the original design only says the tables are
// kept in fast memory.
module blowfish_f
  import crypto_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      x,
  output word_t      f_out,
  output logic       done,
  output logic       busy,
  input  logic       sb_we,
  input  logic [1:0] sb_sel,
  input  byte_t      sb_addr,
  input  word_t      sb_wdata
);
  typedef enum logic [1:0] {IDLE, S_LOOKUP, S_COMBINE} state_t;
  state_t state;

  word_t sbox [4][256];
  byte_t idx  [4];
  word_t sv   [4];

  assign busy = (state != IDLE);

  // S-box storage: no reset, written only by the host
  always_ff @(posedge clk) begin
    if (sb_we) sbox[sb_sel][sb_addr] <= sb_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      f_out <= '0;
      for (int i = 0; i < 4; i++) begin
        idx[i] <= '0;
        sv[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin                 // state 1: split
          for (int i = 0; i < 4; i++) idx[i] <= x[31-8*i -: 8];
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin                        // state 2: four parallel reads
          for (int i = 0; i < 4; i++) sv[i] <= sbox[i][idx[i]];
          state <= S_COMBINE;
        end
        S_COMBINE: begin                       // state 3: add, xor, add
          f_out <= ((sv[0] + sv[1]) ^ sv[2]) + sv[3];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start while busy");
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !sb_we)
    else $error("S-box write while busy");
endmodule
