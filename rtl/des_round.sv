// des_round: accelerator for the ROUND_3DES hot-block, one DES round as used
// 48 times per block by triple DES:
//   L' = R,  R' = L ^ P(S(E(R) ^ K))
//
// Three FSM states, following the original design's outline: (1) the input is
// processed by two calculations in parallel, giving two outputs - here the
// two 24-bit halves of the expanded, key-mixed right half E(R) ^ K;
// (2) those outputs index the S-box lookup table, giving eight 4-bit
// values; (3) the S-box outputs are permuted by P (the eight SP columns)
// and XORed into L. The exact split of work between the states is this
// design's reading of the original's short description. done pulses 3
// cycles after start.
//
// Interface: l_in, r_in (32 bits each), subkey (48 bits, standard DES
// subkey bit order) -> l_out, r_out. The initial and final permutations
// and the key schedule stay outside, in software.
module des_round
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  logic [47:0] subkey,
  output logic [31:0] l_out,
  output logic [31:0] r_out,
  output logic        done,
  output logic        busy
);
  typedef enum logic [1:0] {IDLE, S_LOOKUP, S_PERMUTE} state_t;
  state_t state;

  logic [31:0] l_q, r_q;
  logic [23:0] mix_hi, mix_lo;    // the two outputs of state 1
  logic [31:0] s_q;               // eight S-box outputs
  logic [47:0] expanded;
  logic [47:0] mixed;
  logic [31:0] s_next;
  logic [31:0] p_out;

  // expansion E (bit n of the standard = bit 32-n here)
  always_comb begin
    for (int i = 0; i < 48; i++) expanded[47-i] = r_in[32 - DES_E[i]];
  end

  // S-box lookups: group g uses bits [47-6g -: 6] of the mixed word
  always_comb begin
    mixed = {mix_hi, mix_lo};
    for (int g = 0; g < 8; g++) begin
      logic [5:0] b;
      b = mixed[47-6*g -: 6];
      s_next[31-4*g -: 4] = DES_S[g][{b[5], b[0], b[4:1]}];
    end
  end

  // permutation P
  always_comb begin
    for (int i = 0; i < 32; i++) p_out[31-i] = s_q[32 - DES_P[i]];
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      done   <= 1'b0;
      l_q    <= '0;
      r_q    <= '0;
      mix_hi <= '0;
      mix_lo <= '0;
      s_q    <= '0;
      l_out  <= '0;
      r_out  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin                  // state 1
          l_q    <= l_in;
          r_q    <= r_in;
          mix_hi <= expanded[47:24] ^ subkey[47:24];
          mix_lo <= expanded[23:0]  ^ subkey[23:0];
          state  <= S_LOOKUP;
        end
        S_LOOKUP: begin                         // state 2
          s_q   <= s_next;
          state <= S_PERMUTE;
        end
        S_PERMUTE: begin                        // state 3
          l_out <= r_q;
          r_out <= l_q ^ p_out;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start while busy");
endmodule
