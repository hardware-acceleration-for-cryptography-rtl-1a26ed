// aes_inv_mixcolumns: accelerator for the InvMixColumns() hotspot of AES
// decryption, working on one 4-byte state column.
//
// The original design gives it six FSM states: the column is read into temporary
// storage, four dependent steps multiply in GF(2^8), and the result is
// stored back. Here the four dependent steps are the chain of doublings
// x2 = 2a, x4 = 2*x2, x8 = 2*x4 for all four bytes, followed by the
// combination into the InvMixColumns matrix product
//   b_i = 0e*a_i ^ 0b*a_{i+1} ^ 0d*a_{i+2} ^ 09*a_{i+3}
// with 09 = x8^a, 0b = x8^x2^a, 0d = x8^x4^a, 0e = x8^x4^x2. How the four
// multiply states are split is this design's choice.
//
// Timing: state LOAD is taken on the edge that samples start; then X2, X4,
// X8, COMB and STORE, so done pulses 6 cycles after start.
// Interface: col_in / col_out pack row 0 in bits [31:24] down to row 3 in
// bits [7:0].
module aes_inv_mixcolumns
  import crypto_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t col_in,
  output word_t col_out,
  output logic  done,
  output logic  busy
);
  typedef enum logic [2:0] {IDLE, S_X2, S_X4, S_X8, S_COMB, S_STORE} state_t;
  state_t state;

  byte_t a  [4];
  byte_t x2 [4];
  byte_t x4 [4];
  byte_t x8 [4];
  byte_t r  [4];

  function automatic byte_t mul09(logic [1:0] i);  return x8[i] ^ a[i];               endfunction
  function automatic byte_t mul0b(logic [1:0] i);  return x8[i] ^ x2[i] ^ a[i];       endfunction
  function automatic byte_t mul0d(logic [1:0] i);  return x8[i] ^ x4[i] ^ a[i];       endfunction
  function automatic byte_t mul0e(logic [1:0] i);  return x8[i] ^ x4[i] ^ x2[i];      endfunction

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      done    <= 1'b0;
      col_out <= '0;
      for (int i = 0; i < 4; i++) begin
        a[i] <= '0; x2[i] <= '0; x4[i] <= '0; x8[i] <= '0; r[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin            // state 1: read the column
          for (int i = 0; i < 4; i++) a[i] <= col_in[31-8*i -: 8];
          state <= S_X2;
        end
        S_X2: begin
          for (int i = 0; i < 4; i++) x2[i] <= gf_xtime(a[i]);
          state <= S_X4;
        end
        S_X4: begin
          for (int i = 0; i < 4; i++) x4[i] <= gf_xtime(x2[i]);
          state <= S_X8;
        end
        S_X8: begin
          for (int i = 0; i < 4; i++) x8[i] <= gf_xtime(x4[i]);
          state <= S_COMB;
        end
        S_COMB: begin
          for (int i = 0; i < 4; i++)
            r[i] <= mul0e(2'(i)) ^ mul0b(2'(i+1)) ^ mul0d(2'(i+2)) ^ mul09(2'(i+3));
          state <= S_STORE;
        end
        S_STORE: begin                    // state 6: store the column back
          col_out <= {r[0], r[1], r[2], r[3]};
          done    <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  property p_no_start_when_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !start;
  endproperty
  assert property (p_no_start_when_busy) else $error("start while busy");
endmodule
