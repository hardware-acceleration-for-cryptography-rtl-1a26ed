// md5_step: one of the four MD5 step modules of the P_MD5 hot-block. The
// parameter ROUND (0..3) selects the round function:
//   F = (b & c) | (~b & d)      G = (b & d) | (c & ~d)
//   H = b ^ c ^ d               I = c ^ (b | ~d)
// and the step computes
//   a' = b + ((a + fn(b,c,d) + x + T[step]) <<< s[step])
// with T and s the standard constants for the given step index.
//
// Two FSM states, as in the original design: (1) the round function is evaluated
// on the inputs, together with the sum a + x + T; (2) the simple operations
// on that output - addition, rotation, addition - give a'. done pulses 2
// cycles after start.
module md5_step
  import crypto_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] step,     // 0..63, selects T and the rotation
  input  word_t      a,
  input  word_t      b,
  input  word_t      c,
  input  word_t      d,
  input  word_t      x,        // message word for this step
  output word_t      a_out,
  output logic       done,
  output logic       busy
);
  typedef enum logic {IDLE, S_UPDATE} state_t;
  state_t state;

  word_t fn, f_q, sum_q, b_q;
  logic [4:0] rot_q;

  always_comb begin
    unique case (ROUND)
      0:       fn = (b & c) | (~b & d);
      1:       fn = (b & d) | (c & ~d);
      2:       fn = b ^ c ^ d;
      default: fn = c ^ (b | ~d);
    endcase
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      f_q   <= '0;
      sum_q <= '0;
      b_q   <= '0;
      rot_q <= '0;
      a_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin                  // state 1
          f_q   <= fn;
          sum_q <= a + x + MD5_T[step];
          b_q   <= b;
          rot_q <= 5'(MD5_ROT[ROUND][step[1:0]]);
          state <= S_UPDATE;
        end
        S_UPDATE: begin                         // state 2
          a_out <= b_q + rotl32(sum_q + f_q, rot_q);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start while busy");
  assert property (@(posedge clk) disable iff (!rst_n) start |-> step[5:4] == ROUND[1:0])
    else $error("step belongs to another round");
endmodule
