// idea_mul: accelerator for the MUL_IDEA hot-block of IDEA, multiplication
// modulo 2^16 + 1 in which the 16-bit value 0 stands for 2^16.
//
// Four FSM states, as in the original design: one for initialisation and three for
// multiply, shift and add work on the operand and the key:
//   INIT      latch a, b and note which is zero
//   MULTIPLY  p = a * b (32 bits)
//   SHIFT     lo = p[15:0], hi = p >> 16
//   ADD       r = lo - hi + (lo < hi)       (both non-zero)
//             r = 1 - b, or 1 - a           (a = 0, or b = 0; mod 2^16)
// The low/high reduction is the usual one for 2^16 + 1; the original design does
// not give the arithmetic. done pulses 4 cycles after start.
module idea_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] result,
  output logic        done,
  output logic        busy
);
  typedef enum logic [1:0] {IDLE, S_MUL, S_SHIFT, S_ADD} state_t;
  state_t state;

  logic [15:0] a_q, b_q, lo_q, hi_q;
  logic        a_zero, b_zero;
  logic [31:0] p_q;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      done   <= 1'b0;
      a_q    <= '0;
      b_q    <= '0;
      a_zero <= 1'b0;
      b_zero <= 1'b0;
      p_q    <= '0;
      lo_q   <= '0;
      hi_q   <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin                  // initialisation
          a_q    <= a;
          b_q    <= b;
          a_zero <= (a == 16'd0);
          b_zero <= (b == 16'd0);
          state  <= S_MUL;
        end
        S_MUL: begin
          p_q   <= a_q * b_q;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          lo_q  <= p_q[15:0];
          hi_q  <= p_q[31:16];
          state <= S_ADD;
        end
        S_ADD: begin
          if (a_zero)      result <= 16'd1 - b_q;
          else if (b_zero) result <= 16'd1 - a_q;
          else             result <= lo_q - hi_q + {15'd0, lo_q < hi_q};
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
