// md5_p: the P_MD5 hot-block, the 64 steps MD5 applies to one 512-bit
// message block. As the original design describes, it holds four step modules, one
// per round (F, G, H, I); steps 0-15 call the first, 16-31 the second, and
// so on. The message word of step i is X[k] with
//   k = i (round 0), (5i+1) mod 16 (round 1), (3i+5) mod 16 (round 2),
//   7i mod 16 (round 3).
// After each step the working words rotate: (a,b,c,d) <- (d, a', b, c).
//
// Timing: the controller issues a step, waits for the module's done and
// updates the working words, so each step takes 3 cycles (2 in the step
// module, 1 in the controller) and done pulses 1 + 64*3 = 193 cycles after
// start. The final addition of the chaining value (h += a..d) and the
// padding are left to software, like the rest of MD5.
//
// Interface: chain_in[0..3] = a, b, c, d before the block; block[0..15] the
// sixteen little-endian message words; chain_out = a, b, c, d after 64
// steps.
module md5_p
  import crypto_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t chain_in [4],
  input  word_t block [16],
  output word_t chain_out [4],
  output logic  done,
  output logic  busy
);
  typedef enum logic [1:0] {IDLE, ISSUE, WAIT} state_t;
  state_t state;

  word_t      w [4];          // a, b, c, d
  logic [5:0] step_q;
  logic [1:0] round;
  logic [3:0] k;
  word_t      x_word;
  logic [3:0] st_start, st_done;
  logic [3:0] st_busy;      // only watched by the assertion below
  word_t      st_a [4];
  word_t      a_new;
  logic       step_done;

  assign round = step_q[5:4];

  always_comb begin
    unique case (round)
      2'd0: k = step_q[3:0];
      2'd1: k = 4'(5 * step_q + 1);
      2'd2: k = 4'(3 * step_q + 5);
      default: k = 4'(7 * step_q);
    endcase
  end
  assign x_word = block[k];

  for (genvar r = 0; r < 4; r++) begin : g_round
    assign st_start[r] = (state == ISSUE) && (round == 2'(r));
    md5_step #(.ROUND(r)) u_step (
      .clk   (clk),
      .rst_n (rst_n),
      .start (st_start[r]),
      .step  (step_q),
      .a     (w[0]),
      .b     (w[1]),
      .c     (w[2]),
      .d     (w[3]),
      .x     (x_word),
      .a_out (st_a[r]),
      .done  (st_done[r]),
      .busy  (st_busy[r])
    );
  end

  assign a_new     = st_a[round];
  assign step_done = st_done[round];
  assign busy      = (state != IDLE);
  assign chain_out = w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      done   <= 1'b0;
      step_q <= '0;
      for (int i = 0; i < 4; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          w      <= chain_in;
          step_q <= '0;
          state  <= ISSUE;
        end
        ISSUE: state <= WAIT;
        WAIT: if (step_done) begin
          w[0] <= w[3];
          w[1] <= a_new;
          w[2] <= w[1];
          w[3] <= w[2];
          step_q <= step_q + 1'b1;
          if (step_q == 6'd63) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            state <= ISSUE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start while busy");
  assert property (@(posedge clk) disable iff (!rst_n) (state == ISSUE) |-> st_busy == 4'd0)
    else $error("step issued while a step module is busy");
endmodule
