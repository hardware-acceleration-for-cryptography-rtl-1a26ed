// rc5_keyxp: accelerator for the KEYXP_RC5 hot-block of RC5 key expansion:
// the loop that mixes the secret key words L[0..C-1] into the expanded key
// table S[0..T-1]:
//   A = B = i = j = 0
//   repeat 3*max(T, C) times:
//     A = S[i] = (S[i] + A + B) <<< 3
//     B = L[j] = (L[j] + A + B) <<< (A + B)
//     i = (i + 1) mod T;  j = (j + 1) mod C
//
// Each loop iteration takes the three FSM states the original design gives: MIX_S
// updates S[i] and A, MIX_L updates L[j] and B, ADVANCE steps the indices
// and the iteration count. The edge that samples start clears A, B, i, j,
// so done pulses 1 + 3*3*max(T, C) cycles after start (235 cycles for the
// default RC5-32/12/16).
//
// The host loads L (the key bytes, little-endian words) and S (initialised
// with the magic constants P and Q, which is the cheap part of the key
// setup and stays in software) through the host ports and reads S back
// afterwards. Host reads are combinational; writes are ignored while busy.
// The word size W = 32, R = 12 rounds (T = 26) and a 16-byte key (C = 4)
// are this design's defaults; the original design does not state them.
module rc5_keyxp #(
  parameter int unsigned T = 26,
  parameter int unsigned C = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 done,
  output logic                 busy,
  // host access to S
  input  logic                 s_we,
  input  logic [$clog2(T)-1:0] s_addr,
  input  logic [31:0]          s_wdata,
  output logic [31:0]          s_rdata,
  // host access to L
  input  logic                 l_we,
  input  logic [$clog2(C)-1:0] l_addr,
  input  logic [31:0]          l_wdata,
  output logic [31:0]          l_rdata
);
  import crypto_pkg::rotl32;

  localparam int unsigned ITER = 3 * ((T > C) ? T : C);

  typedef enum logic [1:0] {IDLE, MIX_S, MIX_L, ADVANCE} state_t;
  state_t state;

  logic [31:0] s_mem [T];
  logic [31:0] l_mem [C];
  logic [31:0] a_q, b_q;
  logic [$clog2(T)-1:0] i_q;
  logic [$clog2(C)-1:0] j_q;
  logic [$clog2(ITER+1)-1:0] cnt_q;

  logic [31:0] a_new, b_new, ab_sum;

  assign busy    = (state != IDLE);
  assign s_rdata = s_mem[s_addr];
  assign l_rdata = l_mem[l_addr];

  assign a_new  = rotl32(s_mem[i_q] + a_q + b_q, 5'd3);
  assign ab_sum = a_q + b_q;
  assign b_new  = rotl32(l_mem[j_q] + ab_sum, ab_sum[4:0]);

  // tables: written by the mixing loop while busy, by the host otherwise
  always_ff @(posedge clk) begin
    if (state == MIX_S)       s_mem[i_q] <= a_new;
    else if (!busy && s_we)   s_mem[s_addr] <= s_wdata;
    if (state == MIX_L)       l_mem[j_q] <= b_new;
    else if (!busy && l_we)   l_mem[l_addr] <= l_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
      i_q   <= '0;
      j_q   <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_q <= '0; b_q <= '0; i_q <= '0; j_q <= '0; cnt_q <= '0;
          state <= MIX_S;
        end
        MIX_S: begin
          a_q   <= a_new;
          state <= MIX_L;
        end
        MIX_L: begin
          b_q   <= b_new;
          state <= ADVANCE;
        end
        ADVANCE: begin
          i_q   <= (32'(i_q) == T-1) ? '0 : i_q + 1'b1;
          j_q   <= (32'(j_q) == C-1) ? '0 : j_q + 1'b1;
          cnt_q <= cnt_q + 1'b1;
          if (32'(cnt_q) == ITER-1) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            state <= MIX_S;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("start while busy");
endmodule
