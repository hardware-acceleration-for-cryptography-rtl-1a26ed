// rsa_power: accelerator for the Power() hotspot of RSA, which raises two to
// a power N of at most 31. It is a 32-bit logarithmic barrel shifter that
// shifts an operand left by 0..31 bits; with operand 1 the result is 2^N.
// Following the original design, the whole operation is one FSM state: the five
// shift stages are combinational and the result is registered on the clock
// edge that samples start, so done (and result) appear one cycle after start.
// The general operand input (instead of a constant 1) is this design's
// choice, since the original design describes the unit as a shifter.
//
// Interface: start (1-cycle pulse), value, amount -> result, done (1-cycle
// pulse). result holds until the next start.
module rsa_power #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [WIDTH-1:0]         value,
  input  logic [$clog2(WIDTH)-1:0] amount,
  output logic [WIDTH-1:0]         result,
  output logic                     done
);
  localparam int unsigned STAGES = $clog2(WIDTH);

  // stage k shifts by 2^k when amount[k] is set
  logic [WIDTH-1:0] stage [STAGES+1];

  always_comb begin
    stage[0] = value;
    for (int k = 0; k < STAGES; k++)
      stage[k+1] = amount[k] ? (stage[k] << (1 << k)) : stage[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= start;
      if (start) result <= stage[STAGES];
    end
  end
endmodule
