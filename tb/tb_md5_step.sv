// tb_md5_step: self-checking test of the four MD5 step modules (ROUND = 0..3,
// one instance each). Each is given random a, b, c, d, x and a random step
// index of its own round; the result must equal
//   b + ((a + fn(b,c,d) + x + T[i]) <<< s)
// with T[i] = floor(2^32 * |sin(i+1)|) computed here in floating point and
// s taken from the RFC 1321 rotation lists. The two-cycle latency is checked.
module tb_md5_step;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [3:0]  start = '0;
  logic [5:0]  step = '0;
  logic [31:0] a = '0, b = '0, c = '0, d = '0, x = '0;
  logic [31:0] a_out [4];
  logic [3:0]  done, busy;
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 4; r++) begin : g_dut
    md5_step #(.ROUND(r)) dut (
      .clk, .rst_n, .start(start[r]), .step, .a, .b, .c, .d, .x,
      .a_out(a_out[r]), .done(done[r]), .busy(busy[r]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ROT [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};

  function automatic logic [31:0] t_const(int i);
    real s = $sin(real'(i + 1));
    if (s < 0.0) s = -s;
    return 32'(longint'($floor(s * 4294967296.0)));
  endfunction

  function automatic logic [31:0] ref_step(int i, logic [31:0] a_, logic [31:0] b_,
                                           logic [31:0] c_, logic [31:0] d_, logic [31:0] x_);
    logic [31:0] f, sum;
    int s = ROT[i / 16][i % 4];
    case (i / 16)
      0: f = (b_ & c_) | (~b_ & d_);
      1: f = (b_ & d_) | (c_ & ~d_);
      2: f = b_ ^ c_ ^ d_;
      default: f = c_ ^ (b_ | ~d_);
    endcase
    sum = a_ + f + x_ + t_const(i);
    return b_ + ((sum << s) | (sum >> (32 - s)));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (t_const(0) != 32'hd76aa478 || t_const(63) != 32'heb86d391) begin
      failures++;
      $display("reference constants wrong");
    end
    for (int n = 0; n < 400; n++) begin
      int i = int'($urandom % 64);
      int r = i / 16;
      int lat;
      @(negedge clk);
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; x = $urandom;
      step = 6'(i);
      start[r] = 1'b1;
      @(negedge clk);
      start = '0;
      lat = 1;
      while (!done[r] && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("latency %0d, expected 2", lat); end
      checks++;
      if (a_out[r] !== ref_step(i, a, b, c, d, x)) begin
        failures++;
        $display("step %0d: %h, expected %h", i, a_out[r], ref_step(i, a, b, c, d, x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
