// tb_idea_mul: self-checking test of the IDEA multiplier modulo 2^16+1.
// The reference maps 0 to 2^16, multiplies in 64-bit arithmetic, reduces
// modulo 65537 and maps 2^16 back to 0. Corner cases (0, 1, 0xffff in every
// combination) and random operands are checked, with the four-cycle latency.
module tb_idea_mul;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic [15:0] result;
  logic        done, busy;
  int checks = 0, failures = 0;

  idea_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_mul(logic [15:0] x, logic [15:0] y);
    longint xa = (x == 0) ? 65536 : longint'(x);
    longint ya = (y == 0) ? 65536 : longint'(y);
    longint p = (xa * ya) % 65537;
    return (p == 65536) ? 16'd0 : 16'(p);
  endfunction

  task automatic run(input logic [15:0] x, input logic [15:0] y);
    int lat;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d, expected 4", lat); end
    checks++;
    if (result !== ref_mul(x, y)) begin
      failures++;
      $display("%h (*) %h = %h, expected %h", x, y, result, ref_mul(x, y));
    end
  endtask

  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'h0002, 16'h8000, 16'hffff};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    for (int i = 0; i < 500; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
