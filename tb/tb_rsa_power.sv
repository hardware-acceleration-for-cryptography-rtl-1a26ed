// tb_rsa_power: self-checking test of the barrel shifter behind Power().
// Checks 2^N for N = 0..31 (operand 1), random operands and amounts against
// a multiply by 2^N, and that done follows start by exactly one cycle.
module tb_rsa_power;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] value = '0;
  logic [4:0]  amount = '0;
  logic [31:0] result;
  logic        done;
  int checks = 0, failures = 0;

  rsa_power dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] v, input logic [4:0] n);
    logic [63:0] expected;
    int lat;
    expected = 64'(v) * (64'd1 << n);
    @(negedge clk);
    value = v; amount = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1) begin failures++; $display("latency %0d, expected 1", lat); end
    checks++;
    if (result !== expected[31:0]) begin
      failures++;
      $display("%h << %0d = %h, expected %h", v, n, result, expected[31:0]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 32; n++) run(32'd1, 5'(n));
    for (int i = 0; i < 300; i++) run($urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
