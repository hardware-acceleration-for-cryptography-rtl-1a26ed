// tb_md5_p: self-checking test of the P_MD5 block. For three messages that
// fit in one block ("", "abc" and "The quick brown fox jumps over the lazy
// dog") the test pads the message, loads the sixteen words and the initial
// chaining value, runs the 64 steps, adds the chaining value back (the part
// MD5 leaves in software) and compares the digest with the published one.
// The latency of 1 + 3*64 cycles is checked as well.
module tb_md5_p;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] chain_in [4];
  logic [31:0] block [16];
  logic [31:0] chain_out [4];
  logic        done, busy;
  int checks = 0, failures = 0;

  md5_p dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] IV [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};

  task automatic hash(input string msg, input logic [127:0] expected);
    logic [7:0]   bytes [64];
    logic [127:0] digest;
    logic [31:0]  h;
    int len = msg.len();
    int lat;
    foreach (bytes[i]) bytes[i] = 8'h00;
    for (int i = 0; i < len; i++) bytes[i] = msg[i];
    bytes[len] = 8'h80;
    {bytes[63], bytes[62], bytes[61], bytes[60], bytes[59], bytes[58], bytes[57], bytes[56]}
      = 64'(len * 8);
    @(negedge clk);
    for (int w = 0; w < 16; w++)
      block[w] = {bytes[4*w+3], bytes[4*w+2], bytes[4*w+1], bytes[4*w]};
    chain_in = IV;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1 + 3 * 64) begin failures++; $display("latency %0d, expected %0d", lat, 1 + 3 * 64); end
    for (int n = 0; n < 4; n++) begin
      h = chain_out[n] + IV[n];
      digest[127-32*n -: 32] = {h[7:0], h[15:8], h[23:16], h[31:24]};
    end
    checks++;
    if (digest !== expected) begin
      failures++;
      $display("MD5(\"%s\") = %h, expected %h", msg, digest, expected);
    end
  endtask

  initial begin
    foreach (block[i]) block[i] = '0;
    chain_in = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    hash("", 128'hd41d8cd98f00b204e9800998ecf8427e);
    hash("abc", 128'h900150983cd24fb0d6963f7d28e17f72);
    hash("The quick brown fox jumps over the lazy dog", 128'h9e107d9d372bb6826bd81d3542a419d6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
