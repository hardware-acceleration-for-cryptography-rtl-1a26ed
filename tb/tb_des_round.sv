// tb_des_round: self-checking test of the DES round unit. The test runs
// complete DES encryptions: the key schedule (PC-1, rotations, PC-2) and the
// initial and final permutations are done here, the sixteen rounds by the
// unit. Two published vectors must come out:
//   key 133457799bbcdff1, pt 0123456789abcdef -> ct 85e813540f0ab405
//   key 0e329232ea6d0d73, pt 8787878787878787 -> ct 0000000000000000
// The first round of the first vector is also checked on its own
// (L1 = f0aaf0aa, R1 = ef4a6544), and every round's latency of 3 cycles.
// A random key and block are encrypted, then decrypted with the subkeys in
// reverse order, and must give the block back.
module tb_des_round;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] l_in = '0, r_in = '0;
  logic [47:0] subkey = '0;
  logic [31:0] l_out, r_out;
  logic        done, busy;
  int checks = 0, failures = 0;

  des_round dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int IP [64] = '{58,50,42,34,26,18,10,2,60,52,44,36,28,20,12,4,62,54,46,38,30,22,14,6,
                  64,56,48,40,32,24,16,8,57,49,41,33,25,17,9,1,59,51,43,35,27,19,11,3,
                  61,53,45,37,29,21,13,5,63,55,47,39,31,23,15,7};
  int FP [64] = '{40,8,48,16,56,24,64,32,39,7,47,15,55,23,63,31,38,6,46,14,54,22,62,30,
                  37,5,45,13,53,21,61,29,36,4,44,12,52,20,60,28,35,3,43,11,51,19,59,27,
                  34,2,42,10,50,18,58,26,33,1,41,9,49,17,57,25};
  int PC1 [56] = '{57,49,41,33,25,17,9,1,58,50,42,34,26,18,10,2,59,51,43,35,27,19,11,3,
                   60,52,44,36,63,55,47,39,31,23,15,7,62,54,46,38,30,22,14,6,61,53,45,37,
                   29,21,13,5,28,20,12,4};
  int PC2 [48] = '{14,17,11,24,1,5,3,28,15,6,21,10,23,19,12,4,26,8,16,7,27,20,13,2,
                   41,52,31,37,47,55,30,40,51,45,33,48,44,49,39,56,34,53,46,42,50,36,29,32};
  int SHIFTS [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};

  // bit n (1 = most significant) of an N-bit value
  function automatic logic [63:0] permute(logic [63:0] v, int n_in, int tab [], int n_out);
    logic [63:0] r = '0;
    for (int i = 0; i < n_out; i++) r = (r << 1) | 64'((v >> (n_in - tab[i])) & 64'd1);
    return r;
  endfunction

  function automatic void key_schedule(logic [63:0] key, output logic [47:0] ks [16]);
    logic [55:0] cd = 56'(permute(key, 64, PC1, 56));
    logic [27:0] c = cd[55:28], d = cd[27:0];
    for (int r = 0; r < 16; r++) begin
      for (int s = 0; s < SHIFTS[r]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[r] = 48'(permute({8'd0, c, d}, 56, PC2, 48));
    end
  endfunction

  task automatic round(input logic [31:0] l, input logic [31:0] r, input logic [47:0] k,
                       output logic [31:0] lo, output logic [31:0] ro);
    int lat;
    @(negedge clk);
    l_in = l; r_in = r; subkey = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("latency %0d, expected 3", lat); end
    lo = l_out;
    ro = r_out;
  endtask

  task automatic des(input logic [63:0] key, input logic [63:0] blk, input bit decrypt,
                     output logic [63:0] res);
    logic [47:0] ks [16];
    logic [63:0] x;
    logic [31:0] l, r;
    key_schedule(key, ks);
    x = permute(blk, 64, IP, 64);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) round(l, r, ks[decrypt ? 15 - i : i], l, r);
    res = permute({r, l}, 64, FP, 64);
  endtask

  task automatic expect64(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] ct, back, key, pt;
    logic [31:0] l1, r1;
    logic [47:0] ks [16];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    key_schedule(64'h133457799bbcdff1, ks);
    expect64("K1", 64'(ks[0]), 64'h1b02effc7072);
    round(32'hcc00ccff, 32'hf0aaf0aa, ks[0], l1, r1);
    expect64("round 1", {l1, r1}, 64'hf0aaf0aaef4a6544);
    des(64'h133457799bbcdff1, 64'h0123456789abcdef, 1'b0, ct);
    expect64("vector 1", ct, 64'h85e813540f0ab405);
    des(64'h0e329232ea6d0d73, 64'h8787878787878787, 1'b0, ct);
    expect64("vector 2", ct, 64'h0000000000000000);
    for (int i = 0; i < 5; i++) begin
      key = {$urandom, $urandom};
      pt  = {$urandom, $urandom};
      des(key, pt, 1'b0, ct);
      des(key, ct, 1'b1, back);
      expect64("decrypt(encrypt)", back, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
