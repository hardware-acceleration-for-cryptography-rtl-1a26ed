// tb_aes_inv_subbytes: self-checking test of the InvSubBytes unit. For every
// byte x it feeds S(x) and expects x back, with the reference S-box S built
// here by brute force: the inverse of each byte is found by
// searching for b with a*b = 1 in GF(2^8), then the affine map is applied
// bit by bit as in FIPS-197 (b'_i = b_i ^ b_{i+4} ^ b_{i+5} ^ b_{i+6} ^
// b_{i+7} ^ c_i). A few published entries are checked as well, and the
// one-cycle latency.
module tb_aes_inv_subbytes;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [7:0] in_byte = '0;
  logic [7:0] out_byte;
  logic       done;
  int checks = 0, failures = 0;
  logic [7:0] ref_sbox [256];

  aes_inv_subbytes dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gmul(int a, int b);
    int p = 0;
    for (int i = 0; i < 8; i++) begin
      if ((b >> i) & 1) p ^= a << i;
    end
    for (int i = 14; i >= 8; i--) if ((p >> i) & 1) p ^= 'h11b << (i - 8);
    return p;
  endfunction

  function automatic logic [7:0] ref_entry(int x);
    int inv = 0;
    logic [7:0] b, s;
    logic [7:0] c = 8'h63;
    for (int y = 1; y < 256; y++) if (gmul(x, y) == 1) inv = y;
    b = 8'(inv);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) ref_sbox[x] = ref_entry(x);
    // published entries
    checks++; if (ref_sbox[8'h00] != 8'h63) failures++;
    checks++; if (ref_sbox[8'h53] != 8'hed) failures++;
    checks++; if (ref_sbox[8'hff] != 8'h16) failures++;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < 256; x++) begin
      int lat;
      @(negedge clk);
      in_byte = ref_sbox[x]; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 1) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (out_byte !== 8'(x)) begin
        failures++;
        $display("InvS(%h) = %h, expected %h", ref_sbox[x], out_byte, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
