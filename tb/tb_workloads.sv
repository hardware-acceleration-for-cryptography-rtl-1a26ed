// tb_workloads: runs complete blocks of the accelerated algorithms through
// crypto_accel_top (default parameters). The rest of each algorithm runs
// here, in the testbench, and every hotspot call goes to its unit over the
// register port. Each result is checked against a published vector, and the
// number of unit calls against the algorithm's structure:
//   AES-128 encryption, FIPS-197 C.1: 000102..0f / 00112233..ff -> 69c4e0d8..c55a
//     SubBytes unit: 160 state bytes + 40 key-expansion bytes
//   AES-128 decryption of the same block: key expansion through the second
//     SubBytes unit (40), InvSubBytes (160), InvMixColumns (36 columns)
//   3DES (EDE, three keys), SP 800-67 example: "The qufc" -> a826fd8ce53b855f,
//     48 DES-round calls
//   Blowfish, one block with a random P-array and random S-boxes (the real
//     ones come from the key schedule), compared with a software model and
//     decrypted back: 16 F() calls each way
//   RC5-32/12/16 key expansion, published vector
//     915f4619be41b2516355a50110a9ce91: 21a5dbee154b8f6d -> f7c013ac5b2b8952
//   MD5 of an 89-byte message (two blocks): f168d89e05b664041ee6745f050caa4b
//   IDEA, key 0001..0008, pt 0000000100020003 -> 11fbed2b01986de5,
//     34 multiplications
module tb_workloads;
  import crypto_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_wdata = '0;
  logic [31:0] bus_rdata;
  int checks = 0, failures = 0;
  int calls [NUM_UNITS];

  crypto_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus model
  task automatic wr(unit_e u, int off, logic [31:0] data);
    @(negedge clk);
    bus_addr = {4'(u), 12'(off)}; bus_wdata = data; bus_we = 1'b1;
    @(negedge clk);
    bus_we = 1'b0;
  endtask

  task automatic rd(unit_e u, int off, output logic [31:0] data);
    bus_addr = {4'(u), 12'(off)};
    #1;
    data = bus_rdata;
  endtask

  task automatic go(unit_e u);
    logic [31:0] st;
    wr(u, 0, 32'd1);
    rd(u, 0, st);
    while (!st[0]) begin @(negedge clk); rd(u, 0, st); end
    calls[u]++;
  endtask

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h, expected %h", what, got, exp);
    end else $display("%s: ok", what);
  endtask

  task automatic check_calls(string what, unit_e u, int exp);
    checks++;
    if (calls[u] != exp) begin
      failures++;
      $display("%s: %0d unit calls, expected %0d", what, calls[u], exp);
    end
  endtask

  // ------------------------------------------------------------ unit calls
  task automatic hw_byte(unit_e u, input logic [7:0] x, output logic [7:0] y);
    logic [31:0] v;
    wr(u, 1, {24'd0, x});
    go(u);
    rd(u, 2, v);
    y = v[7:0];
  endtask

  task automatic hw_invmix(input logic [31:0] c, output logic [31:0] r);
    wr(U_INV_MIXCOL, 1, c);
    go(U_INV_MIXCOL);
    rd(U_INV_MIXCOL, 2, r);
  endtask

  task automatic hw_bf(input logic [31:0] x, output logic [31:0] f);
    wr(U_BLOWFISH_F, 1, x);
    go(U_BLOWFISH_F);
    rd(U_BLOWFISH_F, 2, f);
  endtask

  task automatic hw_des(input logic [31:0] l, input logic [31:0] r, input logic [47:0] k,
                        output logic [31:0] lo, output logic [31:0] ro);
    wr(U_DES_ROUND, 1, l);
    wr(U_DES_ROUND, 2, r);
    wr(U_DES_ROUND, 3, {16'd0, k[47:32]});
    wr(U_DES_ROUND, 4, k[31:0]);
    go(U_DES_ROUND);
    rd(U_DES_ROUND, 5, lo);
    rd(U_DES_ROUND, 6, ro);
  endtask

  task automatic hw_idea(input logic [15:0] a, input logic [15:0] b, output logic [15:0] r);
    logic [31:0] v;
    wr(U_IDEA_MUL, 1, {16'd0, a});
    wr(U_IDEA_MUL, 2, {16'd0, b});
    go(U_IDEA_MUL);
    rd(U_IDEA_MUL, 3, v);
    r = v[15:0];
  endtask

  // ------------------------------------------------------------ AES-128
  typedef logic [7:0] state_t [16];   // state[r + 4c]
  logic [7:0] rk [11][16];

  function automatic logic [7:0] xt(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  task automatic key_expand(unit_e sub, input logic [127:0] key);
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] rcon = 8'h01;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) w[i][j] = key[127 - 32*i - 8*j -: 8];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        logic [7:0] r [4];
        r = '{t[1], t[2], t[3], t[0]};
        for (int j = 0; j < 4; j++) hw_byte(sub, r[j], t[j]);
        t[0] ^= rcon;
        rcon = xt(rcon);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 4; c++)
        for (int j = 0; j < 4; j++) rk[r][4*c + j] = w[4*r + c][j];
  endtask

  function automatic state_t add_rk(state_t s, int r);
    for (int i = 0; i < 16; i++) s[i] ^= rk[r][i];
    return s;
  endfunction

  function automatic state_t shift_rows(state_t s, bit inv);
    state_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[r + 4*((c + r) % 4)] = s[r + 4*c];
        else     o[r + 4*c] = s[r + 4*((c + r) % 4)];
    return o;
  endfunction

  function automatic state_t mix_columns(state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[r + 4*c] = xt(s[r + 4*c]) ^ (xt(s[(r+1)%4 + 4*c]) ^ s[(r+1)%4 + 4*c])
                     ^ s[(r+2)%4 + 4*c] ^ s[(r+3)%4 + 4*c];
    return o;
  endfunction

  function automatic state_t to_state(logic [127:0] b);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(state_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127 - 8*i -: 8] = s[i];
    return b;
  endfunction

  task automatic aes_encrypt(input logic [127:0] key, input logic [127:0] pt,
                             output logic [127:0] ct);
    state_t s;
    key_expand(U_SUBB_ENC, key);
    s = add_rk(to_state(pt), 0);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) hw_byte(U_SUBB_ENC, s[i], s[i]);
      s = shift_rows(s, 1'b0);
      if (r != 10) s = mix_columns(s);
      s = add_rk(s, r);
    end
    ct = from_state(s);
  endtask

  task automatic aes_decrypt(input logic [127:0] key, input logic [127:0] ct,
                             output logic [127:0] pt);
    state_t s;
    key_expand(U_SUBB_DEC, key);
    s = add_rk(to_state(ct), 10);
    for (int r = 9; r >= 0; r--) begin
      s = shift_rows(s, 1'b1);
      for (int i = 0; i < 16; i++) hw_byte(U_INV_SUBB, s[i], s[i]);
      s = add_rk(s, r);
      if (r != 0)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] col;
          hw_invmix({s[4*c], s[4*c+1], s[4*c+2], s[4*c+3]}, col);
          {s[4*c], s[4*c+1], s[4*c+2], s[4*c+3]} = col;
        end
    end
    pt = from_state(s);
  endtask

  // ------------------------------------------------------------ DES / 3DES
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

  function automatic logic [63:0] permute(logic [63:0] v, int n_in, int tab [], int n_out);
    logic [63:0] r = '0;
    for (int i = 0; i < n_out; i++) r = (r << 1) | 64'((v >> (n_in - tab[i])) & 64'd1);
    return r;
  endfunction

  task automatic des(input logic [63:0] key, input logic [63:0] blk, input bit decrypt,
                     output logic [63:0] res);
    logic [47:0] ks [16];
    logic [55:0] cd = 56'(permute(key, 64, PC1, 56));
    logic [27:0] c = cd[55:28], d = cd[27:0];
    logic [63:0] x;
    logic [31:0] l, r;
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < SHIFTS[i]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = 48'(permute({8'd0, c, d}, 56, PC2, 48));
    end
    x = permute(blk, 64, IP, 64);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) hw_des(l, r, ks[decrypt ? 15 - i : i], l, r);
    res = permute({r, l}, 64, FP, 64);
  endtask

  // ------------------------------------------------------------ Blowfish
  logic [31:0] bf_p [18];
  logic [31:0] bf_s [4][256];

  function automatic logic [31:0] sw_f(logic [31:0] x);
    return ((bf_s[0][x[31:24]] + bf_s[1][x[23:16]]) ^ bf_s[2][x[15:8]]) + bf_s[3][x[7:0]];
  endfunction

  task automatic bf_crypt(input logic [63:0] in, input bit decrypt, input bit use_hw,
                          output logic [63:0] out);
    logic [31:0] xl = in[63:32], xr = in[31:0], f, t;
    for (int i = 0; i < 16; i++) begin
      xl ^= bf_p[decrypt ? 17 - i : i];
      if (use_hw) hw_bf(xl, f); else f = sw_f(xl);
      xr ^= f;
      t = xl; xl = xr; xr = t;
    end
    t = xl; xl = xr; xr = t;
    xr ^= bf_p[decrypt ? 1 : 16];
    xl ^= bf_p[decrypt ? 0 : 17];
    out = {xl, xr};
  endtask

  // ------------------------------------------------------------ IDEA
  task automatic idea_encrypt(input logic [127:0] key, input logic [63:0] pt,
                              output logic [63:0] ct);
    logic [15:0] z [52];
    logic [127:0] k = key;
    logic [15:0] x [4];
    logic [15:0] a, b, c, d, e, f;
    int n = 0;
    while (n < 52) begin
      for (int j = 0; j < 8 && n < 52; j++) z[n++] = k[127 - 16*j -: 16];
      k = {k[102:0], k[127:103]};
    end
    for (int i = 0; i < 4; i++) x[i] = pt[63 - 16*i -: 16];
    for (int r = 0; r < 8; r++) begin
      hw_idea(x[0], z[6*r], a);
      b = x[1] + z[6*r+1];
      c = x[2] + z[6*r+2];
      hw_idea(x[3], z[6*r+3], d);
      hw_idea(a ^ c, z[6*r+4], e);
      hw_idea((b ^ d) + e, z[6*r+5], f);
      e = e + f;
      a ^= f; d ^= e; b ^= e; c ^= f;
      x = '{a, c, b, d};
    end
    hw_idea(x[0], z[48], a);
    b = x[2] + z[49];
    c = x[1] + z[50];
    hw_idea(x[3], z[51], d);
    ct = {a, b, c, d};
  endtask

  // ------------------------------------------------------------ MD5
  task automatic md5(input string msg, output logic [127:0] digest);
    logic [7:0]  bytes [128];
    logic [31:0] h [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
    logic [31:0] v;
    int len = msg.len();
    int nblk = (len + 8) / 64 + 1;
    foreach (bytes[i]) bytes[i] = 8'h00;
    for (int i = 0; i < len; i++) bytes[i] = msg[i];
    bytes[len] = 8'h80;
    for (int i = 0; i < 8; i++) bytes[64*nblk - 8 + i] = 8'(64'(len * 8) >> (8*i));
    for (int blk = 0; blk < nblk; blk++) begin
      for (int w = 0; w < 16; w++)
        wr(U_MD5_P, 'h10 + w, {bytes[64*blk + 4*w + 3], bytes[64*blk + 4*w + 2],
                               bytes[64*blk + 4*w + 1], bytes[64*blk + 4*w]});
      for (int n = 0; n < 4; n++) wr(U_MD5_P, 'h20 + n, h[n]);
      go(U_MD5_P);
      for (int n = 0; n < 4; n++) begin
        rd(U_MD5_P, 'h30 + n, v);
        h[n] += v;
      end
    end
    for (int n = 0; n < 4; n++)
      digest[127 - 32*n -: 32] = {h[n][7:0], h[n][15:8], h[n][23:16], h[n][31:24]};
  endtask

  function automatic logic [31:0] rl(logic [31:0] v, logic [31:0] n);
    int k = int'(n % 32);
    return (k == 0) ? v : ((v << k) | (v >> (32 - k)));
  endfunction

  // ------------------------------------------------------------ main
  initial begin
    logic [127:0] r128;
    logic [63:0]  r64, t64;
    foreach (calls[i]) calls[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // AES-128
    aes_encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, r128);
    check("AES-128 encrypt", r128, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check_calls("AES encrypt SubBytes", U_SUBB_ENC, 200);
    aes_decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, r128);
    check("AES-128 decrypt", r128, 128'h00112233445566778899aabbccddeeff);
    check_calls("AES decrypt SubBytes (key expansion)", U_SUBB_DEC, 40);
    check_calls("AES decrypt InvSubBytes", U_INV_SUBB, 160);
    check_calls("AES decrypt InvMixColumns", U_INV_MIXCOL, 36);

    // 3DES EDE
    des(64'h0123456789abcdef, 64'h5468652071756663, 1'b0, r64);
    des(64'h23456789abcdef01, r64, 1'b1, r64);
    des(64'h456789abcdef0123, r64, 1'b0, r64);
    check("3DES encrypt", 128'(r64), 128'ha826fd8ce53b855f);
    check_calls("3DES rounds", U_DES_ROUND, 48);

    // Blowfish with random key material
    foreach (bf_p[i]) bf_p[i] = $urandom;
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 256; i++) begin
        bf_s[t][i] = $urandom;
        wr(U_BLOWFISH_F, 'h400 + 256*t + i, bf_s[t][i]);
      end
    t64 = {$urandom, $urandom};
    bf_crypt(t64, 1'b0, 1'b1, r64);
    begin
      logic [63:0] sw, back;
      bf_crypt(t64, 1'b0, 1'b0, sw);
      check("Blowfish encrypt vs software", 128'(r64), 128'(sw));
      bf_crypt(r64, 1'b1, 1'b1, back);
      check("Blowfish decrypt", 128'(back), 128'(t64));
    end
    check_calls("Blowfish F calls", U_BLOWFISH_F, 32);

    // RC5 key expansion and encryption
    begin
      logic [7:0]  key [16] = '{8'h91, 8'h5f, 8'h46, 8'h19, 8'hbe, 8'h41, 8'hb2, 8'h51,
                                8'h63, 8'h55, 8'ha5, 8'h01, 8'h10, 8'ha9, 8'hce, 8'h91};
      logic [31:0] s [26];
      logic [31:0] A, B;
      for (int w = 0; w < 4; w++)
        wr(U_RC5_KEYXP, 'h200 + w, {key[4*w+3], key[4*w+2], key[4*w+1], key[4*w]});
      for (int k = 0; k < 26; k++) wr(U_RC5_KEYXP, 'h100 + k, 32'hb7e15163 + k * 32'h9e3779b9);
      go(U_RC5_KEYXP);
      for (int k = 0; k < 26; k++) rd(U_RC5_KEYXP, 'h100 + k, s[k]);
      A = 32'heedba521 + s[0];          // plaintext bytes 21a5dbee 154b8f6d
      B = 32'h6d8f4b15 + s[1];
      for (int r = 1; r <= 12; r++) begin
        A = rl(A ^ B, B) + s[2*r];
        B = rl(B ^ A, A) + s[2*r+1];
      end
      check("RC5-32/12/16 encrypt", {64'd0, A[7:0], A[15:8], A[23:16], A[31:24],
                                     B[7:0], B[15:8], B[23:16], B[31:24]},
            128'hf7c013ac5b2b8952);
    end

    // MD5, two blocks
    md5("The quick brown fox jumps over the lazy dog. The quick brown fox jumps over the lazy dog.", r128);
    check("MD5 two blocks", r128, 128'hf168d89e05b664041ee6745f050caa4b);
    check_calls("MD5 blocks", U_MD5_P, 2);

    // IDEA
    idea_encrypt(128'h00010002000300040005000600070008, 64'h0000000100020003, r64);
    check("IDEA encrypt", 128'(r64), 128'h11fbed2b01986de5);
    check_calls("IDEA multiplications", U_IDEA_MUL, 34);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
