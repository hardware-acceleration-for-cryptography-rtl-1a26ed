// tb_crypto_accel_top: end-to-end test of the accelerator subsystem through
// its register port, with every parameter at its default. A processor-side
// model (the bus tasks below) hands each hotspot to its unit the way the
// software would, polls the done flag, reads the result and checks it:
//   RSA Power() 2^N and a random shift, SubBytes for encryption and for
//   decryption, InvSubBytes, InvMixColumns (published column), Blowfish F()
//   with random S-boxes, RC5 key mixing followed by RC5-32/12 encryption of
//   the published all-zero-key vector, one DES round (first round of the
//   standard worked example), MD5 of "abc", IDEA multiplication.
// It also provokes and counts the subsystem's own mechanisms, each of which
// must happen at least once:
//   - latency of each unit as seen through the done flag,
//   - a start written while a unit is busy is ignored,
//   - an S-box write while Blowfish F() is busy is ignored,
//   - two units (MD5 and RC5) running at the same time,
//   - the sticky done flag being cleared by the next start.
module tb_crypto_accel_top;
  import crypto_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_wdata = '0;
  logic [31:0] bus_rdata;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_ops [NUM_UNITS];
  int n_busy_start_ignored = 0;
  int n_busy_sbox_write_ignored = 0;
  int n_concurrent = 0;
  int n_done_cleared = 0;

  crypto_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] addr(unit_e u, int off);
    return {4'(u), 12'(off)};
  endfunction

  task automatic wr(unit_e u, int off, logic [31:0] data);
    @(negedge clk);
    bus_addr = addr(u, off); bus_wdata = data; bus_we = 1'b1;
    @(negedge clk);
    bus_we = 1'b0;
  endtask

  task automatic rd(unit_e u, int off, output logic [31:0] data);
    bus_addr = addr(u, off);
    #1;
    data = bus_rdata;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  // start a unit and wait for its done flag; cycles counts from the start
  // write to the first cycle the flag reads as set
  task automatic run(unit_e u, output int cycles);
    logic [31:0] st;
    wr(u, 0, 32'd1);           // returns one cycle after the start edge
    cycles = 1;
    rd(u, 0, st);
    while (!st[0] && cycles < 5000) begin
      @(negedge clk);
      cycles++;
      rd(u, 0, st);
    end
    n_ops[u]++;
  endtask

  task automatic expect_latency(unit_e u, int cycles, int exp);
    // the done pulse is registered into the flag: one cycle after done
    checks++;
    if (cycles != exp + 1) begin
      failures++;
      $display("unit %0d: done flag after %0d cycles, expected %0d", u, cycles, exp + 1);
    end
  endtask

  function automatic logic [31:0] rl(logic [31:0] v, logic [31:0] n);
    int k = int'(n % 32);
    return (k == 0) ? v : ((v << k) | (v >> (32 - k)));
  endfunction

  logic [31:0] bf_model [4][256];

  initial begin
    logic [31:0] v, st;
    int cyc;
    foreach (n_ops[i]) n_ops[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- RSA Power(): 2^N for every N, one random shift
    for (int n = 0; n < 32; n++) begin
      wr(U_RSA_POWER, 1, 32'd1);
      wr(U_RSA_POWER, 2, 32'(n));
      run(U_RSA_POWER, cyc);
      expect_latency(U_RSA_POWER, cyc, 1);
      rd(U_RSA_POWER, 3, v);
      check("2^N", v, 32'd1 << n);
    end
    wr(U_RSA_POWER, 1, 32'h1234_5679);
    wr(U_RSA_POWER, 2, 32'd7);
    run(U_RSA_POWER, cyc);
    rd(U_RSA_POWER, 3, v);
    check("shift", v, 32'h1234_5679 << 7);

    // ---- AES byte units
    wr(U_SUBB_ENC, 1, 32'h53);
    run(U_SUBB_ENC, cyc);
    expect_latency(U_SUBB_ENC, cyc, 1);
    rd(U_SUBB_ENC, 2, v);
    check("SubBytes enc", v, 32'hed);
    wr(U_SUBB_DEC, 1, 32'h00);
    run(U_SUBB_DEC, cyc);
    expect_latency(U_SUBB_DEC, cyc, 1);
    rd(U_SUBB_DEC, 2, v);
    check("SubBytes dec", v, 32'h63);
    wr(U_INV_SUBB, 1, 32'hed);
    run(U_INV_SUBB, cyc);
    expect_latency(U_INV_SUBB, cyc, 1);
    rd(U_INV_SUBB, 2, v);
    check("InvSubBytes", v, 32'h53);

    // ---- InvMixColumns, with a start written while it is busy
    wr(U_INV_MIXCOL, 1, 32'h8e4da1bc);
    wr(U_INV_MIXCOL, 0, 32'd1);
    wr(U_INV_MIXCOL, 1, 32'h00000000);   // operand changes...
    wr(U_INV_MIXCOL, 0, 32'd1);          // ...and a second start while busy
    rd(U_INV_MIXCOL, 0, st);
    if (st[1]) n_busy_start_ignored++;
    do begin @(negedge clk); rd(U_INV_MIXCOL, 0, st); end while (!st[0]);
    n_ops[U_INV_MIXCOL]++;
    rd(U_INV_MIXCOL, 2, v);
    check("InvMixColumns (busy start ignored)", v, 32'hdb135345);
    wr(U_INV_MIXCOL, 1, 32'h9fdc589d);
    run(U_INV_MIXCOL, cyc);
    expect_latency(U_INV_MIXCOL, cyc, 6);
    rd(U_INV_MIXCOL, 2, v);
    check("InvMixColumns", v, 32'hf20a225c);

    // ---- Blowfish F(): load random S-boxes
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 256; i++) begin
        bf_model[t][i] = $urandom;
        wr(U_BLOWFISH_F, 'h400 + 256 * t + i, bf_model[t][i]);
      end
    for (int n = 0; n < 20; n++) begin
      logic [31:0] x = $urandom;
      wr(U_BLOWFISH_F, 1, x);
      run(U_BLOWFISH_F, cyc);
      expect_latency(U_BLOWFISH_F, cyc, 3);
      rd(U_BLOWFISH_F, 2, v);
      check("Blowfish F", v, ((bf_model[0][x[31:24]] + bf_model[1][x[23:16]])
                              ^ bf_model[2][x[15:8]]) + bf_model[3][x[7:0]]);
    end
    // S-box write during a busy F(): must be dropped
    begin
      logic [31:0] x = 32'h01020304;
      wr(U_BLOWFISH_F, 1, x);
      wr(U_BLOWFISH_F, 0, 32'd1);
      rd(U_BLOWFISH_F, 0, st);
      if (st[1]) begin
        wr(U_BLOWFISH_F, 'h400 + 1, ~bf_model[0][1]);
        n_busy_sbox_write_ignored++;
      end
      do begin @(negedge clk); rd(U_BLOWFISH_F, 0, st); end while (!st[0]);
      n_ops[U_BLOWFISH_F]++;
      wr(U_BLOWFISH_F, 0, 32'd1);    // run again: uses the table after the write attempt
      do begin @(negedge clk); rd(U_BLOWFISH_F, 0, st); end while (!st[0]);
      n_ops[U_BLOWFISH_F]++;
      rd(U_BLOWFISH_F, 2, v);
      check("Blowfish F after dropped write", v,
            ((bf_model[0][1] + bf_model[1][2]) ^ bf_model[2][3]) + bf_model[3][4]);
    end

    // ---- RC5 and MD5 at the same time
    for (int w = 0; w < 4; w++) wr(U_RC5_KEYXP, 'h200 + w, 32'd0);
    for (int k = 0; k < 26; k++) wr(U_RC5_KEYXP, 'h100 + k, 32'hb7e15163 + k * 32'h9e3779b9);
    // MD5("abc")
    begin
      logic [7:0] bytes [64];
      foreach (bytes[i]) bytes[i] = 8'h00;
      bytes[0] = "a"; bytes[1] = "b"; bytes[2] = "c"; bytes[3] = 8'h80;
      bytes[56] = 8'd24;
      for (int w = 0; w < 16; w++)
        wr(U_MD5_P, 'h10 + w, {bytes[4*w+3], bytes[4*w+2], bytes[4*w+1], bytes[4*w]});
      wr(U_MD5_P, 'h20, 32'h67452301);
      wr(U_MD5_P, 'h21, 32'hefcdab89);
      wr(U_MD5_P, 'h22, 32'h98badcfe);
      wr(U_MD5_P, 'h23, 32'h10325476);
    end
    wr(U_RC5_KEYXP, 0, 32'd1);
    run(U_MD5_P, cyc);
    expect_latency(U_MD5_P, cyc, 1 + 3 * 64);
    rd(U_RC5_KEYXP, 0, st);
    if (st[1]) n_concurrent++;       // RC5 still busy when MD5 finished
    do begin @(negedge clk); cyc++; rd(U_RC5_KEYXP, 0, st); end while (!st[0]);
    n_ops[U_RC5_KEYXP]++;
    // RC5 was started two cycles (one bus write) before MD5
    expect_latency(U_RC5_KEYXP, cyc + 2, 1 + 9 * 26);
    begin
      logic [31:0] iv [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
      logic [127:0] digest;
      for (int n = 0; n < 4; n++) begin
        logic [31:0] h;
        rd(U_MD5_P, 'h30 + n, v);
        h = v + iv[n];
        digest[127-32*n -: 32] = {h[7:0], h[15:8], h[23:16], h[31:24]};
      end
      checks++;
      if (digest !== 128'h900150983cd24fb0d6963f7d28e17f72) begin
        failures++;
        $display("MD5(abc) = %h", digest);
      end
    end
    begin
      logic [31:0] s [26];
      logic [31:0] A, B;
      for (int k = 0; k < 26; k++) rd(U_RC5_KEYXP, 'h100 + k, s[k]);
      A = s[0];
      B = s[1];
      for (int r = 1; r <= 12; r++) begin
        A = rl(A ^ B, B) + s[2*r];
        B = rl(B ^ A, A) + s[2*r+1];
      end
      check("RC5 A", A, 32'heedba521);
      check("RC5 B", B, 32'h6d8f4b15);
    end

    // ---- DES: first round of the standard worked example
    wr(U_DES_ROUND, 1, 32'hcc00ccff);
    wr(U_DES_ROUND, 2, 32'hf0aaf0aa);
    wr(U_DES_ROUND, 3, 32'h00001b02);
    wr(U_DES_ROUND, 4, 32'heffc7072);
    run(U_DES_ROUND, cyc);
    expect_latency(U_DES_ROUND, cyc, 3);
    rd(U_DES_ROUND, 5, v);
    check("DES L1", v, 32'hf0aaf0aa);
    rd(U_DES_ROUND, 6, v);
    check("DES R1", v, 32'hef4a6544);

    // ---- IDEA
    wr(U_IDEA_MUL, 1, 32'd0);
    wr(U_IDEA_MUL, 2, 32'd0);
    run(U_IDEA_MUL, cyc);
    expect_latency(U_IDEA_MUL, cyc, 4);
    rd(U_IDEA_MUL, 3, v);
    check("IDEA 0*0", v, 32'd1);
    for (int n = 0; n < 20; n++) begin
      logic [15:0] x = 16'($urandom), y = 16'($urandom);
      longint xa = (x == 0) ? 65536 : longint'(x);
      longint ya = (y == 0) ? 65536 : longint'(y);
      longint p = (xa * ya) % 65537;
      wr(U_IDEA_MUL, 1, 32'(x));
      wr(U_IDEA_MUL, 2, 32'(y));
      // done flag from the previous run must clear on this start
      rd(U_IDEA_MUL, 0, st);
      wr(U_IDEA_MUL, 0, 32'd1);
      rd(U_IDEA_MUL, 0, v);
      if (st[0] && !v[0]) n_done_cleared++;
      do begin @(negedge clk); rd(U_IDEA_MUL, 0, v); end while (!v[0]);
      n_ops[U_IDEA_MUL]++;
      rd(U_IDEA_MUL, 3, v);
      check("IDEA mul", v, (p == 65536) ? 32'd0 : 32'(p));
    end

    // ---- every mechanism must have happened
    for (int u = 0; u < NUM_UNITS; u++) begin
      checks++;
      if (n_ops[u] == 0) begin failures++; $display("unit %0d never ran", u); end
      $display("unit %0d operations: %0d", u, n_ops[u]);
    end
    checks++; if (n_busy_start_ignored == 0) begin failures++; $display("no busy start"); end
    checks++; if (n_busy_sbox_write_ignored == 0) begin failures++; $display("no busy S-box write"); end
    checks++; if (n_concurrent == 0) begin failures++; $display("no concurrent run"); end
    checks++; if (n_done_cleared == 0) begin failures++; $display("done flag never cleared"); end
    $display("busy starts ignored %0d, busy S-box writes ignored %0d, concurrent runs %0d, done flags cleared %0d",
             n_busy_start_ignored, n_busy_sbox_write_ignored, n_concurrent, n_done_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
