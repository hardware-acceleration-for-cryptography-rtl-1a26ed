// tb_rc5_keyxp: self-checking test of the RC5 key-mixing unit with the
// default RC5-32/12/16 sizes. For each key the host side is modelled here:
// L is loaded from the key bytes (little-endian words), S is initialised
// with S[0] = P32 = b7e15163, S[i] = S[i-1] + Q32 (Q32 = 9e3779b9), the unit
// runs, and S is read back. The expanded table is checked word by word
// against a reference loop written here, and then used to encrypt with
// RC5-32/12, which must reproduce the two published RC5-32/12/16 vectors:
//   key 00..00,                          pt 00000000 00000000 -> ct 21a5dbee 154b8f6d
//   key 915f4619be41b2516355a50110a9ce91, pt 21a5dbee 154b8f6d -> ct f7c013ac 5b2b8952
// (byte strings). Also checks the latency 1 + 9*max(T, C) cycles.
module tb_rc5_keyxp;
  localparam int T = 26;
  localparam int C = 4;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        done, busy;
  logic        s_we = 1'b0, l_we = 1'b0;
  logic [4:0]  s_addr = '0;
  logic [1:0]  l_addr = '0;
  logic [31:0] s_wdata = '0, l_wdata = '0, s_rdata, l_rdata;
  int checks = 0, failures = 0;
  logic [31:0] s_hw [T];

  rc5_keyxp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rl(logic [31:0] v, logic [31:0] n);
    int k = int'(n % 32);
    return (k == 0) ? v : ((v << k) | (v >> (32 - k)));
  endfunction

  task automatic expand(input logic [7:0] key [16], output logic [31:0] s_ref [T]);
    logic [31:0] L [C];
    logic [31:0] A, B;
    int i, j;
    for (int w = 0; w < C; w++) L[w] = {key[4*w+3], key[4*w+2], key[4*w+1], key[4*w]};
    s_ref[0] = 32'hb7e15163;
    for (int k = 1; k < T; k++) s_ref[k] = s_ref[k-1] + 32'h9e3779b9;
    // load the unit
    for (int w = 0; w < C; w++) begin
      @(negedge clk); l_we = 1'b1; l_addr = 2'(w); l_wdata = L[w];
    end
    @(negedge clk); l_we = 1'b0;
    for (int k = 0; k < T; k++) begin
      @(negedge clk); s_we = 1'b1; s_addr = 5'(k); s_wdata = s_ref[k];
    end
    @(negedge clk); s_we = 1'b0;
    // reference mixing
    A = 0; B = 0; i = 0; j = 0;
    for (int n = 0; n < 3 * T; n++) begin
      s_ref[i] = rl(s_ref[i] + A + B, 3);
      A = s_ref[i];
      L[j] = rl(L[j] + A + B, A + B);
      B = L[j];
      i = (i + 1) % T;
      j = (j + 1) % C;
    end
  endtask

  task automatic run_and_check(input logic [7:0] key [16],
                               input logic [63:0] pt, input logic [63:0] ct);
    logic [31:0] s_ref [T];
    logic [31:0] A, B;
    int lat;
    expand(key, s_ref);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1 + 9 * T) begin failures++; $display("latency %0d, expected %0d", lat, 1 + 9 * T); end
    for (int k = 0; k < T; k++) begin
      s_addr = 5'(k);
      #1;
      s_hw[k] = s_rdata;
      checks++;
      if (s_rdata !== s_ref[k]) begin
        failures++;
        $display("S[%0d] = %h, expected %h", k, s_rdata, s_ref[k]);
      end
    end
    // RC5-32/12 encryption with the table read back from the unit
    A = {pt[39:32], pt[47:40], pt[55:48], pt[63:56]} + s_hw[0];
    B = {pt[7:0], pt[15:8], pt[23:16], pt[31:24]} + s_hw[1];
    for (int r = 1; r <= 12; r++) begin
      A = rl(A ^ B, B) + s_hw[2*r];
      B = rl(B ^ A, A) + s_hw[2*r+1];
    end
    checks++;
    if ({A[7:0], A[15:8], A[23:16], A[31:24], B[7:0], B[15:8], B[23:16], B[31:24]} !== ct) begin
      failures++;
      $display("ciphertext %h %h, expected %h", A, B, ct);
    end
  endtask

  initial begin
    logic [7:0] key0 [16];
    logic [7:0] key1 [16] = '{8'h91, 8'h5f, 8'h46, 8'h19, 8'hbe, 8'h41, 8'hb2, 8'h51,
                              8'h63, 8'h55, 8'ha5, 8'h01, 8'h10, 8'ha9, 8'hce, 8'h91};
    logic [7:0] keyr [16];
    foreach (key0[i]) key0[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_and_check(key0, 64'h0000000000000000, 64'h21a5dbee154b8f6d);
    run_and_check(key1, 64'h21a5dbee154b8f6d, 64'hf7c013ac5b2b8952);
    // random key: table compared with the reference loop only
    foreach (keyr[i]) keyr[i] = 8'($urandom);
    begin
      logic [31:0] s_ref [T];
      expand(keyr, s_ref);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!done) @(negedge clk);
      for (int k = 0; k < T; k++) begin
        s_addr = 5'(k);
        #1;
        checks++;
        if (s_rdata !== s_ref[k]) begin failures++; $display("random key S[%0d] wrong", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
