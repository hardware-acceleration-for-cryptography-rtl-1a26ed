// tb_aes_inv_mixcolumns: self-checking test of the InvMixColumns unit.
// Checks the published MixColumns test columns in reverse (FIPS-197 / the
// usual test vectors: db135345 <-> 8e4da1bc, f20a225c <-> 9fdc589d, and the
// fixed points 01010101, c6c6c6c6), then random columns against the matrix
// product with coefficients 0e 0b 0d 09 computed here by shift-and-add
// multiplication, and the six-cycle latency of every operation.
module tb_aes_inv_mixcolumns;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] col_in = '0;
  logic [31:0] col_out;
  logic        done, busy;
  int checks = 0, failures = 0;

  aes_inv_mixcolumns dut (.*);

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
    for (int i = 0; i < 8; i++) if ((b >> i) & 1) p ^= a << i;
    for (int i = 14; i >= 8; i--) if ((p >> i) & 1) p ^= 'h11b << (i - 8);
    return p;
  endfunction

  function automatic logic [31:0] ref_imc(logic [31:0] c);
    int a [4];
    int coef [4] = '{'h0e, 'h0b, 'h0d, 'h09};
    logic [31:0] r;
    for (int i = 0; i < 4; i++) a[i] = int'(c[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) begin
      int acc = 0;
      for (int j = 0; j < 4; j++) acc ^= gmul(a[(i+j)%4], coef[j]);
      r[31-8*i -: 8] = 8'(acc);
    end
    return r;
  endfunction

  task automatic run(input logic [31:0] c, input logic [31:0] expected);
    int lat;
    @(negedge clk);
    col_in = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("latency %0d, expected 6", lat); end
    checks++;
    if (col_out !== expected) begin
      failures++;
      $display("InvMixColumns(%h) = %h, expected %h", c, col_out, expected);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'h8e4da1bc, 32'hdb135345);
    run(32'h9fdc589d, 32'hf20a225c);
    run(32'h01010101, 32'h01010101);
    run(32'hc6c6c6c6, 32'hc6c6c6c6);
    checks++;
    if (ref_imc(32'h8e4da1bc) != 32'hdb135345) begin failures++; $display("reference model wrong"); end
    for (int i = 0; i < 200; i++) begin
      logic [31:0] c = $urandom;
      run(c, ref_imc(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
