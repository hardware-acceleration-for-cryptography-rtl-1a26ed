// tb_blowfish_f: self-checking test of the Blowfish F() unit. The four
// S-boxes are filled with random words through the write port (a copy is
// kept here), then random inputs are checked against
// ((S0[a] + S1[b]) ^ S2[c]) + S3[d] and the three-cycle latency. The tables
// are then rewritten once and checked again.
module tb_blowfish_f;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] x = '0;
  logic [31:0] f_out;
  logic        done, busy;
  logic        sb_we = 1'b0;
  logic [1:0]  sb_sel = '0;
  logic [7:0]  sb_addr = '0;
  logic [31:0] sb_wdata = '0;
  int checks = 0, failures = 0;
  logic [31:0] model [4][256];

  blowfish_f dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill();
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        model[t][i] = $urandom;
        sb_we = 1'b1; sb_sel = 2'(t); sb_addr = 8'(i); sb_wdata = model[t][i];
      end
    @(negedge clk);
    sb_we = 1'b0;
  endtask

  task automatic run(input logic [31:0] v);
    int lat;
    logic [31:0] expected;
    expected = ((model[0][v[31:24]] + model[1][v[23:16]]) ^ model[2][v[15:8]])
               + model[3][v[7:0]];
    @(negedge clk);
    x = v; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("latency %0d, expected 3", lat); end
    checks++;
    if (f_out !== expected) begin
      failures++;
      $display("F(%h) = %h, expected %h", v, f_out, expected);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fill();
    for (int i = 0; i < 300; i++) run($urandom);
    fill();
    for (int i = 0; i < 100; i++) run($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
