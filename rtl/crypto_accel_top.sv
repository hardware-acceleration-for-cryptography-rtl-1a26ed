// crypto_accel_top: the hotspot accelerators of nine cryptographic
// algorithms behind one memory-mapped register slave, the way they are
// attached to the soft processor's bus. The processor runs each algorithm in
// software and hands only the hotspot function or hot-block to its unit:
//
//   unit 0  rsa_power           Power() of RSA            1 state
//   unit 1  aes_subbytes        SubBytes(), AES encrypt   1 state
//   unit 2  aes_subbytes        SubBytes(), AES decrypt   1 state
//   unit 3  aes_inv_subbytes    InvSubBytes()             1 state
//   unit 4  aes_inv_mixcolumns  InvMixColumns()           6 states
//   unit 5  blowfish_f          F() of Blowfish           3 states
//   unit 6  rc5_keyxp           KEYXP_RC5 key mixing      3 states/iteration
//   unit 7  des_round           ROUND_3DES                3 states
//   unit 8  md5_p               P_MD5, 4 step modules     2 states/step
//   unit 9  idea_mul            MUL_IDEA                  4 states
//
// The units work independently and can run at the same time.
//
// Register port: a simple single-cycle slave standing in for the bus
// attachment, which the original design only names. bus_addr is a word address;
// bits [15:12] select the unit (crypto_pkg::unit_e), bits [11:0] the
// register. Writes take effect on the clock edge with bus_we high; reads are
// combinational (bus_rdata follows bus_addr in the same cycle).
//
// Every unit, offset 0x000:
//   write: bit 0 = start the unit (ignored while the unit is busy)
//   read : bit 0 = done (sticky, cleared by the next start), bit 1 = busy
// Unit registers (R = read, W = write, RW = both):
//   RSA      0x001 W value, 0x002 W amount[4:0], 0x003 R result
//   SubBytes, InvSubBytes
//            0x001 W input byte, 0x002 R output byte
//   InvMix   0x001 W column (row 0 in [31:24]), 0x002 R result column
//   Blowfish 0x001 W x, 0x002 R F(x),
//            0x400 + 256*t + i  W S-box t, entry i
//   RC5      0x100 + i RW S[i], 0x200 + j RW L[j]
//   DES      0x001 W L, 0x002 W R, 0x003 W subkey[47:32], 0x004 W
//            subkey[31:0], 0x005 R L', 0x006 R R'
//   MD5      0x010 + k W X[k], 0x020 + n W chain a,b,c,d in,
//            0x030 + n R a,b,c,d after the 64 steps
//   IDEA     0x001 W a, 0x002 W b, 0x003 R a (*) b
// Operand registers reset to zero; the S-box and RC5 tables do not reset.
module crypto_accel_top
  import crypto_pkg::*;
#(
  parameter int unsigned RC5_T = 26,   // expanded key table words, 2*(rounds+1)
  parameter int unsigned RC5_C = 4     // secret key words
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] bus_addr,
  input  logic        bus_we,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata
);
  unit_e       unit;
  logic [11:0] off;
  assign unit = unit_e'(bus_addr[15:12]);
  assign off  = bus_addr[11:0];

  function automatic logic wr(unit_e u, logic [11:0] o);
    return bus_we && unit == u && off == o;
  endfunction

  logic [NUM_UNITS-1:0] start, done, busy, done_flag;

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_ctrl
    assign start[u] = bus_we && bus_addr[15:12] == 4'(u) && off == 12'h000
                      && bus_wdata[0] && !busy[u];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        done_flag[u] <= 1'b0;
      else if (start[u]) done_flag[u] <= 1'b0;
      else if (done[u])  done_flag[u] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- RSA
  logic [31:0] rsa_value, rsa_result;
  logic [4:0]  rsa_amount;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsa_value  <= '0;
      rsa_amount <= '0;
    end else begin
      if (wr(U_RSA_POWER, 12'h001)) rsa_value  <= bus_wdata;
      if (wr(U_RSA_POWER, 12'h002)) rsa_amount <= bus_wdata[4:0];
    end
  end
  rsa_power u_rsa_power (
    .clk, .rst_n, .start(start[U_RSA_POWER]), .value(rsa_value),
    .amount(rsa_amount), .result(rsa_result), .done(done[U_RSA_POWER]));
  assign busy[U_RSA_POWER] = 1'b0;

  // ---------------------------------------------------------------- AES byte units
  byte_t subenc_in, subenc_out, subdec_in, subdec_out, invsub_in, invsub_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      subenc_in <= '0;
      subdec_in <= '0;
      invsub_in <= '0;
    end else begin
      if (wr(U_SUBB_ENC, 12'h001)) subenc_in <= bus_wdata[7:0];
      if (wr(U_SUBB_DEC, 12'h001)) subdec_in <= bus_wdata[7:0];
      if (wr(U_INV_SUBB, 12'h001)) invsub_in <= bus_wdata[7:0];
    end
  end
  aes_subbytes u_subbytes_enc (
    .clk, .rst_n, .start(start[U_SUBB_ENC]), .in_byte(subenc_in),
    .out_byte(subenc_out), .done(done[U_SUBB_ENC]));
  aes_subbytes u_subbytes_dec (
    .clk, .rst_n, .start(start[U_SUBB_DEC]), .in_byte(subdec_in),
    .out_byte(subdec_out), .done(done[U_SUBB_DEC]));
  aes_inv_subbytes u_inv_subbytes (
    .clk, .rst_n, .start(start[U_INV_SUBB]), .in_byte(invsub_in),
    .out_byte(invsub_out), .done(done[U_INV_SUBB]));
  assign busy[U_SUBB_ENC] = 1'b0;
  assign busy[U_SUBB_DEC] = 1'b0;
  assign busy[U_INV_SUBB] = 1'b0;

  // ---------------------------------------------------------------- InvMixColumns
  word_t imc_in, imc_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) imc_in <= '0;
    else if (wr(U_INV_MIXCOL, 12'h001)) imc_in <= bus_wdata;
  end
  aes_inv_mixcolumns u_inv_mixcolumns (
    .clk, .rst_n, .start(start[U_INV_MIXCOL]), .col_in(imc_in),
    .col_out(imc_out), .done(done[U_INV_MIXCOL]), .busy(busy[U_INV_MIXCOL]));

  // ---------------------------------------------------------------- Blowfish
  word_t bf_x, bf_f;
  logic  bf_sb_we;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bf_x <= '0;
    else if (wr(U_BLOWFISH_F, 12'h001)) bf_x <= bus_wdata;
  end
  assign bf_sb_we = bus_we && unit == U_BLOWFISH_F && off[11:10] == 2'b01
                    && !busy[U_BLOWFISH_F];
  blowfish_f u_blowfish_f (
    .clk, .rst_n, .start(start[U_BLOWFISH_F]), .x(bf_x), .f_out(bf_f),
    .done(done[U_BLOWFISH_F]), .busy(busy[U_BLOWFISH_F]),
    .sb_we(bf_sb_we), .sb_sel(off[9:8]), .sb_addr(off[7:0]), .sb_wdata(bus_wdata));

  // ---------------------------------------------------------------- RC5
  localparam int unsigned TW = $clog2(RC5_T);
  localparam int unsigned CW = $clog2(RC5_C);
  word_t rc5_s_rdata, rc5_l_rdata;
  logic  rc5_s_we, rc5_l_we;
  assign rc5_s_we = bus_we && unit == U_RC5_KEYXP && off[11:8] == 4'h1
                    && 32'(off[7:0]) < RC5_T;
  assign rc5_l_we = bus_we && unit == U_RC5_KEYXP && off[11:8] == 4'h2
                    && 32'(off[7:0]) < RC5_C;
  rc5_keyxp #(.T(RC5_T), .C(RC5_C)) u_rc5_keyxp (
    .clk, .rst_n, .start(start[U_RC5_KEYXP]), .done(done[U_RC5_KEYXP]),
    .busy(busy[U_RC5_KEYXP]),
    .s_we(rc5_s_we), .s_addr(off[TW-1:0]), .s_wdata(bus_wdata), .s_rdata(rc5_s_rdata),
    .l_we(rc5_l_we), .l_addr(off[CW-1:0]), .l_wdata(bus_wdata), .l_rdata(rc5_l_rdata));

  // ---------------------------------------------------------------- DES
  word_t       des_l, des_r, des_l_out, des_r_out;
  logic [47:0] des_k;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      des_l <= '0;
      des_r <= '0;
      des_k <= '0;
    end else begin
      if (wr(U_DES_ROUND, 12'h001)) des_l <= bus_wdata;
      if (wr(U_DES_ROUND, 12'h002)) des_r <= bus_wdata;
      if (wr(U_DES_ROUND, 12'h003)) des_k[47:32] <= bus_wdata[15:0];
      if (wr(U_DES_ROUND, 12'h004)) des_k[31:0]  <= bus_wdata;
    end
  end
  des_round u_des_round (
    .clk, .rst_n, .start(start[U_DES_ROUND]), .l_in(des_l), .r_in(des_r),
    .subkey(des_k), .l_out(des_l_out), .r_out(des_r_out),
    .done(done[U_DES_ROUND]), .busy(busy[U_DES_ROUND]));

  // ---------------------------------------------------------------- MD5
  word_t md5_x [16];
  word_t md5_cin [4];
  word_t md5_cout [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) md5_x[i] <= '0;
      for (int i = 0; i < 4; i++)  md5_cin[i] <= '0;
    end else if (bus_we && unit == U_MD5_P && !busy[U_MD5_P]) begin
      if (off[11:4] == 8'h01) md5_x[off[3:0]] <= bus_wdata;
      if (off[11:2] == 10'h008) md5_cin[off[1:0]] <= bus_wdata;
    end
  end
  md5_p u_md5_p (
    .clk, .rst_n, .start(start[U_MD5_P]), .chain_in(md5_cin), .block(md5_x),
    .chain_out(md5_cout), .done(done[U_MD5_P]), .busy(busy[U_MD5_P]));

  // ---------------------------------------------------------------- IDEA
  logic [15:0] idea_a, idea_b, idea_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idea_a <= '0;
      idea_b <= '0;
    end else begin
      if (wr(U_IDEA_MUL, 12'h001)) idea_a <= bus_wdata[15:0];
      if (wr(U_IDEA_MUL, 12'h002)) idea_b <= bus_wdata[15:0];
    end
  end
  idea_mul u_idea_mul (
    .clk, .rst_n, .start(start[U_IDEA_MUL]), .a(idea_a), .b(idea_b),
    .result(idea_r), .done(done[U_IDEA_MUL]), .busy(busy[U_IDEA_MUL]));

  // ---------------------------------------------------------------- read mux
  always_comb begin
    bus_rdata = '0;
    if (32'(bus_addr[15:12]) < NUM_UNITS && off == 12'h000)
      bus_rdata = {30'd0, busy[bus_addr[15:12]], done_flag[bus_addr[15:12]]};
    else begin
      unique case (unit)
        U_RSA_POWER:  if (off == 12'h003) bus_rdata = rsa_result;
        U_SUBB_ENC:   if (off == 12'h002) bus_rdata = {24'd0, subenc_out};
        U_SUBB_DEC:   if (off == 12'h002) bus_rdata = {24'd0, subdec_out};
        U_INV_SUBB:   if (off == 12'h002) bus_rdata = {24'd0, invsub_out};
        U_INV_MIXCOL: if (off == 12'h002) bus_rdata = imc_out;
        U_BLOWFISH_F: if (off == 12'h002) bus_rdata = bf_f;
        U_RC5_KEYXP: begin
          if (off[11:8] == 4'h1) bus_rdata = rc5_s_rdata;
          if (off[11:8] == 4'h2) bus_rdata = rc5_l_rdata;
        end
        U_DES_ROUND: begin
          if (off == 12'h005) bus_rdata = des_l_out;
          if (off == 12'h006) bus_rdata = des_r_out;
        end
        U_MD5_P:      if (off[11:2] == 10'h00c) bus_rdata = md5_cout[off[1:0]];
        U_IDEA_MUL:   if (off == 12'h003) bus_rdata = {16'd0, idea_r};
        default:      bus_rdata = '0;
      endcase
    end
  end
endmodule
