// aes_inv_subbytes: accelerator for the InvSubBytes() hotspot of AES
// decryption. It replaces one byte by its inverse AES S-box entry in one FSM
// state, as the original design describes: the table read is registered on the edge
// that samples start, so done follows start by one cycle. The table is a ROM
// computed at elaboration time as the inverse of the S-box permutation (see
// crypto_pkg); the original design only calls it a prebuilt lookup table.
//
// Interface: start (1-cycle pulse), in_byte -> out_byte, done (1-cycle pulse).
module aes_inv_subbytes
  import crypto_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  byte_t in_byte,
  output byte_t out_byte,
  output logic  done
);
  localparam sbox_t INV_SBOX = gen_aes_inv_sbox();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_byte <= '0;
      done     <= 1'b0;
    end else begin
      done <= start;
      if (start) out_byte <= INV_SBOX[in_byte];
    end
  end
endmodule
