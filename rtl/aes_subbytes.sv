// aes_subbytes: accelerator for the SubBytes() hotspot, used by both AES
// encryption and AES decryption (key expansion). It replaces one byte by its
// AES S-box entry. As in the original design this is a single FSM state: one table
// read, registered on the edge that samples start, so done follows start by
// one cycle. The 256-entry table is a ROM computed at elaboration time from
// the S-box definition (see crypto_pkg); the original design keeps it in a
// prebuilt lookup table, whose form is not specified.
//
// Interface: start (1-cycle pulse), in_byte -> out_byte, done (1-cycle pulse).
module aes_subbytes
  import crypto_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  byte_t in_byte,
  output byte_t out_byte,
  output logic  done
);
  localparam sbox_t SBOX = gen_aes_sbox();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_byte <= '0;
      done     <= 1'b0;
    end else begin
      done <= start;
      if (start) out_byte <= SBOX[in_byte];
    end
  end
endmodule
