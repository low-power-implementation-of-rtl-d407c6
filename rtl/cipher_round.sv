// cipher_round: one AES-128 encryption round, purely combinational.
//
// out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state))), round_key).
// With LAST = 1 MixColumns is left out, as in the tenth round of AES. The 16
// S-boxes are ROM lookups into the table computed in aes_pkg. The round is the
// "CipherRound" of the core; the pipeline register that follows it lives in
// aes_core, so this module has no clock and no latency of its own.
//
// Ports: state (128 bits in), round_key (128 bits), result (128 bits out).
module cipher_round
  import aes_pkg::*;
#(
  parameter bit LAST = 1'b0   // 1: final round, no MixColumns
) (
  input  block_t state,
  input  block_t round_key,
  output block_t result
);

  block_t after_sr;

  always_comb begin
    after_sr = shift_rows(sub_bytes(state));
    result   = (LAST ? after_sr : mix_columns(after_sr)) ^ round_key;
  end

endmodule
