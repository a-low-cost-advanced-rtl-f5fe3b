// aes_sbox: AES S-Box as a 256-entry lookup table (SubBytes).
//
// The co-processor applies SubBytes with a plain table lookup on the byte the
// register file is reading, rather than computing the field inverse on the
// fly.  The table is purely combinational: out = S(in) in the same cycle.
// Its 256 entries are computed at elaboration from the FIPS-197 definition
// (multiplicative inverse in GF(2^8) followed by the affine transform of
// eq. 1), so no data file is needed; a synthesis tool sees a constant ROM.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] in,
  output logic [7:0] out
);
  typedef logic [7:0] table_t [256];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 256; a++) t[a] = sbox_value(8'(a));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign out = TABLE[in];
endmodule
