// aes_inv_sbox: AES inverse S-Box as a 256-entry lookup table (InvSubBytes).
//
// Sits beside the S-Box on the register file's read port and is selected by
// the output mux for decryption.  Combinational: out = S^-1(in).  The table
// is built at elaboration by inverting the S-Box permutation (entry S(a)
// holds a), so it needs no data file.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  logic [7:0] in,
  output logic [7:0] out
);
  typedef logic [7:0] table_t [256];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 256; a++) t[sbox_value(8'(a))] = 8'(a);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign out = TABLE[in];
endmodule
