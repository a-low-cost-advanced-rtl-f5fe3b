// aes_register_file: the 256-byte register file (RF) of the co-processor.
//
// One address space of 256 bytes, read and written one byte at a time:
//   0..15    State RF     - the 4x4 state, byte (row r, column c) at 4c + r
//   16..47   Key RF       - the first 16/24/32 bytes of the expanded key
//   48..255  RoundKey RF  - the remaining 208 bytes of the expanded key
// so expanded-key word i lives at bytes 16+4i .. 19+4i and round key k
// occupies the 16-byte block k+1.  The State RF is built as four rows of four
// byte registers connected as rotating shift registers: with `we` high and
// `shiftctl` = n (1..3), row n moves one byte to the left (column c takes
// column c+1, column 0 wraps to column 3), so ShiftRows and InvShiftRows are
// done in place by repeating single-byte rotations.  With `shiftctl` = 0, `we`
// writes `wd` to `addr`.  The read port `rd` is combinational from `addr`.
// Writes and rotations take effect at the rising edge; the synchronous
// reset clears every byte.
module aes_register_file #(
  parameter int unsigned BYTES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] addr,
  input  logic       we,
  input  logic [7:0] wd,
  input  logic [1:0] shiftctl,
  output logic [7:0] rd
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (rst) begin
      mem <= '{default: 8'h00};
    end else if (we && shiftctl != 2'd0) begin
      for (int c = 0; c < 4; c++)
        mem[4*c + int'(shiftctl)] <= mem[4*((c+1)%4) + int'(shiftctl)];
    end else if (we) begin
      mem[addr] <= wd;
    end
  end

  assign rd = mem[addr];
endmodule
