// aes_rcon_lut: the 10-term round-constant table of the key expansion.
//
// Holds Rcon[1..10] = 01,02,04,08,10,20,40,80,1b,36 (successive powers of x
// in GF(2^8)) and an index register that selects the current entry.  The
// index is cleared by the synchronous reset or by `clr` (start of a key
// expansion) and advances by one on each `adv` pulse, which the controller
// raises in the same cycle the constant is XORed into the key word, so the
// next transformed word sees the next constant.  `rcon` is combinational
// from the index.  Ten terms cover all bit modes (AES-128 uses 10, AES-192
// 8 and AES-256 7); the index saturates at the last entry.
module aes_rcon_lut #(
  parameter int unsigned TERMS = 10
) (
  input  logic       clk,
  input  logic       rst,    // synchronous reset (RN)
  input  logic       clr,    // restart at Rcon[1]
  input  logic       adv,    // step to the next constant
  output logic [7:0] rcon
);
  logic [3:0] idx;

  always_ff @(posedge clk) begin
    if (rst || clr)                    idx <= '0;
    else if (adv && idx < 4'(TERMS-1)) idx <= idx + 4'd1;
  end

  always_comb begin
    case (idx)
      4'd0:    rcon = 8'h01;
      4'd1:    rcon = 8'h02;
      4'd2:    rcon = 8'h04;
      4'd3:    rcon = 8'h08;
      4'd4:    rcon = 8'h10;
      4'd5:    rcon = 8'h20;
      4'd6:    rcon = 8'h40;
      4'd7:    rcon = 8'h80;
      4'd8:    rcon = 8'h1b;
      default: rcon = 8'h36;
    endcase
  end
endmodule
