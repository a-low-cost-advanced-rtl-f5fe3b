// aes_working_register: the 8-bit Working Register (WR).
//
// A byte register at the output mux, used as scratch during key expansion
// and MixColumns.  With `wrrw` high it loads `d` (parallel write); with
// `wrrw` and `sh` high it shifts one place towards the MSB, dropping bit 7
// and filling bit 0 with 0, which is the shift half of multiplication by x
// in GF(2^8) (ModFlag captures the dropped bit in the same cycle).  The
// output `q` is always visible (parallel read).  Synchronous reset to 00.
module aes_working_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       wrrw,
  input  logic       sh,
  input  logic [7:0] d,
  output logic [7:0] q
);
  always_ff @(posedge clk) begin
    if (rst)            q <= 8'h00;
    else if (wrrw && sh) q <= {q[6:0], 1'b0};
    else if (wrrw)      q <= d;
  end
endmodule
