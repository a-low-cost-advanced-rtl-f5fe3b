// aes_modflag: the ModFlag block of the MixColumns multiply-by-x step.
//
// With `modrw` high it stores bit 7 of the working register (sampled before
// the register shifts in the same cycle).  Its output is the byte the
// conditional XOR needs: 1b (the reduction polynomial x^8+x^4+x^3+x+1 without
// its top term) when the stored bit is 1, otherwise 00.
// Synchronous reset clears it.
module aes_modflag (
  input  logic       clk,
  input  logic       rst,
  input  logic       modrw,
  input  logic       msb,
  output logic [7:0] modbyte
);
  logic flag;

  always_ff @(posedge clk) begin
    if (rst)        flag <= 1'b0;
    else if (modrw) flag <= msb;
  end

  assign modbyte = flag ? 8'h1b : 8'h00;
endmodule
