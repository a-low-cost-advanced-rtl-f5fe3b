// aes_mc_acc: the MixColumns accumulator (MC ACC).
//
// Four 8-bit registers MC0..MC3 with register select and no shifting.  The
// 2-bit `mixctl` selects one register both for writing (`mcrw` high loads
// `d` into it) and for the read port `q`, which feeds muxes A, B and the
// register-file data mux.  Writes take effect at the clock edge; synchronous reset
// clears all four.
module aes_mc_acc (
  input  logic       clk,
  input  logic       rst,
  input  logic       mcrw,
  input  logic [1:0] mixctl,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic [7:0] mc [4];

  always_ff @(posedge clk) begin
    if (rst)       mc <= '{default: 8'h00};
    else if (mcrw) mc[mixctl] <= d;
  end

  assign q = mc[mixctl];
endmodule
