// aes_byte_mux: the byte-wide steering logic of the co-processor datapath.
//
// Mux A (RD, WR, MC ACC, constant 00) and mux B (WR, MC ACC, ModFlag,
// Rcon) feed the single 8-bit XOR gate.  The output mux picks the XOR
// result, the S-Box output, the inverse S-Box output or RD; its result is
// what the working register and the MixColumns accumulator load.  The data
// mux picks the register-file write data: ByteIn, WR, MC ACC or the output
// mux.  Purely combinational; the selects come from the output ROM.  The
// input lists follow the co-processor's block diagram and text; mux A's WR
// input and the code of each input are read from the instruction table.
module aes_byte_mux
  import aes_pkg::*;
(
  input  muxa_e      muxa,
  input  muxb_e      muxb,
  input  outmux_e    outmux,
  input  datamux_e   datamux,
  input  logic [7:0] rd,
  input  logic [7:0] wr,
  input  logic [7:0] mc,
  input  logic [7:0] modbyte,
  input  logic [7:0] rcon,
  input  logic [7:0] sbox,
  input  logic [7:0] isbox,
  input  logic [7:0] byte_in,
  output logic [7:0] out,     // output mux
  output logic [7:0] wd       // register-file write data
);
  logic [7:0] a, b, x;

  always_comb begin
    case (muxa)
      MUXA_RD: a = rd;
      MUXA_WR: a = wr;
      MUXA_MC: a = mc;
      default: a = 8'h00;
    endcase
    case (muxb)
      MUXB_WR:  b = wr;
      MUXB_MC:  b = mc;
      MUXB_MOD: b = modbyte;
      default:  b = rcon;
    endcase
    x = a ^ b;
    case (outmux)
      OUT_XOR:     out = x;
      OUT_SBOX:    out = sbox;
      OUT_INVSBOX: out = isbox;
      default:     out = rd;
    endcase
    case (datamux)
      DATA_BYTEIN: wd = byte_in;
      DATA_WR:     wd = wr;
      DATA_MC:     wd = mc;
      default:     wd = out;
    endcase
  end
endmodule
