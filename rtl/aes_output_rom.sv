// aes_output_rom: decodes the 5-bit OutCode into the datapath control word.
//
// One row per microinstruction, 20 control bits per row in the column order
// of ctrl_t (PCRW, RFRW, MCRW, ModRW, WRRW, SH, RCON, MuxA, MuxB, DataMux,
// OutMux, MixCtl, ShiftCtl, StoreMux).  Rows 0-28 reproduce the
// co-processor's instruction table; rows 29 (XORWR: WR <= RD ^ WR) and 30
// (XORST: RF <= RD ^ WR) are this design's additions, which AddRoundKey,
// MixColumns and InvMixColumns need; row 31 is a NoOp.  Combinational.
module aes_output_rom
  import aes_pkg::*;
(
  input  logic [4:0] outcode,
  output ctrl_t      ctrl
);
  // bits: PCRW RFRW MCRW ModRW WRRW SH RCON MuxA MuxB DataMux OutMux MixCtl ShiftCtl StoreMux
  always_comb begin
    case (outcode)
      5'd0:  ctrl = 20'b0_0_0_0_0_0_0_00_00_00_00_00_00_0;  // NoOp
      5'd1:  ctrl = 20'b0_1_0_0_0_0_0_00_00_00_00_00_00_0;  // LB
      5'd2:  ctrl = 20'b0_0_0_0_0_0_0_00_00_00_00_00_00_1;  // SB
      5'd3:  ctrl = 20'b0_0_0_0_1_0_0_00_00_00_11_00_00_0;  // LWR
      5'd4:  ctrl = 20'b0_1_0_0_0_0_0_00_00_00_00_00_01_0;  // SHROW1
      5'd5:  ctrl = 20'b0_1_0_0_0_0_0_00_00_00_00_00_10_0;  // SHROW2
      5'd6:  ctrl = 20'b0_1_0_0_0_0_0_00_00_00_00_00_11_0;  // SHROW3
      5'd7:  ctrl = 20'b0_0_1_0_0_0_1_10_11_00_00_00_00_0;  // XORRCONMC0
      5'd8:  ctrl = 20'b0_1_0_0_0_0_0_00_00_11_01_00_00_0;  // SBX
      5'd9:  ctrl = 20'b0_1_0_0_0_0_0_00_00_11_10_00_00_0;  // ISBX
      5'd10: ctrl = 20'b0_0_0_1_1_1_0_00_00_00_00_00_00_0;  // MODSH
      5'd11: ctrl = 20'b0_0_0_0_1_0_0_01_10_00_00_00_00_0;  // XORMOD
      5'd12: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_11_00_00_0;  // LMC0
      5'd13: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_11_01_00_0;  // LMC1
      5'd14: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_11_10_00_0;  // LMC2
      5'd15: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_11_11_00_0;  // LMC3
      5'd16: ctrl = 20'b0_1_0_0_0_0_0_00_00_10_00_00_00_0;  // SMC0
      5'd17: ctrl = 20'b0_1_0_0_0_0_0_00_00_10_00_01_00_0;  // SMC1
      5'd18: ctrl = 20'b0_1_0_0_0_0_0_00_00_10_00_10_00_0;  // SMC2
      5'd19: ctrl = 20'b0_1_0_0_0_0_0_00_00_10_00_11_00_0;  // SMC3
      5'd20: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_01_00_00_0;  // SBXMC0
      5'd21: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_01_01_00_0;  // SBXMC1
      5'd22: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_01_10_00_0;  // SBXMC2
      5'd23: ctrl = 20'b0_0_1_0_0_0_0_00_00_00_01_11_00_0;  // SBXMC3
      5'd24: ctrl = 20'b0_0_1_0_0_0_0_01_01_00_00_00_00_0;  // XORWRMC0
      5'd25: ctrl = 20'b0_0_1_0_0_0_0_01_01_00_00_01_00_0;  // XORWRMC1
      5'd26: ctrl = 20'b0_0_1_0_0_0_0_01_01_00_00_10_00_0;  // XORWRMC2
      5'd27: ctrl = 20'b0_0_1_0_0_0_0_01_01_00_00_11_00_0;  // XORWRMC3
      5'd28: ctrl = 20'b1_0_0_0_0_0_0_00_00_00_00_00_00_0;  // Loop
      5'd29: ctrl = 20'b0_0_0_0_1_0_0_00_00_00_00_00_00_0;  // XORWR (added)
      5'd30: ctrl = 20'b0_1_0_0_0_0_0_00_00_11_00_00_00_0;  // XORST (added)
      default: ctrl = 20'b0;                                 // reserved: NoOp
    endcase
  end
endmodule
