// aes_byte_rom: byte-level microprogram ROM of the multi-staged controller.
//
// 256 words of 10 bits {OutCode, ByteCtl, ByteCntIncr, ByteCntRN, ByteDone}
// (field widths as in the co-processor's microinstruction format).  Each word
// is one datapath microinstruction, issued in one clock.  ByteCtl selects how
// the register-file address is formed (State, W, W+Nk-1 or W+Nk, see
// aes_pkg); ByteCntIncr steps the 2-bit byte counter after the word;
// ByteDone ends the routine and returns to the column level.  The routines
// (one per label below) are this design's own microprogram, written for the
// instruction set of aes_output_rom.  Combinational read; unused words are
// NoOp/done.
module aes_byte_rom
  import aes_pkg::*;
(
  input  logic [7:0] addr,
  output byte_word_t word
);
  always_comb begin
    case (addr)
      // B_NOP: do nothing, clear ByteCnt
      8'd0: word = {OP_NOOP, AM_STATE, 1'b0, 1'b1, 1'b1};
      // B_LBS: load one State column from ByteIn
      8'd1: word = {OP_LB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd2: word = {OP_LB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd3: word = {OP_LB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd4: word = {OP_LB, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_LBW: load one key word from ByteIn at W
      8'd5: word = {OP_LB, AM_W, 1'b1, 1'b0, 1'b0};
      8'd6: word = {OP_LB, AM_W, 1'b1, 1'b0, 1'b0};
      8'd7: word = {OP_LB, AM_W, 1'b1, 1'b0, 1'b0};
      8'd8: word = {OP_LB, AM_W, 1'b1, 1'b0, 1'b1};
      // B_SBX: SubBytes on one State column
      8'd9: word = {OP_SBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd10: word = {OP_SBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd11: word = {OP_SBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd12: word = {OP_SBX, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_ISBX: InvSubBytes on one State column
      8'd13: word = {OP_ISBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd14: word = {OP_ISBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd15: word = {OP_ISBX, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd16: word = {OP_ISBX, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_SR: ShiftRows: rotate row r left r times
      8'd17: word = {OP_SHROW1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd18: word = {OP_SHROW2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd19: word = {OP_SHROW2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd20: word = {OP_SHROW3, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd21: word = {OP_SHROW3, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd22: word = {OP_SHROW3, AM_STATE, 1'b0, 1'b0, 1'b1};
      // B_ISR: InvShiftRows: rotate row r left 4-r times
      8'd23: word = {OP_SHROW1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd24: word = {OP_SHROW1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd25: word = {OP_SHROW1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd26: word = {OP_SHROW2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd27: word = {OP_SHROW2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd28: word = {OP_SHROW3, AM_STATE, 1'b0, 1'b0, 1'b1};
      // B_ARK: AddRoundKey on one column: WR <= key byte, State ^= WR
      8'd29: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd30: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd31: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd32: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd33: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd34: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd35: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd36: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_MIX: MixColumns on one column: s'i = si ^ t ^ xtime(si ^ si+1)
      8'd37: word = {OP_LMC0, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd38: word = {OP_LMC1, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd39: word = {OP_LMC2, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd40: word = {OP_LMC3, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd41: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd42: word = {OP_XORWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd43: word = {OP_XORWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd44: word = {OP_XORWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd45: word = {OP_XORWRMC0, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd46: word = {OP_XORWRMC1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd47: word = {OP_XORWRMC2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd48: word = {OP_XORWRMC3, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd49: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd50: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd51: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd52: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd53: word = {OP_XORWRMC0, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd54: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd55: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd56: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd57: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd58: word = {OP_XORWRMC1, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd59: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd60: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd61: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd62: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd63: word = {OP_XORWRMC2, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd64: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd65: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd66: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd67: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd68: word = {OP_XORWRMC3, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd69: word = {OP_SMC0, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd70: word = {OP_SMC1, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd71: word = {OP_SMC2, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd72: word = {OP_SMC3, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_IMIXPRE: InvMixColumns pre-step: s0,s2 ^= 4(s0^s2); s1,s3 ^= 4(s1^s3)
      8'd73: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd74: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd75: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd76: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd77: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd78: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd79: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd80: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd81: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd82: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd83: word = {OP_LWR, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd84: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd85: word = {OP_XORWR, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd86: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd87: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd88: word = {OP_MODSH, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd89: word = {OP_XORMOD, AM_STATE, 1'b0, 1'b0, 1'b0};
      8'd90: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd91: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd92: word = {OP_XORST, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd93: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd94: word = {OP_NOOP, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_SUBROT: MC <= SubWord(RotWord(w[i-1])) ^ Rcon
      8'd95: word = {OP_SBXMC3, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd96: word = {OP_SBXMC0, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd97: word = {OP_SBXMC1, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd98: word = {OP_SBXMC2, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd99: word = {OP_XORRCONMC0, AM_WNKM1, 1'b0, 1'b0, 1'b1};
      // B_SUB: MC <= SubWord(w[i-1])
      8'd100: word = {OP_SBXMC0, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd101: word = {OP_SBXMC1, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd102: word = {OP_SBXMC2, AM_WNKM1, 1'b1, 1'b0, 1'b0};
      8'd103: word = {OP_SBXMC3, AM_WNKM1, 1'b1, 1'b0, 1'b1};
      // B_KACC: MC ^= w[i-Nk]
      8'd104: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd105: word = {OP_XORWRMC0, AM_W, 1'b1, 1'b0, 1'b0};
      8'd106: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd107: word = {OP_XORWRMC1, AM_W, 1'b1, 1'b0, 1'b0};
      8'd108: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd109: word = {OP_XORWRMC2, AM_W, 1'b1, 1'b0, 1'b0};
      8'd110: word = {OP_LWR, AM_W, 1'b0, 1'b0, 1'b0};
      8'd111: word = {OP_XORWRMC3, AM_W, 1'b1, 1'b0, 1'b1};
      // B_KST: w[i] <= MC
      8'd112: word = {OP_SMC0, AM_WNK, 1'b1, 1'b0, 1'b0};
      8'd113: word = {OP_SMC1, AM_WNK, 1'b1, 1'b0, 1'b0};
      8'd114: word = {OP_SMC2, AM_WNK, 1'b1, 1'b0, 1'b0};
      8'd115: word = {OP_SMC3, AM_WNK, 1'b1, 1'b0, 1'b1};
      // B_SB: send one State column to ByteOut
      8'd116: word = {OP_SB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd117: word = {OP_SB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd118: word = {OP_SB, AM_STATE, 1'b1, 1'b0, 1'b0};
      8'd119: word = {OP_SB, AM_STATE, 1'b1, 1'b0, 1'b1};
      // B_END: end of program
      8'd120: word = {OP_LOOP, AM_STATE, 1'b0, 1'b0, 1'b1};
      default: word = {OP_NOOP, AM_STATE, 1'b0, 1'b0, 1'b1};
    endcase
  end
endmodule
