// aes_rnd_rom: round-level microprogram ROM of the multi-staged controller.
//
// 64 words of 12 bits {ColCode, RndCtl, RndCntCtl, RndCntIncr, RndCntRN,
// RndDone}.  Each word calls the column routine starting at ColCode.  When
// it returns, RndCntRN reloads the round counter (RndCtl = 00: 1, the block
// of round key 0; 01: Nr+1, the block of round key Nr) and clears the column
// and byte counters and the Rcon index; RndCntIncr steps the round counter
// up (RndCntCtl = 0) or down (1); RndDone returns to the instruction module
// for the next routine.  The routines are this design's own microprogram.
// Combinational read; unused words are done.
module aes_rnd_rom
  import aes_pkg::*;
(
  input  logic [5:0] addr,
  output rnd_word_t  word
);
  always_comb begin
    case (addr)
      // R_LOAD4: load a 4-word key; W <= 4
      6'd0: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd1: word = {6'd6, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_LDKEY4
      6'd2: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b1};  // call C_INIT
      // R_LOAD6: load a 6-word key; W <= 4
      6'd3: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd4: word = {6'd4, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_LDKEY6
      6'd5: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b1};  // call C_INIT
      // R_LOAD8: load an 8-word key; W <= 4
      6'd6: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd7: word = {6'd2, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_LDKEY8
      6'd8: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b1};  // call C_INIT
      // R_LOADST: load the State
      6'd9: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd10: word = {6'd1, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};  // call C_LDST
      // R_KX4: expand 4 key words (first one transformed)
      6'd11: word = {6'd20, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWT
      6'd12: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd13: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd14: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};  // call C_KWP
      // R_KX6: expand 6 key words
      6'd15: word = {6'd20, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWT
      6'd16: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd17: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd18: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd19: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd20: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};  // call C_KWP
      // R_KX8: expand 8 key words
      6'd21: word = {6'd20, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWT
      6'd22: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd23: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd24: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd25: word = {6'd23, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWS
      6'd26: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd27: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_KWP
      6'd28: word = {6'd21, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};  // call C_KWP
      // R_ENC_INIT: RndCnt <= 1; AddRoundKey(key 0)
      6'd29: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd30: word = {6'd14, 2'b00, 1'b0, 1'b1, 1'b0, 1'b1};  // call C_ARK
      // R_ENC_RND: one full encryption round
      6'd31: word = {6'd10, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_SUB
      6'd32: word = {6'd12, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_SR
      6'd33: word = {6'd15, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_MIX
      6'd34: word = {6'd14, 2'b00, 1'b0, 1'b1, 1'b0, 1'b1};  // call C_ARK
      // R_ENC_FIN: last encryption round (no MixColumns)
      6'd35: word = {6'd10, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_SUB
      6'd36: word = {6'd12, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_SR
      6'd37: word = {6'd14, 2'b00, 1'b0, 1'b1, 1'b0, 1'b1};  // call C_ARK
      // R_DEC_INIT: RndCnt <= Nr+1; AddRoundKey(key Nr)
      6'd38: word = {6'd0, 2'b01, 1'b1, 1'b0, 1'b1, 1'b0};  // call C_INIT
      6'd39: word = {6'd14, 2'b00, 1'b1, 1'b1, 1'b0, 1'b1};  // call C_ARK
      // R_DEC_RND: one full decryption round
      6'd40: word = {6'd13, 2'b00, 1'b1, 1'b0, 1'b0, 1'b0};  // call C_ISR
      6'd41: word = {6'd11, 2'b00, 1'b1, 1'b0, 1'b0, 1'b0};  // call C_ISUB
      6'd42: word = {6'd14, 2'b00, 1'b1, 1'b1, 1'b0, 1'b0};  // call C_ARK
      6'd43: word = {6'd16, 2'b00, 1'b1, 1'b0, 1'b0, 1'b1};  // call C_IMIX
      // R_DEC_FIN: last decryption round (no InvMixColumns)
      6'd44: word = {6'd13, 2'b00, 1'b1, 1'b0, 1'b0, 1'b0};  // call C_ISR
      6'd45: word = {6'd11, 2'b00, 1'b1, 1'b0, 1'b0, 1'b0};  // call C_ISUB
      6'd46: word = {6'd14, 2'b00, 1'b1, 1'b1, 1'b0, 1'b1};  // call C_ARK
      // R_OUT: send the result, then end
      6'd47: word = {6'd18, 2'b00, 1'b0, 1'b0, 1'b0, 1'b0};  // call C_OUT
      6'd48: word = {6'd19, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};  // call C_END
      default: word = {6'd0, 2'b00, 1'b0, 1'b0, 1'b0, 1'b1};
    endcase
  end
endmodule
