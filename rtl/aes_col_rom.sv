// aes_col_rom: column-level microprogram ROM of the multi-staged controller.
//
// 64 words of 13 bits {ByteAddress, ColCtl, ColCntIncr, ColCntRN, ColDone}.
// Each word calls the byte routine starting at ByteAddress.  When that
// routine returns, ColCntIncr steps the 2-bit column counter (ColCtl[1]
// lets it carry into the 4-bit round counter, so {RndCnt, ColCnt} walks the
// expanded key one word at a time), ColCtl[0] repeats the same word until
// the column counter wraps to 0 (four columns), and ColDone returns to the
// round level.  The routines are this design's own microprogram.
// Combinational read; unused words are NoOp/done.
module aes_col_rom
  import aes_pkg::*;
(
  input  logic [5:0] addr,
  output col_word_t  word
);
  always_comb begin
    case (addr)
      // C_INIT: one NoOp, clear ColCnt
      6'd0: word = {8'd0, 2'b00, 1'b0, 1'b1, 1'b1};  // call B_NOP
      // C_LDST: load the State, column by column
      6'd1: word = {8'd1, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_LBS
      // C_LDKEY8: load 8 key words (C_LDKEY6 / C_LDKEY4 enter part-way)
      6'd2: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd3: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd4: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd5: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd6: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd7: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd8: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b0};  // call B_LBW
      6'd9: word = {8'd5, 2'b10, 1'b1, 1'b0, 1'b1};  // call B_LBW
      // C_SUB: SubBytes
      6'd10: word = {8'd9, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_SBX
      // C_ISUB: InvSubBytes
      6'd11: word = {8'd13, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_ISBX
      // C_SR: ShiftRows
      6'd12: word = {8'd17, 2'b00, 1'b0, 1'b0, 1'b1};  // call B_SR
      // C_ISR: InvShiftRows
      6'd13: word = {8'd23, 2'b00, 1'b0, 1'b0, 1'b1};  // call B_ISR
      // C_ARK: AddRoundKey with round key block RndCnt
      6'd14: word = {8'd29, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_ARK
      // C_MIX: MixColumns
      6'd15: word = {8'd37, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_MIX
      // C_IMIX: InvMixColumns = pre-step then MixColumns
      6'd16: word = {8'd73, 2'b01, 1'b1, 1'b0, 1'b0};  // call B_IMIXPRE
      6'd17: word = {8'd37, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_MIX
      // C_OUT: send the State to ByteOut
      6'd18: word = {8'd116, 2'b01, 1'b1, 1'b0, 1'b1};  // call B_SB
      // C_END: end of program
      6'd19: word = {8'd120, 2'b00, 1'b0, 1'b0, 1'b1};  // call B_END
      // C_KWT: key word i, i mod Nk = 0 (C_KWP = plain word enters at +1)
      6'd20: word = {8'd95, 2'b00, 1'b0, 1'b0, 1'b0};  // call B_SUBROT
      6'd21: word = {8'd104, 2'b00, 1'b0, 1'b0, 1'b0};  // call B_KACC
      6'd22: word = {8'd112, 2'b10, 1'b1, 1'b0, 1'b1};  // call B_KST
      // C_KWS: key word i, Nk = 8 and i mod 8 = 4
      6'd23: word = {8'd100, 2'b00, 1'b0, 1'b0, 1'b0};  // call B_SUB
      6'd24: word = {8'd104, 2'b00, 1'b0, 1'b0, 1'b0};  // call B_KACC
      6'd25: word = {8'd112, 2'b10, 1'b1, 1'b0, 1'b1};  // call B_KST
      default: word = {8'd0, 2'b00, 1'b0, 1'b0, 1'b1};
    endcase
  end
endmodule
