// aes_controller: the multi-staged controller of the co-processor.
//
// A three-level microsequencer.  The round level (Rnd Reg + aes_rnd_rom)
// steps through a routine of column-level calls, the column level (Col Reg +
// aes_col_rom) through a routine of byte-level calls, and the byte level
// (Byte Reg + aes_byte_rom) issues one 5-bit OutCode per clock to the output
// ROM.  Each register either loads the start address given by the level
// above or increments.  Three counters form the register-file address:
// the 4-bit round counter gives ADDR[7:4], the 2-bit column counter
// ADDR[3:2], the 2-bit byte counter ADDR[1:0].  {RndCnt, ColCnt} is also a
// 6-bit word pointer W into the expanded key; the byte word's ByteCtl picks
// the address as {0, ColCnt, ByteCnt} (State), {W, ByteCnt},
// {W+Nk-1, ByteCnt} or {W+Nk, ByteCnt}, which is what the key expansion
// needs to reach w[i-Nk], w[i-1] and w[i] with one pointer.
//
// Sequencing (one state per clock):
//   IDLE      wait for `start` (mode latched)
//   RND_LOAD  Rnd Reg <= RndCode from the IM, IM PC steps
//   COL_LOAD  Col Reg <= ColCode of the current round word
//   BYTE_LOAD Byte Reg <= ByteAddress of the current column word
//   EXEC      issue OutCode of the current byte word (one per clock)
//   COL_END   apply the column word's counter actions, repeat/next/return
//   RND_END   apply the round word's counter actions, next/return
// Only EXEC issues a datapath operation; the other states issue NoOp.
// The Loop OutCode ends the program and returns to IDLE (`done` pulses).
// The state encoding, the field semantics and the microprogram are this
// design's own; the three levels, the ROM word formats and the counter
// widths follow the co-processor's controller description.
module aes_controller
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [1:0] keymode,
  input  logic [5:0] rnd_code,   // from the IM
  output logic       im_next,    // RndCode taken, step the IM
  output logic [4:0] outcode,
  output logic [7:0] rf_addr,
  output logic       rcon_clr,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {
    IDLE, RND_LOAD, COL_LOAD, BYTE_LOAD, EXEC, COL_END, RND_END
  } state_e;

  state_e     state;
  logic [1:0] mode;
  logic [5:0] rnd_reg, col_reg;
  logic [7:0] byte_reg;
  logic [3:0] rnd_cnt;
  logic [1:0] col_cnt, byte_cnt;

  rnd_word_t  rw;
  col_word_t  cw;
  byte_word_t bw;

  aes_rnd_rom  u_rnd_rom  (.addr(rnd_reg),  .word(rw));
  aes_col_rom  u_col_rom  (.addr(col_reg),  .word(cw));
  aes_byte_rom u_byte_rom (.addr(byte_reg), .word(bw));

  // ---- address generation ----
  logic [5:0] w_ptr, w_nk, w_nkm1;
  assign w_ptr  = {rnd_cnt, col_cnt};
  assign w_nk   = w_ptr + 6'(mode_nk(mode));
  assign w_nkm1 = w_nk - 6'd1;

  always_comb begin
    case (bw.bytectl)
      AM_STATE: rf_addr = {4'd0, col_cnt, byte_cnt};
      AM_W:     rf_addr = {w_ptr, byte_cnt};
      AM_WNKM1: rf_addr = {w_nkm1, byte_cnt};
      default:  rf_addr = {w_nk, byte_cnt};
    endcase
  end

  assign outcode = (state == EXEC) ? 5'(bw.outcode) : 5'(OP_NOOP);
  assign busy    = (state != IDLE);
  assign im_next = (state == RND_LOAD);

  // column counter step (with optional carry into the round counter)
  logic [1:0] col_next;
  logic       col_carry;
  assign {col_carry, col_next} = {1'b0, col_cnt} + {2'b0, cw.colcntincr};

  always_ff @(posedge clk) begin
    done     <= 1'b0;
    rcon_clr <= 1'b0;
    if (rst) begin
      state    <= IDLE;
      mode     <= '0;
      rnd_reg  <= '0;
      col_reg  <= '0;
      byte_reg <= '0;
      rnd_cnt  <= '0;
      col_cnt  <= '0;
      byte_cnt <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          mode  <= keymode;
          state <= RND_LOAD;
        end
        RND_LOAD: begin
          rnd_reg <= rnd_code;
          state   <= COL_LOAD;
        end
        COL_LOAD: begin
          col_reg <= rw.colcode;
          state   <= BYTE_LOAD;
        end
        BYTE_LOAD: begin
          byte_reg <= cw.byteaddress;
          state    <= EXEC;
        end
        EXEC: begin
          if (bw.bytecntrn)        byte_cnt <= '0;
          else if (bw.bytecntincr) byte_cnt <= byte_cnt + 2'd1;
          if (bw.outcode == OP_LOOP) begin
            state <= IDLE;
            done  <= 1'b1;
          end else if (bw.bytedone) begin
            state <= COL_END;
          end else begin
            byte_reg <= byte_reg + 8'd1;
          end
        end
        COL_END: begin
          if (cw.colcntrn) col_cnt <= '0;
          else begin
            col_cnt <= col_next;
            if (cw.colctl[1] && col_carry) rnd_cnt <= rnd_cnt + 4'd1;
          end
          if (cw.colctl[0] && !cw.colcntrn && col_next != 2'd0) begin
            state <= BYTE_LOAD;              // next column, same word
          end else if (cw.coldone) begin
            state <= RND_END;
          end else begin
            col_reg <= col_reg + 6'd1;
            state   <= BYTE_LOAD;
          end
        end
        RND_END: begin
          if (rw.rndcntrn) begin
            case (rw.rndctl)
              2'b00:   rnd_cnt <= 4'd1;
              2'b01:   rnd_cnt <= mode_nr(mode) + 4'd1;
              default: rnd_cnt <= 4'd0;
            endcase
            col_cnt  <= '0;
            byte_cnt <= '0;
            rcon_clr <= 1'b1;
          end else if (rw.rndcntincr) begin
            rnd_cnt <= rw.rndcntctl ? rnd_cnt - 4'd1 : rnd_cnt + 4'd1;
          end
          if (rw.rnddone) begin
            state <= RND_LOAD;
          end else begin
            rnd_reg <= rnd_reg + 6'd1;
            state   <= COL_LOAD;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
