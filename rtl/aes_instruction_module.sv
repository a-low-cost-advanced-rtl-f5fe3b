// aes_instruction_module: the Instruction Module (IM) of the co-processor.
//
// Holds six program ROMs, one per bit mode (128/192/256) and direction
// (encrypt/decrypt), a 5-bit sequencer (program counter) and the output mux
// that picks the selected ROM.  A program is the list of round-level
// routines (6-bit RndCodes, start addresses in aes_rnd_rom) that performs a
// whole operation: load the key from ByteIn and expand it, load the State,
// run the rounds, send the State out on ByteOut.  Rounds are unrolled in the
// program, so the sequencer needs no compare or jump.  The expanded key
// stays in the register file, so a program may also be entered at its
// State-load routine, skipping the key part (new_key = 0).
//
// Interface: `start` latches `bitmode` ({dec, keymode[1:0]}) and sets the
// PC to 0 (new_key = 1) or to the State-load entry of the selected program
// (new_key = 0); `next` (from the controller) steps the PC after a RndCode
// has been taken; `pcrw` (the Loop instruction) clears the PC at the end of
// the program.  `rnd_code` is combinational from the latched mode and the
// PC.  The program lists and the key-skip entry are this design's own.
// Synchronous reset.
module aes_instruction_module
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [2:0] bitmode,
  input  logic       new_key,
  input  logic       next,
  input  logic       pcrw,
  output logic [5:0] rnd_code
);
  logic [2:0] sel;
  logic [4:0] pc;
  logic [5:0] rom [6];

  // index of the State-load routine: after the key load and the 10/8/7
  // key-expansion routines of AES-128/192/256
  function automatic logic [4:0] data_entry(input logic [1:0] keymode);
    case (keymode)
      2'd1:    return 5'd9;
      2'd2:    return 5'd8;
      default: return 5'd11;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0;
      pc  <= '0;
    end else if (start) begin
      sel <= bitmode;
      pc  <= new_key ? 5'd0 : data_entry(bitmode[1:0]);
    end else if (pcrw) begin
      pc  <= '0;
    end else if (next) begin
      pc  <= pc + 5'd1;
    end
  end

  // the six program ROMs (index: dec*3 + keymode)
  always_comb begin
    // AES-128 encrypt: R_LOAD4, R_KX4 x10, R_LOADST, R_ENC_INIT, R_ENC_RND x9, R_ENC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[0] = 6'd0;  // R_LOAD4
      [5'd1:5'd10]    : rom[0] = 6'd11;  // R_KX4
      5'd11           : rom[0] = 6'd9;  // R_LOADST
      5'd12           : rom[0] = 6'd29;  // R_ENC_INIT
      [5'd13:5'd21]   : rom[0] = 6'd31;  // R_ENC_RND
      5'd22           : rom[0] = 6'd35;  // R_ENC_FIN
      5'd23           : rom[0] = 6'd47;  // R_OUT
      default         : rom[0] = 6'd47;  // R_OUT
    endcase
    // AES-192 encrypt: R_LOAD6, R_KX6 x7, R_KX4, R_LOADST, R_ENC_INIT, R_ENC_RND x11, R_ENC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[1] = 6'd3;  // R_LOAD6
      [5'd1:5'd7]     : rom[1] = 6'd15;  // R_KX6
      5'd8            : rom[1] = 6'd11;  // R_KX4
      5'd9            : rom[1] = 6'd9;  // R_LOADST
      5'd10           : rom[1] = 6'd29;  // R_ENC_INIT
      [5'd11:5'd21]   : rom[1] = 6'd31;  // R_ENC_RND
      5'd22           : rom[1] = 6'd35;  // R_ENC_FIN
      5'd23           : rom[1] = 6'd47;  // R_OUT
      default         : rom[1] = 6'd47;  // R_OUT
    endcase
    // AES-256 encrypt: R_LOAD8, R_KX8 x6, R_KX4, R_LOADST, R_ENC_INIT, R_ENC_RND x13, R_ENC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[2] = 6'd6;  // R_LOAD8
      [5'd1:5'd6]     : rom[2] = 6'd21;  // R_KX8
      5'd7            : rom[2] = 6'd11;  // R_KX4
      5'd8            : rom[2] = 6'd9;  // R_LOADST
      5'd9            : rom[2] = 6'd29;  // R_ENC_INIT
      [5'd10:5'd22]   : rom[2] = 6'd31;  // R_ENC_RND
      5'd23           : rom[2] = 6'd35;  // R_ENC_FIN
      5'd24           : rom[2] = 6'd47;  // R_OUT
      default         : rom[2] = 6'd47;  // R_OUT
    endcase
    // AES-128 decrypt: R_LOAD4, R_KX4 x10, R_LOADST, R_DEC_INIT, R_DEC_RND x9, R_DEC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[3] = 6'd0;  // R_LOAD4
      [5'd1:5'd10]    : rom[3] = 6'd11;  // R_KX4
      5'd11           : rom[3] = 6'd9;  // R_LOADST
      5'd12           : rom[3] = 6'd38;  // R_DEC_INIT
      [5'd13:5'd21]   : rom[3] = 6'd40;  // R_DEC_RND
      5'd22           : rom[3] = 6'd44;  // R_DEC_FIN
      5'd23           : rom[3] = 6'd47;  // R_OUT
      default         : rom[3] = 6'd47;  // R_OUT
    endcase
    // AES-192 decrypt: R_LOAD6, R_KX6 x7, R_KX4, R_LOADST, R_DEC_INIT, R_DEC_RND x11, R_DEC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[4] = 6'd3;  // R_LOAD6
      [5'd1:5'd7]     : rom[4] = 6'd15;  // R_KX6
      5'd8            : rom[4] = 6'd11;  // R_KX4
      5'd9            : rom[4] = 6'd9;  // R_LOADST
      5'd10           : rom[4] = 6'd38;  // R_DEC_INIT
      [5'd11:5'd21]   : rom[4] = 6'd40;  // R_DEC_RND
      5'd22           : rom[4] = 6'd44;  // R_DEC_FIN
      5'd23           : rom[4] = 6'd47;  // R_OUT
      default         : rom[4] = 6'd47;  // R_OUT
    endcase
    // AES-256 decrypt: R_LOAD8, R_KX8 x6, R_KX4, R_LOADST, R_DEC_INIT, R_DEC_RND x13, R_DEC_FIN, R_OUT
    case (pc) inside
      5'd0            : rom[5] = 6'd6;  // R_LOAD8
      [5'd1:5'd6]     : rom[5] = 6'd21;  // R_KX8
      5'd7            : rom[5] = 6'd11;  // R_KX4
      5'd8            : rom[5] = 6'd9;  // R_LOADST
      5'd9            : rom[5] = 6'd38;  // R_DEC_INIT
      [5'd10:5'd22]   : rom[5] = 6'd40;  // R_DEC_RND
      5'd23           : rom[5] = 6'd44;  // R_DEC_FIN
      5'd24           : rom[5] = 6'd47;  // R_OUT
      default         : rom[5] = 6'd47;  // R_OUT
    endcase
  end

  // output mux; an unused mode code falls back to AES-128
  always_comb begin
    case (sel)
      3'b000:  rnd_code = rom[0];
      3'b001:  rnd_code = rom[1];
      3'b010:  rnd_code = rom[2];
      3'b100:  rnd_code = rom[3];
      3'b101:  rnd_code = rom[4];
      3'b110:  rnd_code = rom[5];
      3'b111:  rnd_code = rom[3];
      default: rnd_code = rom[0];
    endcase
  end
endmodule
