// tb_aes_output_rom: checks every OutCode's control word field by field
// against the behaviour each microinstruction must have (which registers it
// writes and which mux inputs it selects), written out here per field.
module tb_aes_output_rom;
  import aes_pkg::*;
  logic [4:0] outcode;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;
  aes_output_rom dut (.outcode, .ctrl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t expect_word(input int op);
    ctrl_t c = '0;
    case (op)
      1:  c.rfrw = 1;                                                   // LB: RF <= ByteIn
      2:  c.storemux = 1;                                               // SB
      3:  begin c.wrrw = 1; c.outmux = OUT_RD; end                      // LWR
      4, 5, 6: begin c.rfrw = 1; c.shiftctl = 2'(op - 3); end           // SHROWn
      7:  begin c.mcrw = 1; c.rcon = 1; c.muxa = MUXA_MC; c.muxb = MUXB_RCON; end
      8:  begin c.rfrw = 1; c.datamux = DATA_OUT; c.outmux = OUT_SBOX; end
      9:  begin c.rfrw = 1; c.datamux = DATA_OUT; c.outmux = OUT_INVSBOX; end
      10: begin c.modrw = 1; c.wrrw = 1; c.sh = 1; end                  // MODSH
      11: begin c.wrrw = 1; c.muxa = MUXA_WR; c.muxb = MUXB_MOD; end    // XORMOD
      12, 13, 14, 15: begin c.mcrw = 1; c.outmux = OUT_RD; c.mixctl = 2'(op - 12); end
      16, 17, 18, 19: begin c.rfrw = 1; c.datamux = DATA_MC; c.mixctl = 2'(op - 16); end
      20, 21, 22, 23: begin c.mcrw = 1; c.outmux = OUT_SBOX; c.mixctl = 2'(op - 20); end
      24, 25, 26, 27: begin c.mcrw = 1; c.muxa = MUXA_WR; c.muxb = MUXB_MC; c.mixctl = 2'(op - 24); end
      28: c.pcrw = 1;                                                   // Loop
      29: begin c.wrrw = 1; c.muxa = MUXA_RD; c.muxb = MUXB_WR; c.outmux = OUT_XOR; end
      30: begin c.rfrw = 1; c.datamux = DATA_OUT; c.muxa = MUXA_RD; c.muxb = MUXB_WR; c.outmux = OUT_XOR; end
      default: c = '0;
    endcase
    return c;
  endfunction

  initial begin
    for (int op = 0; op < 32; op++) begin
      outcode = 5'(op); #1;
      e = expect_word(op);
      checks++;
      if (ctrl !== e) begin failures++; $display("FAIL OutCode %0d: %b expected %b", op, ctrl, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
