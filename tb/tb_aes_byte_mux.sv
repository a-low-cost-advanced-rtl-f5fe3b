// tb_aes_byte_mux: random data on every input, every combination of the
// four selects; the two outputs are compared with a model that names each
// mux input explicitly.
module tb_aes_byte_mux;
  import aes_pkg::*;
  muxa_e muxa; muxb_e muxb; outmux_e outmux; datamux_e datamux;
  logic [7:0] rd, wr, mc, modbyte, rcon, sbox, isbox, byte_in, out, wd;
  logic [7:0] ea, eb, eo, ew;
  int checks = 0, failures = 0;
  aes_byte_mux dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++)
      for (int s = 0; s < 256; s++) begin
        {rd, wr, mc, modbyte} = {$urandom};
        {rcon, sbox, isbox, byte_in} = {$urandom};
        muxa = muxa_e'(s[1:0]); muxb = muxb_e'(s[3:2]); outmux = outmux_e'(s[5:4]); datamux = datamux_e'(s[7:6]);
        #1;
        ea = (s[1:0] == 0) ? rd : (s[1:0] == 1) ? wr : (s[1:0] == 2) ? mc : 8'h00;
        eb = (s[3:2] == 0) ? wr : (s[3:2] == 1) ? mc : (s[3:2] == 2) ? modbyte : rcon;
        eo = (s[5:4] == 0) ? (ea ^ eb) : (s[5:4] == 1) ? sbox : (s[5:4] == 2) ? isbox : rd;
        ew = (s[7:6] == 0) ? byte_in : (s[7:6] == 1) ? wr : (s[7:6] == 2) ? mc : eo;
        checks++;
        if (out !== eo || wd !== ew) begin
          failures++; $display("FAIL sel %b: out=%h/%h wd=%h/%h", 8'(s), out, eo, wd, ew);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
