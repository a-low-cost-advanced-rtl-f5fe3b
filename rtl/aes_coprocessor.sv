// aes_coprocessor: low-cost, byte-serial AES co-processor (AES-128/192/256,
// encryption and decryption).
//
// The whole cipher runs on one 8-bit datapath under microprogram control:
//   Instruction Module (six program ROMs) -> multi-staged controller
//   (round/column/byte levels, RF address counters) -> output ROM (OutCode
//   to 20 control bits) -> datapath.
// The datapath is the 256-byte register file (State, Key and RoundKey), the
// S-Box and inverse S-Box LUTs on its read port, mux A (RD, WR, MC, 00) and
// mux B (WR, MC, ModFlag, Rcon) into an 8-bit XOR, the output mux (XOR,
// S-Box, inverse S-Box, RD), the Working Register, the four-byte MixColumns
// accumulator, the ModFlag block and the 10-term Rcon LUT.  The data mux
// picks the register-file write data (ByteIn, WR, MC, output mux).
//
// Host interface (all synchronous to clk, synchronous reset `reset`):
//   start/bitmode  pulse `start` while idle with bitmode = {dec, keymode}
//                  (keymode 0: 128, 1: 192, 2: 256 bit key)
//   new_key        sampled with `start`: 1 = load and expand a new key
//                  first; 0 = reuse the expanded key already held in the
//                  register file (same keymode) and only process a block
//   byte_req       high in a cycle that executes LB: the host must drive
//                  `byte_in` in that cycle; it is written at the clock edge.
//                  The program takes the 4Nk key bytes (if new_key), then
//                  the 16 State bytes, both in FIPS-197 byte order.
//   byte_out/      byte_out_valid is high in a cycle that executes SB; the
//   byte_out_valid 16 result bytes appear in FIPS-197 byte order.
//   busy, done     busy while a program runs; done pulses when it ends.
// new_key, byte_req, byte_out_valid, busy and done are this design's own
// handshake; start, bitmode, byte_in, byte_out and reset are the
// co-processor's named lines.  Two assertions state the handshake rules:
// a cycle never both takes and gives a byte, and `done` ends `busy`.
module aes_coprocessor
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic [2:0] bitmode,
  input  logic       new_key,
  input  logic [7:0] byte_in,
  output logic       byte_req,
  output logic [7:0] byte_out,
  output logic       byte_out_valid,
  output logic       busy,
  output logic       done
);
  logic [5:0] rnd_code;
  logic       im_next, rcon_clr;
  logic [4:0] outcode;
  logic [7:0] rf_addr;
  ctrl_t      ctl;
  logic       go;

  assign go = start && !busy;

  aes_instruction_module u_im (
    .clk, .rst(reset), .start(go), .bitmode, .new_key, .next(im_next), .pcrw(ctl.pcrw),
    .rnd_code
  );

  aes_controller u_ctrl (
    .clk, .rst(reset), .start(go), .keymode(bitmode[1:0]), .rnd_code,
    .im_next, .outcode, .rf_addr, .rcon_clr, .busy, .done
  );

  aes_output_rom u_orom (.outcode, .ctrl(ctl));

  // ---- datapath ----
  logic [7:0] rd, sbox_q, isbox_q, wr_q, mc_q, mod_q, rcon_q;
  logic [7:0] out_q, wd;

  aes_register_file u_rf (
    .clk, .rst(reset), .addr(rf_addr), .we(ctl.rfrw), .wd, .shiftctl(ctl.shiftctl), .rd
  );
  aes_sbox     u_sbox  (.in(rd), .out(sbox_q));
  aes_inv_sbox u_isbox (.in(rd), .out(isbox_q));
  aes_rcon_lut u_rcon  (.clk, .rst(reset), .clr(rcon_clr), .adv(ctl.rcon), .rcon(rcon_q));

  aes_byte_mux u_mux (
    .muxa(ctl.muxa), .muxb(ctl.muxb), .outmux(ctl.outmux), .datamux(ctl.datamux),
    .rd, .wr(wr_q), .mc(mc_q), .modbyte(mod_q), .rcon(rcon_q), .sbox(sbox_q), .isbox(isbox_q),
    .byte_in, .out(out_q), .wd
  );

  aes_working_register u_wr (
    .clk, .rst(reset), .wrrw(ctl.wrrw), .sh(ctl.sh), .d(out_q), .q(wr_q)
  );
  aes_mc_acc u_mc (
    .clk, .rst(reset), .mcrw(ctl.mcrw), .mixctl(ctl.mixctl), .d(out_q), .q(mc_q)
  );
  aes_modflag u_mod (
    .clk, .rst(reset), .modrw(ctl.modrw), .msb(wr_q[7]), .modbyte(mod_q)
  );

  assign byte_out       = ctl.storemux ? rd : out_q;
  assign byte_out_valid = ctl.storemux;
  assign byte_req       = (outcode == 5'(OP_LB));

  a_one_byte_op: assert property (@(posedge clk) disable iff (reset) !(byte_req && byte_out_valid));
  a_done_idle:   assert property (@(posedge clk) disable iff (reset) done |-> !busy);
endmodule
