// aes_pkg: shared types and constants of the byte-serial AES co-processor.
//
// The co-processor runs AES one byte per clock under a three-level
// microprogram (round level -> column level -> byte level).  The byte level
// issues a 5-bit OutCode each cycle; the output ROM turns it into the
// datapath control word declared here (field names and widths as in the
// co-processor's instruction table).  The numeric OutCode values follow the
// order of that table; codes 29 and 30 (XORWR, XORST) are this design's own
// additions, needed to XOR a register-file byte with the working register.
package aes_pkg;

  // ---- datapath microinstructions (OutCode, 5 bits, 32 codes) ----------
  typedef enum logic [4:0] {
    OP_NOOP       = 5'd0,
    OP_LB         = 5'd1,   // RF[addr] <= ByteIn
    OP_SB         = 5'd2,   // ByteOut  <= RF[addr]
    OP_LWR        = 5'd3,   // WR <= RF[addr]
    OP_SHROW1     = 5'd4,   // rotate State row 1 left by one byte
    OP_SHROW2     = 5'd5,
    OP_SHROW3     = 5'd6,
    OP_XORRCONMC0 = 5'd7,   // MC0 <= MC0 ^ RCON, advance RCON index
    OP_SBX        = 5'd8,   // RF[addr] <= S(RF[addr])
    OP_ISBX       = 5'd9,   // RF[addr] <= S^-1(RF[addr])
    OP_MODSH      = 5'd10,  // ModFlag <= WR[7]; WR <= WR << 1
    OP_XORMOD     = 5'd11,  // WR <= WR ^ (ModFlag ? 1b : 00)
    OP_LMC0       = 5'd12,  // MCn <= RF[addr]
    OP_LMC1       = 5'd13,
    OP_LMC2       = 5'd14,
    OP_LMC3       = 5'd15,
    OP_SMC0       = 5'd16,  // RF[addr] <= MCn
    OP_SMC1       = 5'd17,
    OP_SMC2       = 5'd18,
    OP_SMC3       = 5'd19,
    OP_SBXMC0     = 5'd20,  // MCn <= S(RF[addr])
    OP_SBXMC1     = 5'd21,
    OP_SBXMC2     = 5'd22,
    OP_SBXMC3     = 5'd23,
    OP_XORWRMC0   = 5'd24,  // MCn <= MCn ^ WR
    OP_XORWRMC1   = 5'd25,
    OP_XORWRMC2   = 5'd26,
    OP_XORWRMC3   = 5'd27,
    OP_LOOP       = 5'd28,  // end of program: PC write, back to idle
    OP_XORWR      = 5'd29,  // WR <= RF[addr] ^ WR        (own addition)
    OP_XORST      = 5'd30,  // RF[addr] <= RF[addr] ^ WR  (own addition)
    OP_RSVD31     = 5'd31   // unused, decodes as NoOp
  } opcode_e;

  // ---- mux encodings -----------------------------------------------------
  typedef enum logic [1:0] {MUXA_RD = 2'd0, MUXA_WR = 2'd1, MUXA_MC = 2'd2, MUXA_ZERO = 2'd3} muxa_e;
  typedef enum logic [1:0] {MUXB_WR = 2'd0, MUXB_MC = 2'd1, MUXB_MOD = 2'd2, MUXB_RCON = 2'd3} muxb_e;
  typedef enum logic [1:0] {DATA_BYTEIN = 2'd0, DATA_WR = 2'd1, DATA_MC = 2'd2, DATA_OUT = 2'd3} datamux_e;
  typedef enum logic [1:0] {OUT_XOR = 2'd0, OUT_SBOX = 2'd1, OUT_INVSBOX = 2'd2, OUT_RD = 2'd3} outmux_e;

  // ---- datapath control word (20 bits, one column per table column) ------
  typedef struct packed {
    logic     pcrw;      // "RN"/PCRW column: program-counter write (Loop)
    logic     rfrw;      // register-file write
    logic     mcrw;      // MixColumns accumulator write
    logic     modrw;     // ModFlag write
    logic     wrrw;      // working-register write
    logic     sh;        // working-register shift (with wrrw)
    logic     rcon;      // advance the RCON index
    muxa_e    muxa;
    muxb_e    muxb;
    datamux_e datamux;
    outmux_e  outmux;
    logic [1:0] mixctl;  // accumulator register select
    logic [1:0] shiftctl;// State row to rotate (0 = none)
    logic     storemux;  // drive ByteOut from RD
  } ctrl_t;

  // ---- register-file address modes (ByteCtl field of the byte ROM) -------
  typedef enum logic [1:0] {
    AM_STATE = 2'd0,   // {0000, ColCnt, ByteCnt}: State RF
    AM_W     = 2'd1,   // {W, ByteCnt}, W = {RndCnt, ColCnt} word pointer
    AM_WNKM1 = 2'd2,   // {W + Nk - 1, ByteCnt}
    AM_WNK   = 2'd3    // {W + Nk, ByteCnt}
  } addr_mode_e;

  // ---- microinstruction words of the three controller ROMs ---------------
  typedef struct packed {
    opcode_e    outcode;    // 5
    addr_mode_e bytectl;    // 2
    logic       bytecntincr;
    logic       bytecntrn;
    logic       bytedone;
  } byte_word_t;            // 10 bits

  typedef struct packed {
    logic [7:0] byteaddress; // start of the byte routine to call
    logic [1:0] colctl;      // [1] carry into RndCnt, [0] repeat until ColCnt wraps
    logic       colcntincr;
    logic       colcntrn;
    logic       coldone;
  } col_word_t;              // 13 bits

  typedef struct packed {
    logic [5:0] colcode;     // start of the column routine to call
    logic [1:0] rndctl;      // reload value: 00 -> 1, 01 -> Nr+1, else 0
    logic       rndcntctl;   // counting direction: 0 up, 1 down
    logic       rndcntincr;
    logic       rndcntrn;    // reload RndCnt, clear ColCnt/ByteCnt and RCON index
    logic       rnddone;
  } rnd_word_t;              // 12 bits

  // ---- bit modes -----------------------------------------------------------
  typedef enum logic [1:0] {MODE_128 = 2'd0, MODE_192 = 2'd1, MODE_256 = 2'd2} keymode_e;

  function automatic logic [3:0] mode_nk(input logic [1:0] m);
    case (m)
      2'd1:    return 4'd6;
      2'd2:    return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  function automatic logic [3:0] mode_nr(input logic [1:0] m);
    case (m)
      2'd1:    return 4'd12;
      2'd2:    return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  // ---- GF(2^8) helpers, m(x) = x^8 + x^4 + x^3 + x + 1 ---------------------
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 (0 maps to 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent bits 1..7 of 254
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // S-Box value: affine transform (eq. 1) of the inverse
  function automatic logic [7:0] sbox_value(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

endpackage
