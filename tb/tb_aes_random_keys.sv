// tb_aes_random_keys: random keys and blocks for all three key lengths,
// checked against a plain behavioural AES model written here (FIPS-197
// cipher and key expansion, S-Box from a brute-force field inverse).
// For each key length it loads a random key, encrypts and decrypts several
// random blocks with the kept key, then switches to a fresh key; every
// result is compared with the model.  The co-processor runs at its default
// configuration.
module tb_aes_random_keys;
  localparam int KEYS_PER_MODE   = 3;
  localparam int BLOCKS_PER_KEY  = 3;

  logic clk = 1'b0, reset = 1'b1, start = 1'b0, new_key = 1'b1;
  logic [2:0] bitmode = '0;
  logic [7:0] byte_in, byte_out;
  logic byte_req, byte_out_valid, busy, done;
  int checks = 0, failures = 0;

  aes_coprocessor dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [7:0] sb [256], isb [256];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  task automatic build_sbox();
    for (int a = 0; a < 256; a++) begin
      logic [7:0] inv = 8'h00, s;
      for (int b = 1; b < 256; b++) if (mul(8'(a), 8'(b)) == 8'h01) inv = 8'(b);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      s ^= 8'h63;
      sb[a] = s;
      isb[s] = 8'(a);
    end
  endtask

  typedef logic [7:0] blk_t [16];
  logic [7:0] rk [240];

  task automatic expand(input logic [7:0] key [32], input int nk);
    int nr = nk + 6;
    logic [7:0] t [4], tmp, rc = 8'h01;
    for (int i = 0; i < 4*nk; i++) rk[i] = key[i];
    for (int i = nk; i < 4*(nr+1); i++) begin
      for (int b = 0; b < 4; b++) t[b] = rk[4*(i-1) + b];
      if (i % nk == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int b = 0; b < 4; b++) t[b] = sb[t[b]];
        t[0] ^= rc;
        rc = mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        for (int b = 0; b < 4; b++) t[b] = sb[t[b]];
      end
      for (int b = 0; b < 4; b++) rk[4*i + b] = rk[4*(i-nk) + b] ^ t[b];
    end
  endtask

  function automatic blk_t mixcol(input blk_t s, input logic [7:0] m [4]);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c + r] = mul(m[(4 - r) % 4], s[4*c]) ^ mul(m[(5 - r) % 4], s[4*c + 1])
                   ^ mul(m[(6 - r) % 4], s[4*c + 2]) ^ mul(m[(7 - r) % 4], s[4*c + 3]);
    return o;
  endfunction

  function automatic blk_t cipher(input blk_t in, input int nr, input bit dec);
    blk_t s = in, t;
    logic [7:0] fwd [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    logic [7:0] inv [4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    if (!dec) begin
      for (int i = 0; i < 16; i++) s[i] ^= rk[i];
      for (int r = 1; r <= nr; r++) begin
        for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
        t = s;
        for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) s[4*c + w] = t[4*((c + w) % 4) + w];
        if (r != nr) s = mixcol(s, fwd);
        for (int i = 0; i < 16; i++) s[i] ^= rk[16*r + i];
      end
    end else begin
      for (int i = 0; i < 16; i++) s[i] ^= rk[16*nr + i];
      for (int r = nr - 1; r >= 0; r--) begin
        t = s;
        for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) s[4*((c + w) % 4) + w] = t[4*c + w];
        for (int i = 0; i < 16; i++) s[i] = isb[s[i]];
        for (int i = 0; i < 16; i++) s[i] ^= rk[16*r + i];
        if (r != 0) s = mixcol(s, inv);
      end
    end
    return s;
  endfunction

  // ---------------- host side ----------------
  logic [7:0] feed [48];
  int feed_idx, feed_len;
  logic [7:0] got [16];
  int got_idx;
  assign byte_in = (feed_idx < feed_len) ? feed[feed_idx] : 8'h00;
  always @(posedge clk) begin
    if (byte_req) feed_idx <= feed_idx + 1;
    if (byte_out_valid && got_idx < 16) begin got[got_idx] <= byte_out; got_idx <= got_idx + 1; end
  end

  task automatic run(input bit load_key, input bit dec, input int km, input logic [7:0] key [32],
                     input blk_t din, output blk_t dout);
    int nk = load_key ? 4 + 2*km : 0;
    for (int b = 0; b < 4*nk; b++) feed[b] = key[b];
    for (int b = 0; b < 16; b++) feed[4*nk + b] = din[b];
    feed_len = 4*nk + 16;
    feed_idx = 0;
    got_idx = 0;
    @(negedge clk);
    bitmode = {dec, 2'(km)}; new_key = load_key; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    dout = got;
    checks++;
    if (feed_idx != feed_len || got_idx != 16) begin failures++; $display("FAIL handshake"); end
  endtask

  initial begin
    logic [7:0] key [32];
    blk_t pt, ct, res, ref_ct;
    build_sbox();
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int km = 0; km < 3; km++)
      for (int k = 0; k < KEYS_PER_MODE; k++) begin
        for (int b = 0; b < 32; b++) key[b] = 8'($urandom);
        expand(key, 4 + 2*km);
        for (int n = 0; n < BLOCKS_PER_KEY; n++) begin
          for (int b = 0; b < 16; b++) pt[b] = 8'($urandom);
          ref_ct = cipher(pt, 10 + 2*km, 1'b0);
          checks++;
          if (cipher(ref_ct, 10 + 2*km, 1'b1) != pt) begin failures++; $display("FAIL reference model"); end
          run(n == 0, 1'b0, km, key, pt, ct);
          checks++;
          if (ct != ref_ct) begin failures++; $display("FAIL AES-%0d key %0d block %0d encrypt", 128 + 64*km, k, n); end
          run(1'b0, 1'b1, km, key, ref_ct, res);
          checks++;
          if (res != pt) begin failures++; $display("FAIL AES-%0d key %0d block %0d decrypt", 128 + 64*km, k, n); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
