// tb_aes_coprocessor: end-to-end test of the AES co-processor.
//
// Runs all six programs (AES-128/192/256, encrypt and decrypt) on the
// FIPS-197 Appendix C known-answer vectors, acting as the host: it answers
// byte_req with the key bytes and then the plaintext (or ciphertext) bytes,
// collects the 16 bytes flagged by byte_out_valid, and compares them with
// the published result.  A second encrypt/decrypt pass per mode uses random
// data with the same keys and checks that decryption undoes encryption,
// and a third pass starts with new_key = 0: it must reuse the expanded key
// left in the register file, take only 16 bytes, and give the same results
// as a run that loads the key.
// It counts every microinstruction the datapath executes and fails if any
// of them (row rotations, S-Box/inverse S-Box, the multiply-by-x with and
// without reduction, Rcon, accumulator loads/stores, Loop) never occurred,
// and it reports the clock cycles each program takes.  The top runs at its
// default parameters.
module tb_aes_coprocessor;
  import aes_pkg::*;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [2:0] bitmode = '0;
  logic new_key = 1'b1;
  logic [7:0] byte_in, byte_out;
  logic byte_req, byte_out_valid, busy, done;
  int checks = 0, failures = 0;

  aes_coprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feed data: stream of 16 + 4Nk bytes
  logic [7:0] feed [48];
  int feed_idx, feed_len;
  logic [7:0] got [16];
  int got_idx;
  always_comb byte_in = (feed_idx < feed_len) ? feed[feed_idx] : 8'h00;
  always @(posedge clk) begin
    if (byte_req) feed_idx <= feed_idx + 1;
    if (byte_out_valid && got_idx < 16) begin got[got_idx] <= byte_out; got_idx <= got_idx + 1; end
  end

  // phase boundaries: last key-schedule write, first result byte
  int cyc_now, kx_end, first_out, reuse_runs = 0;
  always @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    if (dut.ctl.rfrw && dut.rf_addr >= 8'd16) kx_end <= cyc_now;
    if (byte_out_valid && got_idx == 0) first_out <= cyc_now;
  end

  // microinstruction usage counters
  int opcount [32];
  int mod_reduce;      // XORMOD with ModFlag = 1
  always @(posedge clk) if (!reset) begin
    opcount[dut.outcode]++;
    if (dut.outcode == 5'(OP_XORMOD) && dut.mod_q == 8'h1b) mod_reduce++;
  end

  task automatic run(input logic nk_load, input logic dec, input logic [1:0] km, input logic [127:0] din,
                     input logic [255:0] key, output logic [127:0] dout, output int cycles);
    int nk;
    nk = (km == 2'd0) ? 4 : (km == 2'd1) ? 6 : 8;
    if (!nk_load) nk = 0;
    for (int b = 0; b < 4*nk; b++) feed[b] = key[255 - 8*b -: 8];
    for (int b = 0; b < 16; b++) feed[4*nk + b] = din[127 - 8*b -: 8];
    feed_len = 16 + 4*nk;
    feed_idx = 0;
    got_idx  = 0;
    cyc_now  = 0;
    @(negedge clk);
    bitmode = {dec, km};
    new_key = nk_load;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    for (int b = 0; b < 16; b++) dout[127 - 8*b -: 8] = got[b];
    if (nk_load)
      $display("%s AES-%0d, new key: key load+expansion %0d cycles, State load+rounds %0d cycles, total %0d cycles",
               dec ? "decrypt" : "encrypt", 128 + 64*km, kx_end, first_out - kx_end, cycles);
    else
      $display("%s AES-%0d, kept key: %0d cycles", dec ? "decrypt" : "encrypt", 128 + 64*km, cycles);
    checks++;
    if (feed_idx != feed_len || got_idx != 16) begin
      failures++;
      $display("FAIL handshake: took %0d of %0d bytes, gave %0d", feed_idx, feed_len, got_idx);
    end
  endtask

  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  logic [255:0] keys [3];
  logic [127:0] cts  [3];
  initial begin
    keys[0] = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    keys[1] = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    keys[2] = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    cts[0]  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    cts[1]  = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    cts[2]  = 128'h8ea2b7ca516745bfeafc49904b496089;
  end

  initial begin : main
    logic [127:0] res, res2, rnd;
    int cyc;
    mod_reduce = 0;
    foreach (opcount[i]) opcount[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int m = 0; m < 3; m++) begin
      run(1'b1, 1'b0, 2'(m), PT, keys[m], res, cyc);
      checks++;
      if (res !== cts[m]) begin failures++; $display("FAIL AES-%0d enc: %h expected %h", 128 + 64*m, res, cts[m]); end
      run(1'b1, 1'b1, 2'(m), cts[m], keys[m], res, cyc);
      checks++;
      if (res !== PT) begin failures++; $display("FAIL AES-%0d dec: %h expected %h", 128 + 64*m, res, PT); end
      // random block, new key each time
      rnd = {$urandom, $urandom, $urandom, $urandom};
      run(1'b1, 1'b0, 2'(m), rnd, keys[m], res, cyc);
      run(1'b1, 1'b1, 2'(m), res, keys[m], res2, cyc);
      checks++;
      if (res2 !== rnd || res == rnd) begin failures++; $display("FAIL AES-%0d round trip", 128 + 64*m); end
      // same random block with the kept key: same ciphertext, same round trip
      run(1'b0, 1'b0, 2'(m), rnd, keys[m], res2, cyc);
      checks++;
      if (res2 !== res) begin failures++; $display("FAIL AES-%0d kept-key enc: %h expected %h", 128 + 64*m, res2, res); end
      run(1'b0, 1'b1, 2'(m), cts[m], keys[m], res2, cyc);
      checks++;
      if (res2 !== PT) begin failures++; $display("FAIL AES-%0d kept-key dec: %h expected %h", 128 + 64*m, res2, PT); end
      reuse_runs += 2;
    end
    // every datapath microinstruction must have been exercised
    for (int op = 0; op <= 30; op++) begin
      checks++;
      if (opcount[op] == 0) begin failures++; $display("FAIL OutCode %0d never executed", op); end
    end
    checks++;
    if (reuse_runs == 0) begin failures++; $display("FAIL key reuse never exercised"); end
    checks++;
    if (mod_reduce == 0) begin failures++; $display("FAIL conditional 1b XOR never taken"); end
    $display("mechanisms: SHROW1=%0d SHROW2=%0d SHROW3=%0d SBX=%0d ISBX=%0d MODSH=%0d reduce=%0d RCON=%0d Loop=%0d kept-key runs=%0d",
             opcount[OP_SHROW1], opcount[OP_SHROW2], opcount[OP_SHROW3], opcount[OP_SBX], opcount[OP_ISBX],
             opcount[OP_MODSH], mod_reduce, opcount[OP_XORRCONMC0], opcount[OP_LOOP], reuse_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
