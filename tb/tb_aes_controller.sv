// tb_aes_controller: drives the multi-staged controller with short round
// programs and checks the stream of (OutCode, RF address) pairs it issues
// against the sequence expected from the microprogram's definition:
//  - loading (key bytes 16..16+4Nk-1, then State bytes 0..15) for each
//    mode, then output (SB on 0..15) and Loop;
//  - the first two expanded key words of AES-128 (reads of w3 through the
//    S-Box with RotWord order, reads of w0/w1, writes of w4/w5);
//  - the initial decryption AddRoundKey, which must read round key Nr
//    (block Nr+1) interleaved with State bytes.
// Round codes are the start addresses of the round routines.
module tb_aes_controller;
  import aes_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [1:0] keymode = 0;
  logic [5:0] rnd_code;
  logic im_next, rcon_clr, busy, done;
  logic [4:0] outcode;
  logic [7:0] rf_addr;
  int checks = 0, failures = 0;
  aes_controller dut (.*);
  always #5 clk = ~clk;

  localparam logic [5:0] R_LOAD4 = 6'd0, R_LOAD6 = 6'd3, R_LOAD8 = 6'd6, R_LOADST = 6'd9,
                         R_KX4 = 6'd11, R_DEC_INIT = 6'd38, R_OUT = 6'd47;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] prog [4];
  int pidx;
  assign rnd_code = prog[pidx];
  always @(posedge clk) if (im_next) pidx <= pidx + 1;

  // recorded non-NoOp operations
  logic [4:0] ops [600];
  logic [7:0] adr [600];
  int n;
  always @(posedge clk) if (busy && outcode != 5'(OP_NOOP) && n < 600) begin
    ops[n] <= outcode; adr[n] <= rf_addr; n <= n + 1;
  end

  task automatic run(input logic [1:0] km, input int len, output int cycles);
    pidx = 0; n = 0; cycles = 0;
    @(negedge clk); keymode = km; start = 1; @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (pidx != len) begin failures++; $display("FAIL %0d round routines taken, expected %0d", pidx, len); end
  endtask

  task automatic expect_op(input int k, input opcode_e op, input int a);
    checks++;
    if (ops[k] !== 5'(op) || adr[k] !== 8'(a)) begin
      failures++;
      $display("FAIL op %0d: %0d @%0d expected %s @%0d", k, ops[k], adr[k], op.name(), a);
    end
  endtask

  initial begin
    int cyc, k;
    @(negedge clk) rst = 0;
    for (int m = 0; m < 3; m++) begin
      prog[0] = (m == 0) ? R_LOAD4 : (m == 1) ? R_LOAD6 : R_LOAD8;
      prog[1] = R_LOADST;
      prog[2] = R_OUT;
      run(2'(m), 3, cyc);
      k = 0;
      for (int a = 16; a < 16 + 16 + 8*m; a++) expect_op(k++, OP_LB, a);
      for (int a = 0; a < 16; a++) expect_op(k++, OP_LB, a);
      for (int a = 0; a < 16; a++) expect_op(k++, OP_SB, a);
      checks++;
      if (ops[k] !== 5'(OP_LOOP) || n != k + 1) begin failures++; $display("FAIL end of program"); end
    end
    // first two expanded words of AES-128
    prog[0] = R_LOAD4; prog[1] = R_KX4; prog[2] = R_OUT;
    run(2'd0, 3, cyc);
    k = 16;
    expect_op(k++, OP_SBXMC3, 28); expect_op(k++, OP_SBXMC0, 29);
    expect_op(k++, OP_SBXMC1, 30); expect_op(k++, OP_SBXMC2, 31);
    k++;   // XORRCONMC0
    for (int b = 0; b < 4; b++) begin expect_op(k++, OP_LWR, 16 + b); k++; end
    for (int b = 0; b < 4; b++) expect_op(k++, opcode_e'(int'(OP_SMC0) + b), 32 + b);
    for (int b = 0; b < 4; b++) begin expect_op(k++, OP_LWR, 20 + b); k++; end
    for (int b = 0; b < 4; b++) expect_op(k++, opcode_e'(int'(OP_SMC0) + b), 36 + b);
    // initial decryption AddRoundKey for each mode
    for (int m = 0; m < 3; m++) begin
      int nr;
      nr = 10 + 2*m;
      prog[0] = R_DEC_INIT; prog[1] = R_OUT;
      run(2'(m), 2, cyc);
      k = 0;
      for (int a = 0; a < 16; a++) begin
        expect_op(k++, OP_LWR, 16*(nr + 1) + a);
        expect_op(k++, OP_XORST, a);
      end
    end
    checks++;
    if (rcon_clr !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
