// tb_aes_instruction_module: reads out all six programs through the
// sequencer and checks their structure: key load, then 10/8/7 key-expansion
// routines (AES-128/192/256), State load, one initial AddRoundKey routine,
// Nr-1 copies of the full-round routine, one final round and the output
// routine; encrypt and decrypt share the key and load part but not the
// rounds.  Also checks that `pcrw` restarts the program counter and that a
// start with new_key = 0 enters each program at its State-load routine.
module tb_aes_instruction_module;
  logic clk = 0, rst = 1, start = 0, next = 0, pcrw = 0, new_key = 1;
  logic [2:0] bitmode = 0;
  logic [5:0] rnd_code;
  logic [5:0] prog [2][3][25];
  int checks = 0, failures = 0;
  aes_instruction_module dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int kx [3] = '{10, 8, 7};
    int nr [3] = '{10, 12, 14};
    @(negedge clk) rst = 0;
    for (int d = 0; d < 2; d++)
      for (int m = 0; m < 3; m++) begin
        bitmode = {1'(d), 2'(m)}; start = 1; @(negedge clk); start = 0; bitmode = 0;
        for (int k = 0; k < 25; k++) begin
          prog[d][m][k] = rnd_code;
          next = 1; @(negedge clk); next = 0;
        end
      end
    for (int d = 0; d < 2; d++)
      for (int m = 0; m < 3; m++) begin
        int len;
        len = kx[m] + nr[m] + 4;
        // key expansion: one repeated routine then the 4-word tail
        for (int k = 1; k < kx[m]; k++)
          chk(prog[d][m][k] == prog[d][m][1], $sformatf("mode %0d/%0d kx %0d", d, m, k));
        chk(prog[d][m][kx[m]] == prog[0][0][1], "4-word tail");
        chk(prog[d][m][0] != prog[d][m][1], "load differs from expansion");
        chk(prog[d][m][kx[m] + 1] == prog[0][0][11], "State load after the key part");
        for (int k = kx[m] + 3; k < kx[m] + nr[m] + 2; k++)
          chk(prog[d][m][k] == prog[d][m][kx[m] + 3], $sformatf("mode %0d/%0d round %0d", d, m, k));
        chk(prog[d][m][kx[m] + nr[m] + 2] != prog[d][m][kx[m] + 3], "final round differs");
        chk(prog[d][m][kx[m] + 2] != prog[d][m][kx[m] + 3], "initial round differs");
        chk(prog[d][m][len - 1] == prog[0][0][23], "ends with output");
        chk(prog[d][m][kx[m] + 3] != prog[1 - d][m][kx[m] + 3], "enc/dec rounds differ");
        chk(prog[d][m][0] == prog[1 - d][m][0] && prog[d][m][1] == prog[1 - d][m][1], "enc/dec share key part");
        // entry without a new key
        bitmode = {1'(d), 2'(m)}; new_key = 0; start = 1; @(negedge clk); start = 0; new_key = 1;
        chk(rnd_code == prog[d][m][kx[m] + 1], "new_key = 0 enters at the State load");
        next = 1; @(negedge clk); next = 0;
        chk(rnd_code == prog[d][m][kx[m] + 2], "then the initial round");
      end
    chk(prog[0][0][0] != prog[0][1][0] && prog[0][1][0] != prog[0][2][0], "three load routines");
    chk(prog[0][0][1] != prog[0][1][1] && prog[0][1][1] != prog[0][2][1], "three expansion routines");
    // restart by pcrw
    bitmode = 3'b001; start = 1; @(negedge clk); start = 0;
    next = 1; repeat (5) @(negedge clk); next = 0;
    chk(rnd_code == prog[0][1][5], "pc after 5 steps");
    pcrw = 1; @(negedge clk); pcrw = 0;
    chk(rnd_code == prog[0][1][0], "pcrw restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
