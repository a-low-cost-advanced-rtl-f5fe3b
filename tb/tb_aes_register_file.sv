// tb_aes_register_file: random writes, reads and row rotations against a
// 256-byte model.  A rotation of row n must move State bytes 4c+n to 4c'+n
// with c' = c-1 (mod 4) and leave every other byte alone; a write with
// shiftctl = 0 updates only the addressed byte; reset clears everything.
module tb_aes_register_file;
  logic clk = 0, rst = 1, we = 0;
  logic [7:0] addr = 0, wd = 0, rd;
  logic [1:0] shiftctl = 0;
  logic [7:0] m [256];
  logic [7:0] t [4];
  int checks = 0, failures = 0;
  aes_register_file dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (rd !== m[a]) begin failures++; $display("FAIL %s: RF[%0d] = %h expected %h", what, a, rd, m[a]); end
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk) rst = 0;
    m = '{default: 8'h00};
    check_all("reset");
    for (int a = 0; a < 256; a++) begin
      we = 1; addr = 8'(a); wd = 8'($urandom); m[a] = wd;
      @(negedge clk);
    end
    we = 0;
    check_all("fill");
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); addr = 8'($urandom); wd = 8'($urandom);
      shiftctl = ($urandom % 4 == 0) ? 2'($urandom) : 2'd0;
      if (addr < 32 && i % 2 == 0) addr = 8'($urandom % 16);
      @(negedge clk);
      if (we && shiftctl != 0) begin
        for (int c = 0; c < 4; c++) t[c] = m[4*c + shiftctl];
        for (int c = 0; c < 4; c++) m[4*c + shiftctl] = t[(c+1)%4];
      end else if (we) m[addr] = wd;
      shiftctl = 0; #1;
      checks++;
      if (rd !== m[addr]) begin failures++; $display("FAIL step %0d: RF[%0d] = %h expected %h", i, addr, rd, m[addr]); end
    end
    we = 0;
    check_all("random");
    rst = 1; @(negedge clk); rst = 0;
    m = '{default: 8'h00};
    check_all("reset 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
