// tb_aes_modflag: the stored flag must capture `msb` only when `modrw` is high and
// the output byte must be 1b for a captured 1 and 00 for a 0.
module tb_aes_modflag;
  logic clk = 0, rst = 1, modrw = 0, msb = 0;
  logic [7:0] modbyte;
  logic m;
  int checks = 0, failures = 0;
  aes_modflag dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst = 0;
    m = 0;
    for (int i = 0; i < 1000; i++) begin
      modrw = 1'($urandom); msb = 1'($urandom);
      @(negedge clk);
      if (modrw) m = msb;
      checks++;
      if (modbyte !== (m ? 8'h1b : 8'h00)) begin
        failures++; $display("FAIL step %0d: byte=%h expected flag %b", i, modbyte, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
