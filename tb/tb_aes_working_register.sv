// tb_aes_working_register: random loads, shifts and holds against a model;
// checks that a shift moves towards the MSB and fills with 0.
module tb_aes_working_register;
  logic clk = 0, rst = 1, wrrw = 0, sh = 0;
  logic [7:0] d = 0, q, m;
  int checks = 0, failures = 0;
  aes_working_register dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst = 0;
    m = 8'h00;
    checks++; if (q !== 8'h00) failures++;
    for (int i = 0; i < 2000; i++) begin
      wrrw = 1'($urandom); sh = 1'($urandom); d = 8'($urandom);
      @(negedge clk);
      if (wrrw && sh) m = m << 1; else if (wrrw) m = d;
      checks++;
      if (q !== m) begin failures++; $display("FAIL step %0d: q=%h expected %h", i, q, m); end
    end
    wrrw = 1; sh = 0; d = 8'hc3; @(negedge clk);
    sh = 1; @(negedge clk);
    checks++; if (q !== 8'h86) begin failures++; $display("FAIL shift c3 -> %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
