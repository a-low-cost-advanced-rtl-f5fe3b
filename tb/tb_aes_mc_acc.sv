// tb_aes_mc_acc: random selected writes and reads of the four accumulator
// registers against a model; checks that only the selected register changes.
module tb_aes_mc_acc;
  logic clk = 0, rst = 1, mcrw = 0;
  logic [1:0] mixctl = 0;
  logic [7:0] d = 0, q;
  logic [7:0] m [4];
  int checks = 0, failures = 0;
  aes_mc_acc dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst = 0;
    m = '{default: 8'h00};
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      mcrw = 1'($urandom); mixctl = 2'($urandom); d = 8'($urandom);
      @(negedge clk);
      if (mcrw) m[mixctl] = d;
      mixctl = 2'($urandom); #1;
      checks++;
      if (q !== m[mixctl]) begin failures++; $display("FAIL read MC%0d = %h expected %h", mixctl, q, m[mixctl]); end
      mcrw = 0;
      for (int r = 0; r < 4; r++) begin
        mixctl = 2'(r); #1;
        checks++;
        if (q !== m[r]) begin failures++; $display("FAIL MC%0d = %h expected %h", r, q, m[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
