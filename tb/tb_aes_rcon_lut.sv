// tb_aes_rcon_lut: steps the round-constant table through its ten terms
// (expected values are successive doublings in GF(2^8) computed here),
// checks that it holds without `adv`, saturates at the last term, and
// restarts on `clr` and on reset.
module tb_aes_rcon_lut;
  logic clk = 0, rst = 1, clr = 0, adv = 0;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  aes_rcon_lut dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] e, input string what);
    checks++;
    if (rcon !== e) begin failures++; $display("FAIL %s: %h expected %h", what, rcon, e); end
  endtask

  initial begin
    logic [7:0] e;
    @(negedge clk) rst = 0;
    e = 8'h01;
    for (int i = 0; i < 10; i++) begin
      chk(e, "term");
      @(negedge clk); chk(e, "hold");        // no adv: unchanged
      adv = 1; @(negedge clk); adv = 0;
      if (i < 9) e = {e[6:0], 1'b0} ^ (e[7] ? 8'h1b : 8'h00);
    end
    chk(8'h36, "saturate");
    clr = 1; @(negedge clk); clr = 0;
    chk(8'h01, "clr");
    adv = 1; repeat (3) @(negedge clk); adv = 0;
    chk(8'h08, "after 3");
    rst = 1; @(negedge clk); rst = 0;
    chk(8'h01, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
