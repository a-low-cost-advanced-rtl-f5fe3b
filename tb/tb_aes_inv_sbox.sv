// tb_aes_inv_sbox: checks that the inverse S-Box undoes a reference S-Box
// computed here (brute-force field inverse plus affine transform) for all
// 256 bytes, plus FIPS-197 spot values.
module tb_aes_inv_sbox;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  aes_inv_sbox dut (.in, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_s(input logic [7:0] a);
    logic [7:0] inv = 8'h00, s;
    for (int b = 1; b < 256; b++) if (mul(a, 8'(b)) == 8'h01) inv = 8'(b);
    s[0] = ^(inv & 8'hf1); s[1] = ^(inv & 8'he3); s[2] = ^(inv & 8'hc7); s[3] = ^(inv & 8'h8f);
    s[4] = ^(inv & 8'h1f); s[5] = ^(inv & 8'h3e); s[6] = ^(inv & 8'h7c); s[7] = ^(inv & 8'hf8);
    return s ^ 8'h63;
  endfunction

  task automatic chk(input logic [7:0] a, input logic [7:0] e);
    in = a; #1;
    checks++;
    if (out !== e) begin failures++; $display("FAIL S^-1(%h) = %h, expected %h", a, out, e); end
  endtask

  initial begin
    chk(8'h63, 8'h00); chk(8'h7c, 8'h01); chk(8'hed, 8'h53); chk(8'h16, 8'hff); chk(8'h00, 8'h52);
    for (int a = 0; a < 256; a++) chk(ref_s(8'(a)), 8'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
