// tb_aes_sbox: checks all 256 S-Box entries against a reference computed
// here by brute force (inverse found by searching GF(2^8) products, then the
// affine transform written as a matrix-vector product), plus FIPS-197 spot
// values.
module tb_aes_sbox;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  aes_sbox dut (.in, .out);

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
    // rows of the affine matrix (bit 0 first): 8f c7 e3 f1 f8 7c 3e 1f
    s[0] = ^(inv & 8'hf1); s[1] = ^(inv & 8'he3); s[2] = ^(inv & 8'hc7); s[3] = ^(inv & 8'h8f);
    s[4] = ^(inv & 8'h1f); s[5] = ^(inv & 8'h3e); s[6] = ^(inv & 8'h7c); s[7] = ^(inv & 8'hf8);
    return s ^ 8'h63;
  endfunction

  task automatic chk(input logic [7:0] a, input logic [7:0] e);
    in = a; #1;
    checks++;
    if (out !== e) begin failures++; $display("FAIL S(%h) = %h, expected %h", a, out, e); end
  endtask

  initial begin
    chk(8'h00, 8'h63); chk(8'h01, 8'h7c); chk(8'h53, 8'hed); chk(8'hff, 8'h16);
    chk(8'h10, 8'hca); chk(8'hc9, 8'hdd); chk(8'h8d, 8'h5d);
    for (int a = 0; a < 256; a++) chk(8'(a), ref_s(8'(a)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
