// tb_aes_sbox: checks all 256 S-box entries against the S-box computed from
// its definition (GF(2^8) inverse and affine map) and a few published values.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] i, o;
  int checks = 0, failures = 0;

  aes_sbox dut (.i, .o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] a, input logic [7:0] exp);
    i = a; #1;
    checks++;
    if (o !== exp) begin
      failures++;
      $display("sbox(%02h) = %02h, expected %02h", a, o, exp);
    end
  endtask

  initial begin
    chk(8'h00, 8'h63); chk(8'h01, 8'h7c); chk(8'h53, 8'hed); chk(8'hff, 8'h16);
    for (int a = 0; a < 256; a++) chk(8'(a), sbox(8'(a)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
