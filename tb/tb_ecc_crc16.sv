// tb_ecc_crc16: the standard check value ("123456789" -> 29B1), random
// messages against a bit-by-bit reference, and the zero remainder obtained
// when the CRC is appended high byte first.
module tb_ecc_crc16;
  import aes_ref_pkg::crc16;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] din;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  ecc_crc16 dut (.clk, .rst_n, .init, .en, .din, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input logic [7:0] msg [], input int n);
    @(negedge clk); init = 1; en = 0;
    @(negedge clk); init = 0;
    for (int i = 0; i < n; i++) begin
      en = 1; din = msg[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    logic [7:0] m [];
    din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = new[9];
    foreach (m[i]) m[i] = 8'h31 + 8'(i);
    feed(m, 9);
    checks++;
    if (crc !== 16'h29b1) begin failures++; $display("check value %h", crc); end
    for (int n = 0; n < 50; n++) begin
      int len;
      logic [15:0] exp;
      len = 1 + ($urandom % 19);
      m = new[len + 2];
      for (int i = 0; i < len; i++) m[i] = 8'($urandom);
      exp = crc16(m, len);
      feed(m, len);
      checks++;
      if (crc !== exp) begin failures++; $display("len %0d crc %h exp %h", len, crc, exp); end
      m[len] = exp[15:8]; m[len+1] = exp[7:0];
      feed(m, len + 2);
      checks++;
      if (crc !== 16'h0000) begin failures++; $display("residue %h", crc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
