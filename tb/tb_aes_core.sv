// tb_aes_core: FIPS-197 known answers (Appendix B and C.1) plus random
// key/plaintext pairs against the reference model; also checks that done
// comes exactly 11 cycles after start and that ct holds afterwards.
module tb_aes_core;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, pt, ct;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_core dut (.clk, .rst_n, .start, .key, .pt, .busy, .done, .ct);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int lat = 0;
    @(negedge clk); key = k; pt = p; start = 1;
    @(negedge clk); start = 0; key = '0; pt = '0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("ct %h expected %h", ct, exp);
    end
    checks++;
    if (lat != 11) begin
      failures++;
      $display("latency %0d, expected 11", lat);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (ct !== exp || busy) begin
      failures++;
      $display("ct not held after done");
    end
  endtask

  initial begin
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 20; n++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
