// tb_testing_unit: runs the self test against the ADC model and the real
// AES core. Cases: all good (unsecured and secured), a half-scale reading
// just inside and just outside the tolerance, a broken channel (the test
// must stop there and name it), and a corrupted crypto output in secured and
// unsecured mode. Checks the sequence of 24 conversions and the cycle count
// 1 + 24*(CONV+2) (+12 for the crypto test), counted from the start pulse.
module tb_testing_unit;
  import wsn_pkg::*;
  localparam int CONV = 3;
  logic clk = 0, rst_n = 0, start = 0, secured = 0;
  logic [2:0] adc_sel;
  adc_ref_e adc_ref;
  logic adc_start, adc_done;
  byte_t adc_data;
  logic aes_start, aes_done, aes_busy;
  logic [127:0] aes_ct, ct_raw, ct_flip;
  logic busy, done, fault, fail_crypto;
  logic [2:0] fail_ch;
  byte_t sensor [NUM_CH];
  logic [NUM_CH-1:0] broken;
  int checks = 0, failures = 0;
  int nconv;
  int half_err;

  testing_unit #(.TOL(4)) dut (.*);

  aes_core u_aes (.clk, .rst_n, .start(aes_start), .key(AES_TEST_KEY), .pt(AES_TEST_PT),
                  .busy(aes_busy), .done(aes_done), .ct(ct_raw));
  assign aes_ct = ct_raw ^ ct_flip;

  // two ADC models differing only in the half-scale error; half_err picks one
  byte_t d_a, d_b; logic dn_a, dn_b;
  adc_model #(.CONV_CYCLES(CONV), .HALF_ERR(3)) u_adc_a (.clk, .rst_n, .sel(adc_sel),
    .ref_sel(adc_ref), .start(adc_start), .sensor, .broken, .data(d_a), .done(dn_a));
  adc_model #(.CONV_CYCLES(CONV), .HALF_ERR(4)) u_adc_b (.clk, .rst_n, .sel(adc_sel),
    .ref_sel(adc_ref), .start(adc_start), .sensor, .broken, .data(d_b), .done(dn_b));
  assign adc_data = (half_err == 4) ? d_b : d_a;
  assign adc_done = (half_err == 4) ? dn_b : dn_a;

  always #5 clk = ~clk;

  // expected order: channel-major, references max, half, ground
  always @(posedge clk) if (rst_n && adc_start) begin
    checks++;
    if (adc_sel != 3'(nconv / 3) || adc_ref != adc_ref_e'(2'(nconv % 3 + 1))) begin
      failures++;
      $display("conversion %0d: ch %0d ref %0d", nconv, adc_sel, adc_ref);
    end
    nconv++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input logic sec, input int herr, input logic [NUM_CH-1:0] brk,
                     input logic flip, output int cycles);
    secured = sec; half_err = herr; broken = brk;
    ct_flip = flip ? 128'h1 : '0;
    nconv = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    for (int c = 0; c < NUM_CH; c++) sensor[c] = 8'(17 * c);
    broken = '0; ct_flip = '0; half_err = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;

    run(0, 3, '0, 0, cyc);
    chk(!fault && !fail_crypto, "good node unsecured passes");
    chk(nconv == 24, "24 conversions");
    chk(cyc == 1 + 24 * (CONV + 2), "unsecured test length");

    run(1, 3, '0, 0, cyc);
    chk(!fault && !fail_crypto, "good node secured passes");
    chk(cyc == 1 + 24 * (CONV + 2) + 12, "secured test length");

    run(0, 4, '0, 0, cyc);
    chk(fault && fail_ch == 0 && !fail_crypto, "half-scale error equal to tolerance fails");
    chk(nconv == 2, "stops at first failing reading");

    run(0, 3, 8'b0010_0000, 0, cyc);
    chk(fault && fail_ch == 5, "broken channel 5 found");
    chk(nconv == 5 * 3 + 1, "stops at channel 5");

    run(1, 3, '0, 1, cyc);
    chk(fault && fail_crypto, "corrupted crypto output found");

    run(0, 3, '0, 1, cyc);
    chk(!fault && !fail_crypto, "crypto not tested when unsecured");

    run(1, 3, '0, 0, cyc);
    chk(!fault && !fail_crypto, "result cleared by the next test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
