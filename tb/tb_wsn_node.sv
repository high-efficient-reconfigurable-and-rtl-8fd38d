// tb_wsn_node: end-to-end test of the sensor node at its default parameters.
//
// An ADC model supplies the sensor readings and the self-test references. A
// receiver rebuilds each frame from data_out/data_out_en and compares it
// with a frame computed here from the readings: packet layout, status bits,
// AES-128 ciphertext (reference model) in secured mode and the CRC-16.
// Operations run in manual mode (handshake edges) and automatic mode (timer),
// secured and unsecured, with and without abnormal readings, and with a
// broken ADC channel and a corrupted crypto result during the self test,
// each of which must produce a fault frame. Each mechanism is
// counted and must occur at least once.
module tb_wsn_node;
  import wsn_pkg::*;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic clk = 0, rst_n = 0, auto_manual = 0, secured = 0, handshake = 0;
  byte_t adc_data;
  logic adc_done, adc_en, data_out, data_out_en, tx_completed, fail_crypto;
  logic [2:0] adc_sel, fail_ch;
  adc_ref_e adc_ref;
  byte_t sensor [NUM_CH];
  logic [NUM_CH-1:0] broken;
  int checks = 0, failures = 0;

  wsn_node dut (.*);

  adc_model u_adc (.clk, .rst_n, .sel(adc_sel), .ref_sel(adc_ref), .start(adc_en),
                   .sensor, .broken, .data(adc_data), .done(adc_done));

  always #5 clk = ~clk;

  // receiver
  byte_t rx [$];
  int    rx_bits;
  byte_t cur;
  always @(posedge clk) if (rst_n && data_out_en) begin
    cur[rx_bits % 8] = data_out;
    rx_bits++;
    if (rx_bits % 8 == 0) rx.push_back(cur);
  end

  // mechanism counters
  int n_crypto_fail, n_manual, n_auto, n_fault, n_setbit, n_crypto, n_bypass, n_crc_ok, n_selftest;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.set_abn)   n_setbit++;
    if (dut.u_ctrl.aes_start) n_crypto++;
    if (dut.u_ctrl.state == ST_CHK_SEC && !dut.sec_mode) n_bypass++;
    if (dut.u_ctrl.test_start) n_selftest++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // Build the expected frame for the current inputs.
  function automatic void expected(input logic sec, input logic flt, output byte_t f [$]);
    byte_t p [10];
    logic abn;
    logic [127:0] pt, ct;
    byte_t body [];
    logic [15:0] c;
    int pos [8] = '{0, 1, 2, 3, 5, 6, 7, 8};
    abn = 0;
    foreach (p[i]) p[i] = 0;
    if (!flt)
      for (int ch = 0; ch < 8; ch++) begin
        p[pos[ch]] = sensor[ch];
        if (sensor[ch] > 100) abn = 1;
      end
    p[9] = {flt, abn, sec, 5'b0};
    f = {};
    if (flt) begin
      foreach (p[i]) f.push_back(p[i]);
      return;
    end
    if (sec) begin
      pt = '0;
      for (int b = 0; b < 9; b++) pt[127-8*b -: 8] = p[b];
      ct = encrypt(KEY, pt);
      for (int b = 0; b < 16; b++) f.push_back(ct[127-8*b -: 8]);
      f.push_back(p[9]);
    end else begin
      foreach (p[i]) f.push_back(p[i]);
    end
    body = new[f.size()];
    foreach (f[i]) body[i] = f[i];
    c = crc16(body, f.size());
    f.push_back(c[7:0]);
    f.push_back(c[15:8]);
  endfunction

  task automatic wait_frame(input logic sec, input logic flt, input string tag);
    byte_t exp [$];
    int t0;
    t0 = rx_bits;
    while (!tx_completed) @(negedge clk);
    expected(sec, flt, exp);
    chk(rx.size() == exp.size(), {tag, ": frame length"});
    if (rx.size() == exp.size())
      foreach (exp[i]) chk(rx[i] == exp[i], {tag, ": frame byte"});
    chk(rx_bits - t0 == 8 * exp.size(), {tag, ": bit count"});
    if (!flt) begin
      byte_t body [];
      body = new[rx.size()];
      foreach (rx[i]) body[i] = rx[i];
      // a receiver-side check: the CRC over body + CRC (high byte first) is zero
      if (rx.size() >= 2) begin
        byte_t t;
        t = body[rx.size()-2]; body[rx.size()-2] = body[rx.size()-1]; body[rx.size()-1] = t;
        if (crc16(body, rx.size()) == 16'h0) n_crc_ok++;
      end
    end else begin
      chk(rx.size() > 9 && rx[9][BIT_FAULT], {tag, ": fault bit"});
      n_fault++;
    end
    rx = {};
    @(negedge clk);
  endtask

  task automatic manual_op(input logic sec, input logic flt, input string tag);
    secured = sec;
    @(negedge clk); handshake = 1;
    repeat (3) @(negedge clk); handshake = 0;
    n_manual++;
    wait_frame(sec, flt, tag);
  endtask

  task automatic randomize_sensors(input int max_val);
    for (int c = 0; c < NUM_CH; c++) sensor[c] = byte_t'($urandom % (max_val + 1));
  endtask

  initial begin
    longint t_start, t_end;
    rx_bits = 0; broken = '0;
    n_crypto_fail = 0; n_manual = 0; n_auto = 0; n_fault = 0; n_setbit = 0; n_crypto = 0; n_bypass = 0;
    n_crc_ok = 0; n_selftest = 0;
    randomize_sensors(100);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    chk(!tx_completed && !data_out_en, "quiet in manual mode without handshake");

    // manual, unsecured, all readings normal
    randomize_sensors(100);
    manual_op(0, 0, "manual unsecured normal");
    chk(n_setbit == 0, "no set-bit for normal readings");
    // manual, secured, abnormal readings
    randomize_sensors(255); sensor[2] = 8'd200;
    manual_op(1, 0, "manual secured abnormal");
    chk(n_setbit > 0, "set-bit for abnormal reading");
    // manual, unsecured, abnormal
    randomize_sensors(255); sensor[7] = 8'd101;
    manual_op(0, 0, "manual unsecured abnormal");
    // threshold boundary: exactly 100 is normal
    for (int c = 0; c < NUM_CH; c++) sensor[c] = 8'd100;
    manual_op(1, 0, "boundary");
    // broken ADC channel -> fault frame, secured and unsecured
    broken = 8'b0000_1000; randomize_sensors(255);
    manual_op(0, 1, "fault unsecured");
    chk(fail_ch == 3 && !fail_crypto, "failing channel reported");
    manual_op(1, 1, "fault secured");
    broken = '0;
    // crypto processor corrupted during the self test -> fault frame
    randomize_sensors(255); secured = 1;
    @(negedge clk); handshake = 1;
    repeat (3) @(negedge clk); handshake = 0;
    n_manual++;
    while (dut.u_ctrl.state != ST_SELF_TEST || !dut.u_aes.done) @(negedge clk);
    force dut.aes_ct = 128'h0;
    @(negedge clk);
    release dut.aes_ct;
    wait_frame(1, 1, "crypto self-test failure");
    chk(fail_crypto, "crypto failure reported");
    n_crypto_fail++;
    // a good crypto processor again: normal secured frame
    manual_op(1, 0, "secured after crypto failure");

    // automatic mode: two operations, one period apart
    auto_manual = 1; secured = 1; randomize_sensors(255);
    while (!dut.u_ctrl.ack) @(negedge clk);
    t_start = $time;
    n_auto++;
    wait_frame(1, 0, "automatic secured");
    randomize_sensors(255); secured = 0;
    while (!dut.u_ctrl.ack) @(negedge clk);
    t_end = $time;
    n_auto++;
    chk((t_end - t_start) / 10 == 1000, "automatic period 1000 cycles");
    wait_frame(0, 0, "automatic unsecured");
    // back to manual
    auto_manual = 0;
    randomize_sensors(255);
    manual_op(1, 0, "manual after automatic");

    $display("mechanisms: crypto_fail=%0d manual=%0d auto=%0d selftest=%0d fault=%0d setbit=%0d crypto=%0d bypass=%0d crc_ok=%0d",
             n_crypto_fail, n_manual, n_auto, n_selftest, n_fault, n_setbit, n_crypto, n_bypass, n_crc_ok);
    chk(n_manual > 0, "manual trigger happened");
    chk(n_auto > 0, "automatic trigger happened");
    chk(n_selftest > 0, "self test happened");
    chk(n_fault > 0, "self-test failure happened");
    chk(n_crypto_fail > 0, "crypto self-test failure happened");
    chk(n_setbit > 0, "abnormal set-bit happened");
    chk(n_crypto > 0, "encryption happened");
    chk(n_bypass > 0, "unsecured bypass happened");
    chk(n_crc_ok > 0, "CRC verified by receiver");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
