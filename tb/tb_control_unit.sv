// tb_control_unit: drives the controller with simple responders standing in
// for the self test, ADC, crypto processor and transmitter, and checks the
// strobes it issues on the three paths (self-test failure, unsecured,
// secured): how many conversions, abnormal set-bit steps, CRC bytes,
// encryptions and transmissions, the state order, and tx_completed.
module tb_control_unit;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  logic ack, test_start, test_active, test_done, test_fault;
  logic clear, fault_we, adc_start, adc_done, sample_we, abnormal, set_abn, sec_mode;
  logic [2:0] adc_sel;
  logic [4:0] body_len, crc_idx;
  logic aes_start, aes_done, crc_init, crc_en, tx_start, tx_done, tx_completed;
  state_e state;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // responders
  logic [7:0] abn_mask;
  logic       fault_cfg;
  int t_cnt = 0, a_cnt = 0, c_cnt = 0, x_cnt = 0;
  int n_ack, n_sample, n_setabn, n_aes, n_crc, n_tx, n_txc, n_test;
  logic [4:0] crc_seen;
  assign abnormal = abn_mask[adc_sel];
  always @(posedge clk) begin
    test_done <= 1'b0; adc_done <= 1'b0; aes_done <= 1'b0; tx_done <= 1'b0;
    if (test_start) t_cnt <= 30; else if (t_cnt > 0) begin
      t_cnt <= t_cnt - 1; if (t_cnt == 1) test_done <= 1'b1;
    end
    if (adc_start) a_cnt <= 3; else if (a_cnt > 0) begin
      a_cnt <= a_cnt - 1; if (a_cnt == 1) adc_done <= 1'b1;
    end
    if (aes_start) c_cnt <= 11; else if (c_cnt > 0) begin
      c_cnt <= c_cnt - 1; if (c_cnt == 1) aes_done <= 1'b1;
    end
    if (tx_start) x_cnt <= 40; else if (x_cnt > 0) begin
      x_cnt <= x_cnt - 1; if (x_cnt == 1) tx_done <= 1'b1;
    end
    if (rst_n) begin
      if (sample_we && adc_sel != 3'(n_sample)) begin
        failures++; $display("sample for channel %0d out of order", adc_sel);
      end
      n_ack += int'(ack); n_sample += int'(sample_we); n_setabn += int'(set_abn);
      n_aes += int'(aes_start); n_tx += int'(tx_start); n_txc += int'(tx_completed);
      n_test += int'(test_start);
      if (crc_en) begin
        if (crc_idx != 5'(n_crc)) begin failures++; $display("crc index %0d", crc_idx); end
        n_crc++;
      end
      if (test_active != (state == ST_SELF_TEST)) begin failures++; $display("test_active"); end
    end
  end
  assign test_fault = fault_cfg;

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

  task automatic op(input logic flt, input logic sec, input logic [7:0] mask);
    fault_cfg = flt; sec_mode = sec; abn_mask = mask;
    body_len = sec ? 5'd17 : 5'd10;
    n_ack = 0; n_sample = 0; n_setabn = 0; n_aes = 0; n_crc = 0; n_tx = 0; n_txc = 0; n_test = 0;
    @(negedge clk); enable = 1;
    do @(negedge clk); while (state == ST_IDLE);
    enable = 0;
    while (!tx_completed) @(negedge clk);
    @(negedge clk);
    chk(state == ST_IDLE, "back to idle");
    chk(n_ack == 1 && n_test == 1 && n_tx == 1 && n_txc == 1, "one test, one transmission");
    if (flt) begin
      chk(n_sample == 0 && n_crc == 0 && n_aes == 0, "failed self test goes straight to Tx");
    end else begin
      chk(n_sample == 8, "eight conversions");
      chk(n_setabn == $countones(mask), "one set-bit per abnormal channel");
      chk(n_aes == int'(sec), "encryption only when secured");
      chk(n_crc == int'(body_len), "CRC over the frame body");
    end
  endtask

  initial begin
    fault_cfg = 0; sec_mode = 0; abn_mask = 0; body_len = 10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) begin @(negedge clk); chk(state == ST_IDLE && !ack, "idle without enable"); end
    op(0, 0, 8'h00);
    op(0, 0, 8'b1000_0101);
    op(0, 1, 8'h10);
    op(1, 1, 8'hff);
    op(1, 0, 8'h00);
    op(0, 1, 8'hff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
