// tb_data_process_unit: writes random samples, checks the abnormal compare
// against the threshold of 100, the packet layout (byte 4 reserved, status
// bits F/N-AB/S-NS in byte 9), the crypto plaintext and the three frame
// layouts and lengths.
module tb_data_process_unit;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, secured = 0, sample_we = 0, set_abn = 0;
  logic fault_we = 0, fault_in = 0;
  logic [2:0] ch;
  byte_t adc_data;
  logic abnormal, sec_mode, fault_mode;
  packet_t packet;
  logic [127:0] aes_pt, aes_ct;
  logic [15:0] crc;
  frame_t frame;
  logic [4:0] body_len, frame_len;
  int checks = 0, failures = 0;
  localparam int POS [8] = '{0, 1, 2, 3, 5, 6, 7, 8};

  data_process_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    byte_t s [8];
    ch = 0; adc_data = 0; aes_ct = '0; crc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      logic any_abn, sec, flt;
      sec = n[0]; flt = (n % 5 == 4);
      secured = sec; clear = 1; @(negedge clk); clear = 0; secured = !sec;
      any_abn = 0;
      for (int c = 0; c < 8; c++) begin
        s[c] = (n < 3) ? byte_t'(95 + 3 * c) : byte_t'($urandom);
        ch = 3'(c); adc_data = s[c]; sample_we = 1; @(negedge clk); sample_we = 0;
        chk(abnormal == (s[c] > 100), "abnormal compare");
        if (abnormal) begin set_abn = 1; any_abn = 1; @(negedge clk); set_abn = 0; end
      end
      fault_we = 1; fault_in = flt; @(negedge clk); fault_we = 0;
      aes_ct = {$urandom, $urandom, $urandom, $urandom};
      crc = 16'($urandom);
      #1;
      chk(sec_mode == sec && fault_mode == flt, "mode latches");
      for (int c = 0; c < 8; c++) chk(packet[POS[c]] == s[c], "channel byte position");
      chk(packet[4] == 8'h00, "reserved byte");
      chk(packet[9] == {flt, any_abn, sec, 5'b0}, "status byte");
      for (int b = 0; b < 9; b++) chk(aes_pt[127-8*b -: 8] == packet[b], "plaintext byte");
      chk(aes_pt[55:0] == '0, "plaintext padding");
      if (flt) begin
        chk(frame_len == 10 && body_len == 10, "fault frame length");
        for (int b = 0; b < 10; b++) chk(frame[b] == packet[b], "fault frame byte");
      end else if (sec) begin
        chk(frame_len == 19 && body_len == 17, "secured frame length");
        for (int b = 0; b < 16; b++) chk(frame[b] == aes_ct[127-8*b -: 8], "cipher byte");
        chk(frame[16] == packet[9], "status after cipher");
        chk(frame[17] == crc[7:0] && frame[18] == crc[15:8], "crc bytes");
      end else begin
        chk(frame_len == 12 && body_len == 10, "unsecured frame length");
        for (int b = 0; b < 10; b++) chk(frame[b] == packet[b], "plain frame byte");
        chk(frame[10] == crc[7:0] && frame[11] == crc[15:8], "crc bytes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
