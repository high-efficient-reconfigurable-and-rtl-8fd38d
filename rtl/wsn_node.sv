// wsn_node: self-testing, optionally encrypting wireless sensor node core.
//
// Each operation (started automatically every SAMPLE_PERIOD cycles, or by a
// handshake edge in manual mode) first self-tests the ADC channels and, in
// secured mode, the AES crypto processor. If the test passes it converts the
// eight sensor channels, flags readings above THRESHOLD, packs them into a
// 10-byte packet, encrypts the data bytes with AES-128 in secured mode,
// appends a CRC-16 and sends the frame serially on data_out. tx_completed
// pulses when the frame is out. A failed self test sends the packet with its
// fault bit set straight away.
//
// Ports. Inputs: auto_manual (1 = automatic), secured (1 = secured),
// clk, rst_n (active low, asynchronous), adc_data (8-bit conversion result)
// and adc_done (conversion finished), handshake (manual trigger).
// Outputs: data_out/data_out_en (serial frame, LSB first, one bit per clock),
// tx_completed, adc_sel (3-bit channel select), adc_en (one-cycle conversion
// start), adc_ref (what the ADC front-end connects to the selected input: the
// sensor or one of the three self-test references), and the self-test detail
// fail_ch/fail_crypto.
//
// The pins auto/manual, secured, clock, reset, ADC data, data out, Tx
// completed, 3-bit ADC select and ADC enable follow the node's pin diagram;
// handshake comes from its block diagram; adc_done, adc_ref, data_out_en and
// the fail detail outputs are this design's additions. NODE_KEY is the
// operating AES key (a design choice; it defaults to the FIPS-197 Appendix B
// key).
module wsn_node
  import wsn_pkg::*;
#(
  parameter int unsigned  SAMPLE_PERIOD = 1000,
  parameter byte_t        THRESHOLD     = 8'd100,
  parameter int unsigned  TEST_TOL      = 4,
  parameter logic [127:0] NODE_KEY      = 128'h2b7e151628aed2a6abf7158809cf4f3c
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       auto_manual,
  input  logic       secured,
  input  logic       handshake,
  input  byte_t      adc_data,
  input  logic       adc_done,
  output logic [2:0] adc_sel,
  output logic       adc_en,
  output adc_ref_e   adc_ref,
  output logic       data_out,
  output logic       data_out_en,
  output logic       tx_completed,
  output logic [2:0] fail_ch,
  output logic       fail_crypto
);

  // selection
  logic enable, ack;
  // self test
  logic         t_start, t_active, t_done, t_fault;
  logic [2:0]   t_adc_sel;
  adc_ref_e     t_adc_ref;
  logic         t_adc_start, t_aes_start;
  logic         t_busy;
  // controller / data process
  logic         clear, fault_we, c_adc_start, sample_we, abnormal, set_abn;
  logic [2:0]   c_adc_sel;
  logic         sec_mode, fault_mode;
  logic [4:0]   body_len, frame_len, crc_idx;
  logic         c_aes_start, crc_init, crc_en, tx_start, tx_done, tx_busy;
  state_e       state;
  packet_t      packet;
  frame_t       frame;
  logic [127:0] d_aes_pt;
  // crypto / ecc
  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_key, aes_pt, aes_ct;
  logic [15:0]  crc;

  selection_unit #(.SAMPLE_PERIOD(SAMPLE_PERIOD)) u_sel (
    .clk, .rst_n, .auto_mode(auto_manual), .handshake, .ack, .enable
  );

  control_unit u_ctrl (
    .clk, .rst_n, .enable, .ack,
    .test_start(t_start), .test_active(t_active), .test_done(t_done),
    .test_fault(t_fault),
    .clear, .fault_we, .adc_sel(c_adc_sel), .adc_start(c_adc_start), .adc_done,
    .sample_we, .abnormal, .set_abn, .sec_mode, .body_len,
    .aes_start(c_aes_start), .aes_done,
    .crc_init, .crc_en, .crc_idx,
    .tx_start, .tx_done, .tx_completed, .state
  );

  testing_unit #(.TOL(TEST_TOL)) u_test (
    .clk, .rst_n, .start(t_start), .secured,
    .adc_sel(t_adc_sel), .adc_ref(t_adc_ref), .adc_start(t_adc_start),
    .adc_done, .adc_data,
    .aes_start(t_aes_start), .aes_done, .aes_ct,
    .busy(t_busy), .done(t_done), .fault(t_fault), .fail_ch, .fail_crypto
  );

  data_process_unit #(.THRESHOLD(THRESHOLD)) u_dp (
    .clk, .rst_n, .clear, .secured, .sample_we, .ch(c_adc_sel), .adc_data,
    .set_abn, .fault_we, .fault_in(t_fault), .abnormal, .sec_mode, .fault_mode,
    .packet, .aes_pt(d_aes_pt), .aes_ct, .crc, .frame, .body_len, .frame_len
  );

  // The self test borrows the ADC and the crypto processor.
  assign adc_sel   = t_active ? t_adc_sel   : c_adc_sel;
  assign adc_ref   = t_active ? t_adc_ref   : REF_SENSOR;
  assign adc_en    = t_active ? t_adc_start : c_adc_start;
  assign aes_start = t_active ? t_aes_start : c_aes_start;
  assign aes_key   = t_active ? AES_TEST_KEY : NODE_KEY;
  assign aes_pt    = t_active ? AES_TEST_PT  : d_aes_pt;

  aes_core u_aes (
    .clk, .rst_n, .start(aes_start), .key(aes_key), .pt(aes_pt),
    .busy(aes_busy), .done(aes_done), .ct(aes_ct)
  );

  ecc_crc16 u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_en), .din(frame[crc_idx]), .crc
  );

  tx_unit u_tx (
    .clk, .rst_n, .start(tx_start), .frame, .len(frame_len),
    .data_out, .data_out_en, .busy(tx_busy), .done(tx_done)
  );

  a_no_aes_restart: assert property (@(posedge clk) disable iff (!rst_n)
    aes_start |-> !aes_busy);
  a_no_tx_restart: assert property (@(posedge clk) disable iff (!rst_n)
    tx_start |-> !tx_busy);
  // The ADC and AES multiplexers hand the shared units to the self test only
  // in SELF_TEST, so the test must never run outside it.
  a_test_inside_state: assert property (@(posedge clk) disable iff (!rst_n)
    t_busy |-> state == ST_SELF_TEST);
  // A node that failed its self test sends no sensor data.
  a_fault_sends_no_data: assert property (@(posedge clk) disable iff (!rst_n)
    fault_mode |-> !(state inside {ST_SENSE, ST_SENSE_W, ST_CHECK, ST_SET_BIT,
                                   ST_NEXT, ST_CHK_SEC, ST_CRYPTO, ST_CRC}));
  a_status_fault_bit: assert property (@(posedge clk) disable iff (!rst_n)
    packet[STATUS_BYTE][BIT_FAULT] == fault_mode);

endmodule
