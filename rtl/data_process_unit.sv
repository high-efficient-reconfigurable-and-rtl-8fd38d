// data_process_unit: sample store, abnormal-reading check and packet/frame
// assembly of the sensor node.
//
// It keeps one byte per ADC channel, written when the controller asserts
// `sample_we` for channel `ch`. `abnormal` tells whether the stored reading of
// channel `ch` is above THRESHOLD; the controller answers with `set_abn`,
// which sets the packet's N/AB bit. `clear` (start of an operation) zeroes the
// samples and flags and latches the secured/unsecured input for the whole
// operation; `fault_we` copies the self-test result into the F bit.
//
// The 10-byte packet is built combinationally: channel bytes at 0-3 and 5-8,
// USER_BYTE at byte 4, status byte 9 = {F, N/AB, S/NS, 5'b0}. The crypto
// plaintext is packet bytes 0..8 followed by seven zero bytes. The frame
// handed to the transmitter is, byte 0 first:
//   fault     : packet bytes 0..9                  (10 bytes, no CRC)
//   unsecured : packet bytes 0..9, CRC[7:0], CRC[15:8]          (12 bytes)
//   secured   : 16 cipher bytes, status byte, CRC[7:0], CRC[15:8] (19)
// `body_len` is the number of frame bytes covered by the CRC, `frame_len` the
// number sent. Everything except the sample/flag registers is combinational.
//
// The packet layout and the threshold of 100 (shown in the node's ADC channel
// simulation) follow the node description; "above the threshold means
// abnormal", the plaintext padding and the frame layout are this design's
// choices.
module data_process_unit
  import wsn_pkg::*;
#(
  parameter byte_t THRESHOLD = 8'd100,
  parameter byte_t USER_BYTE = 8'h00
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         secured,
  input  logic         sample_we,
  input  logic [2:0]   ch,
  input  byte_t        adc_data,
  input  logic         set_abn,
  input  logic         fault_we,
  input  logic         fault_in,
  output logic         abnormal,
  output logic         sec_mode,
  output logic         fault_mode,
  output packet_t      packet,
  output logic [127:0] aes_pt,
  input  logic [127:0] aes_ct,
  input  logic [15:0]  crc,
  output frame_t       frame,
  output logic [4:0]   body_len,
  output logic [4:0]   frame_len
);

  byte_t samples [NUM_CH];
  logic  abn_q, fault_q, sec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) samples[i] <= '0;
      abn_q   <= 1'b0;
      fault_q <= 1'b0;
      sec_q   <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < NUM_CH; i++) samples[i] <= '0;
      abn_q   <= 1'b0;
      fault_q <= 1'b0;
      sec_q   <= secured;
    end else begin
      if (sample_we) samples[ch] <= adc_data;
      if (set_abn)   abn_q       <= 1'b1;
      if (fault_we)  fault_q     <= fault_in;
    end
  end

  assign abnormal   = samples[ch] > THRESHOLD;
  assign sec_mode   = sec_q;
  assign fault_mode = fault_q;

  always_comb begin
    packet = '0;
    for (int c = 0; c < NUM_CH; c++) packet[ch_byte(c)] = samples[c];
    packet[RSVD_BYTE]   = USER_BYTE;
    packet[STATUS_BYTE] = '0;
    packet[STATUS_BYTE][BIT_FAULT]   = fault_q;
    packet[STATUS_BYTE][BIT_ABNORM]  = abn_q;
    packet[STATUS_BYTE][BIT_SECURED] = sec_q;
  end

  always_comb begin
    aes_pt = '0;
    for (int b = 0; b < PKT_BYTES - 1; b++) aes_pt[127-8*b -: 8] = packet[b];
  end

  always_comb begin
    frame = '0;
    if (sec_q && !fault_q) begin
      for (int b = 0; b < AES_BYTES; b++) frame[b] = aes_ct[127-8*b -: 8];
      frame[AES_BYTES] = packet[STATUS_BYTE];
      body_len = 5'(AES_BYTES + 1);
    end else begin
      for (int b = 0; b < PKT_BYTES; b++) frame[b] = packet[b];
      body_len = 5'(PKT_BYTES);
    end
    if (fault_q) begin
      frame_len = body_len;
    end else begin
      frame[body_len]        = crc[7:0];
      frame[body_len + 5'd1] = crc[15:8];
      frame_len              = body_len + 5'd2;
    end
  end

endmodule
