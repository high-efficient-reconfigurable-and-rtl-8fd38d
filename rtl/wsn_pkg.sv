// wsn_pkg: types and constants shared by the sensor node blocks.
//
// The node gathers one byte from each of eight ADC channels into a 10-byte
// packet. Packet layout (little-endian, byte 0 is sent first):
//   bytes 0,1,2,3,5,6,7,8 : ADC channel 0..7
//   byte 4                : reserved for the user (sent as USER_BYTE)
//   byte 9                : control/status
//       bit 7  F     self test failed
//       bit 6  N/AB  some channel reading abnormal
//       bit 5  S/NS  node in secured mode
//       bits 4..0    zero
// The layout and bit positions follow the node's packet definition; the
// ADC reference encoding, the frame layout and the AES self-test vector
// are this design's choices (the vector is the FIPS-197 Appendix C.1 one).
package wsn_pkg;

  localparam int NUM_CH      = 8;
  localparam int PKT_BYTES   = 10;
  localparam int RSVD_BYTE   = 4;
  localparam int STATUS_BYTE = 9;
  localparam int BIT_FAULT   = 7;
  localparam int BIT_ABNORM  = 6;
  localparam int BIT_SECURED = 5;

  // Frame sent on Data Out.
  //   unsecured: packet bytes 0..9, CRC low, CRC high            (12 bytes)
  //   secured  : 16 cipher bytes, status byte, CRC low, CRC high  (19 bytes)
  //   self-test failure: packet bytes 0..9 only, no CRC           (10 bytes)
  localparam int AES_BYTES   = 16;
  localparam int MAX_FRAME   = AES_BYTES + 1 + 2;

  typedef logic [7:0] byte_t;
  typedef logic [PKT_BYTES-1:0][7:0] packet_t;   // packet[i] = byte i
  typedef logic [MAX_FRAME-1:0][7:0] frame_t;    // frame[i]  = byte i

  // What the ADC front-end connects to the selected channel's input.
  typedef enum logic [1:0] {
    REF_SENSOR = 2'd0,   // the sensor itself (normal operation)
    REF_VMAX   = 2'd1,   // full-scale reference voltage
    REF_VHALF  = 2'd2,   // 50 % of the reference voltage
    REF_GND    = 2'd3    // ground
  } adc_ref_e;

  // Main controller states (12, Mealy outputs).
  typedef enum logic [3:0] {
    ST_IDLE      = 4'd0,
    ST_SELF_TEST = 4'd1,
    ST_SENSE     = 4'd2,   // start a conversion on the current channel
    ST_SENSE_W   = 4'd3,   // wait for the conversion ("not ok" self-loop)
    ST_CHECK     = 4'd4,   // compare the reading with the threshold
    ST_SET_BIT   = 4'd5,   // reading abnormal: set N/AB
    ST_NEXT      = 4'd6,   // advance to the next sensor channel
    ST_CHK_SEC   = 4'd7,   // secured mode?
    ST_CRYPTO    = 4'd8,   // AES encryption of the data bytes
    ST_CRC       = 4'd9,   // feed frame bytes through the CRC
    ST_TX        = 4'd10,  // serialise the frame
    ST_TX_DONE   = 4'd11   // Tx completed
  } state_e;

  // Packet byte that holds ADC channel ch (byte 4 is skipped).
  function automatic int unsigned ch_byte(input int unsigned ch);
    return (ch < RSVD_BYTE) ? ch : ch + 1;
  endfunction

  // Crypto self-test vector: FIPS-197 Appendix C.1, AES-128.
  localparam logic [127:0] AES_TEST_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] AES_TEST_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] AES_TEST_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

endpackage
