// control_unit: the node's main state machine.
//
// Twelve states, Mealy outputs (several strobes depend on the inputs seen in
// the current state). One operation, started by `enable` from the selection
// block, runs:
//   IDLE -> SELF_TEST. If the self test fails: -> TX (the packet with F set is
//   sent at once, without CRC). Otherwise, for each channel 0..7:
//   SENSE (start conversion) -> SENSE_W (wait for adc_done, store the byte)
//   -> CHECK -> SET_BIT when the reading is abnormal -> NEXT.
//   After channel 7: CHK_SEC -> CRYPTO (secured mode only) -> CRC -> TX ->
//   TX_DONE -> IDLE.
// In CRC the frame bytes 0 .. body_len-1 are fed to the CRC, one per clock,
// through `crc_idx`; the transmitter is started on the same edge that
// folds in the last byte and reads the CRC bytes once they have settled.
//
// Interface: all strobes (ack, test_start, clear, adc_start, sample_we,
// set_abn, fault_we, aes_start, crc_init, crc_en, tx_start) are one-cycle
// pulses. `tx_completed` is high for one cycle in TX_DONE. `adc_sel` is the
// current channel. `test_active` is high while the self test owns the ADC and
// crypto processor.
//
// The states and their order follow the node's state diagram and flow chart
// (idle until enable, self test, per-sensor acquire/check/set-bit, check
// secured, crypto, CRC, Tx); the split of "sensor node" into a start and a
// wait state, the separate NEXT and TX_DONE states and all handshakes are this
// design's choices.
module control_unit
  import wsn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        ack,
  // self test
  output logic        test_start,
  output logic        test_active,
  input  logic        test_done,
  input  logic        test_fault,
  // data process unit
  output logic        clear,
  output logic        fault_we,
  output logic [2:0]  adc_sel,
  output logic        adc_start,
  input  logic        adc_done,
  output logic        sample_we,
  input  logic        abnormal,
  output logic        set_abn,
  input  logic        sec_mode,
  input  logic [4:0]  body_len,
  // crypto
  output logic        aes_start,
  input  logic        aes_done,
  // ECC
  output logic        crc_init,
  output logic        crc_en,
  output logic [4:0]  crc_idx,
  // transmission
  output logic        tx_start,
  input  logic        tx_done,
  output logic        tx_completed,
  output state_e      state
);

  state_e     st_q, st_d;
  logic [2:0] ch_q;
  logic [4:0] idx_q;

  assign state       = st_q;
  assign adc_sel     = ch_q;
  assign crc_idx     = idx_q;
  assign test_active = (st_q == ST_SELF_TEST);

  always_comb begin
    st_d         = st_q;
    ack          = 1'b0;
    test_start   = 1'b0;
    clear        = 1'b0;
    fault_we     = 1'b0;
    adc_start    = 1'b0;
    sample_we    = 1'b0;
    set_abn      = 1'b0;
    aes_start    = 1'b0;
    crc_init     = 1'b0;
    crc_en       = 1'b0;
    tx_start     = 1'b0;
    tx_completed = 1'b0;
    unique case (st_q)
      ST_IDLE: if (enable) begin
        ack        = 1'b1;
        clear      = 1'b1;
        test_start = 1'b1;
        st_d       = ST_SELF_TEST;
      end
      ST_SELF_TEST: if (test_done) begin
        fault_we = 1'b1;
        if (test_fault) begin
          tx_start = 1'b1;
          st_d     = ST_TX;
        end else begin
          st_d = ST_SENSE;
        end
      end
      ST_SENSE: begin
        adc_start = 1'b1;
        st_d      = ST_SENSE_W;
      end
      ST_SENSE_W: if (adc_done) begin
        sample_we = 1'b1;
        st_d      = ST_CHECK;
      end
      ST_CHECK: st_d = abnormal ? ST_SET_BIT : ST_NEXT;
      ST_SET_BIT: begin
        set_abn = 1'b1;
        st_d    = ST_NEXT;
      end
      ST_NEXT: st_d = (ch_q == 3'(NUM_CH - 1)) ? ST_CHK_SEC : ST_SENSE;
      ST_CHK_SEC: if (sec_mode) begin
        aes_start = 1'b1;
        st_d      = ST_CRYPTO;
      end else begin
        crc_init = 1'b1;
        st_d     = ST_CRC;
      end
      ST_CRYPTO: if (aes_done) begin
        crc_init = 1'b1;
        st_d     = ST_CRC;
      end
      ST_CRC: begin
        crc_en = 1'b1;
        if (idx_q == body_len - 5'd1) begin
          tx_start = 1'b1;
          st_d     = ST_TX;
        end
      end
      ST_TX: if (tx_done) st_d = ST_TX_DONE;
      ST_TX_DONE: begin
        tx_completed = 1'b1;
        st_d         = ST_IDLE;
      end
      default: st_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= ST_IDLE;
      ch_q  <= '0;
      idx_q <= '0;
    end else begin
      st_q <= st_d;
      if (clear)                                ch_q <= '0;
      else if (st_q == ST_NEXT && st_d == ST_SENSE) ch_q <= ch_q + 3'd1;
      if (crc_init)    idx_q <= '0;
      else if (crc_en) idx_q <= idx_q + 5'd1;
    end
  end

  // Rules of the handshakes this controller relies on.
  a_adc_start_only_in_sense: assert property (@(posedge clk) disable iff (!rst_n)
    adc_start |-> st_q == ST_SENSE);
  a_tx_done_only_in_tx: assert property (@(posedge clk) disable iff (!rst_n)
    tx_done |-> st_q == ST_TX);
  a_crc_body_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    crc_en |-> idx_q < body_len);

endmodule
