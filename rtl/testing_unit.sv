// testing_unit: the node's self-test core.
//
// On `start` it checks every ADC channel against three known inputs: the
// full-scale reference, half of the reference and ground, in that order, one
// channel after another. For each it starts a conversion with the ADC
// front-end switched to that reference (adc_ref) and compares the result Yb
// with the stored value Ya. A reading passes when |Ya - Yb| < TOL. The first
// reading that fails ends the test with `fault` set and the channel in
// `fail_ch`. When all channels pass and the node is in secured mode, the
// crypto processor is given a fixed plaintext and key; its output must equal
// the stored ciphertext exactly, otherwise `fault` and `fail_crypto` are set.
// In unsecured mode the crypto test is skipped.
//
// Interface: `start` is a one-cycle pulse; `done` pulses once when the test
// ends; `fault`, `fail_ch` and `fail_crypto` hold the result until the next
// start. ADC side: adc_start is a one-cycle conversion request with adc_sel
// and adc_ref valid until adc_done. Crypto side: aes_start pulse, aes_done
// pulse with aes_ct valid. While this unit runs, the crypto processor must
// be fed AES_TEST_KEY and AES_TEST_PT from wsn_pkg.
// Timing: each reading takes C + 2 cycles, where C is the number of cycles
// from adc_start to adc_done; done rises 24*(C+2) cycles after the start
// edge, 12 cycles later when the crypto test (11-cycle AES) runs.
//
// The three references, their order, the tolerance rule, the crypto
// known-answer test and its skipping in unsecured mode follow the node's
// self-test description. The stored values, the tolerance, the test vector
// (FIPS-197 C.1) and stopping at the first failure are this design's choices.
module testing_unit
  import wsn_pkg::*;
#(
  parameter byte_t       EXP_VMAX  = 8'hFF,
  parameter byte_t       EXP_VHALF = 8'h80,
  parameter byte_t       EXP_GND   = 8'h00,
  parameter int unsigned TOL       = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         secured,
  // ADC front-end
  output logic [2:0]   adc_sel,
  output adc_ref_e     adc_ref,
  output logic         adc_start,
  input  logic         adc_done,
  input  byte_t        adc_data,
  // crypto processor
  output logic         aes_start,
  input  logic         aes_done,
  input  logic [127:0] aes_ct,
  // result
  output logic         busy,
  output logic         done,
  output logic         fault,
  output logic [2:0]   fail_ch,
  output logic         fail_crypto
);

  typedef enum logic [2:0] {T_IDLE, T_CONV, T_WAIT, T_AES, T_AES_W} tstate_e;

  tstate_e    st_q;
  logic [2:0] ch_q;
  logic [1:0] step_q;     // 0: full scale, 1: half, 2: ground
  logic       sec_q;
  byte_t      ya;
  logic [8:0] diff;
  logic       pass;

  always_comb begin
    unique case (step_q)
      2'd0:    begin ya = EXP_VMAX;  adc_ref = REF_VMAX;  end
      2'd1:    begin ya = EXP_VHALF; adc_ref = REF_VHALF; end
      default: begin ya = EXP_GND;   adc_ref = REF_GND;   end
    endcase
  end

  // Eq. (1): F = 1 when |Ya - Yb| < th
  assign diff = (ya >= adc_data) ? {1'b0, ya - adc_data} : {1'b0, adc_data - ya};
  assign pass = 32'(diff) < TOL;

  assign adc_sel   = ch_q;
  assign adc_start = (st_q == T_CONV);
  assign aes_start = (st_q == T_AES);
  assign busy      = (st_q != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= T_IDLE;
      ch_q        <= '0;
      step_q      <= '0;
      sec_q       <= 1'b0;
      done        <= 1'b0;
      fault       <= 1'b0;
      fail_ch     <= '0;
      fail_crypto <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        T_IDLE: if (start) begin
          st_q        <= T_CONV;
          ch_q        <= '0;
          step_q      <= '0;
          sec_q       <= secured;
          fault       <= 1'b0;
          fail_ch     <= '0;
          fail_crypto <= 1'b0;
        end
        T_CONV: st_q <= T_WAIT;
        T_WAIT: if (adc_done) begin
          if (!pass) begin
            fault   <= 1'b1;
            fail_ch <= ch_q;
            done    <= 1'b1;
            st_q    <= T_IDLE;
          end else if (step_q != 2'd2) begin
            step_q <= step_q + 2'd1;
            st_q   <= T_CONV;
          end else begin
            step_q <= '0;
            if (ch_q != 3'(NUM_CH - 1)) begin
              ch_q <= ch_q + 3'd1;
              st_q <= T_CONV;
            end else if (sec_q) begin
              st_q <= T_AES;
            end else begin
              done <= 1'b1;
              st_q <= T_IDLE;
            end
          end
        end
        T_AES: st_q <= T_AES_W;
        T_AES_W: if (aes_done) begin
          if (aes_ct != AES_TEST_CT) begin
            fault       <= 1'b1;
            fail_crypto <= 1'b1;
          end
          done <= 1'b1;
          st_q <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

endmodule
