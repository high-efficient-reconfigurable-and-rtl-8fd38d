// adc_model: behavioural model of the eight-channel ADC and its input
// switch, for simulation only (not synthesizable hardware).
//
// A one-cycle `start` begins a conversion of the input chosen by `sel` and
// `ref_sel`; CONV_CYCLES clocks later `done` pulses with the result on
// `data`, which then holds. Inputs: the sensor reading of each channel
// (`sensor`), the full-scale reference (255), half of it (128 + HALF_ERR)
// or ground (0). A channel flagged in `broken` always converts to 8'h40,
// which is how the testbenches inject an ADC fault.
module adc_model
  import wsn_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 4,
  parameter int          HALF_ERR    = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  input  adc_ref_e   ref_sel,
  input  logic       start,
  input  byte_t      sensor [NUM_CH],
  input  logic [NUM_CH-1:0] broken,
  output byte_t      data,
  output logic       done
);
  int    cnt;
  byte_t val;

  always_comb begin
    unique case (ref_sel)
      REF_VMAX:  val = 8'd255;
      REF_VHALF: val = byte_t'(128 + HALF_ERR);
      REF_GND:   val = 8'd0;
      default:   val = sensor[sel];
    endcase
    if (broken[sel]) val = 8'h40;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= 0;
      data <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= CONV_CYCLES;
      end else if (cnt == 1) begin
        cnt  <= 0;
        data <= val;
        done <= 1'b1;
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule
