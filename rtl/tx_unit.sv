// tx_unit: puts a frame on the node's serial Data Out line.
//
// On `start` it sends frame bytes 0 .. len-1, each least significant bit
// first, one bit per clock. `data_out_en` is high exactly while a bit is on
// `data_out`, so a receiver samples data_out on every clock where
// data_out_en = 1. `done` pulses on the cycle after the last bit.
//
// The frame and len are read while the frame is sent (not copied at start),
// so the sender must hold them stable until `done`; this lets the last bytes
// (the CRC) and the length settle a cycle after the start. Timing: 8*len
// cycles of data, then done. A start while busy is ignored.
//
// The serial Data Out pin and the Tx-completed pin come from the node's pin
// diagram; bit order, the enable strobe and one bit per clock are this
// design's choices.
module tx_unit
  import wsn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  frame_t     frame,
  input  logic [4:0] len,
  output logic       data_out,
  output logic       data_out_en,
  output logic       busy,
  output logic       done
);

  logic [4:0] byte_q;
  logic [2:0] bit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      byte_q <= '0;
      bit_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && len != '0) begin
          busy   <= 1'b1;
          byte_q <= '0;
          bit_q  <= '0;
        end
      end else begin
        bit_q <= bit_q + 3'd1;
        if (bit_q == 3'd7) begin
          byte_q <= byte_q + 5'd1;
          if (byte_q == len - 5'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign data_out_en = busy;
  assign data_out    = busy ? frame[byte_q][bit_q] : 1'b0;

endmodule
