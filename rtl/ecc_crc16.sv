// ecc_crc16: error-detecting redundancy code appended to every frame.
//
// A byte-serial CRC-16 with generator polynomial x^16 + x^12 + x^5 + 1
// (0x1021, the ITU-T polynomial also used by IEEE 802.15.4), register
// preset to 16'hFFFF, no bit reflection, no final XOR (the "CCITT-FALSE"
// variant: the check value of ASCII "123456789" is 16'h29B1).
//
// Interface: `init` presets the register; `en` with `din` folds one byte in,
// most significant bit first; `crc` is the register value and is valid the
// cycle after the last byte. One byte per clock, no stall.
//
// The node description asks only for a polynomial-based redundancy code added
// before transmission; the polynomial, preset and bit order are this
// design's choices.
module ecc_crc16 #(
  parameter logic [15:0] POLY = 16'h1021,
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [15:0] crc
);

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] d);
    logic [15:0] r;
    r = c;
    for (int k = 7; k >= 0; k--) begin
      if (r[15] ^ d[k]) r = {r[14:0], 1'b0} ^ POLY;
      else              r = {r[14:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= INIT;
    else if (init) crc <= INIT;
    else if (en)   crc <= crc_byte(crc, din);
  end

endmodule
