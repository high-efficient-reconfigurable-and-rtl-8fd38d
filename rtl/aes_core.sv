// aes_core: the node's crypto processor, an iterative AES-128 encryptor.
//
// One AES round per clock. On `start` the core loads pt ^ key (initial
// AddRoundKey) and then runs rounds 1..10, expanding the key schedule on the
// fly with four extra S-boxes; round 10 skips MixColumns. SubBytes uses
// sixteen multiplexer-style S-boxes (aes_sbox).
//
// Interface: pulse `start` for one cycle with `key` and `pt` valid (they are
// sampled on that edge). `busy` is high while rounds run; `done` pulses for
// one cycle, and `ct` holds the ciphertext from then until the next start.
// Timing: done is high 11 cycles after the start edge (1 load + 10 rounds).
// Bytes follow FIPS-197 order: byte 0 of a block is bits [127:120].
//
// The use of AES with a multiplexer S-box comes from the node description;
// the round-per-cycle structure, the handshake and the timing are this
// design's choices. The description also mentions a "random round
// selection" without defining it; it is not modelled here.
module aes_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);

  logic [127:0] st_q, rk_q;
  logic [3:0]   rnd_q;      // round being computed next, 1..10
  logic [7:0]   rcon_q;

  // ---------------- round datapath ----------------
  logic [127:0] sub;        // SubBytes(st_q)
  logic [127:0] nxt_key;
  logic [31:0]  sw;         // SubWord(RotWord(w3))

  for (genvar b = 0; b < 16; b++) begin : g_sb
    aes_sbox u_sb (.i(st_q[127-8*b -: 8]), .o(sub[127-8*b -: 8]));
  end

  logic [31:0] w3_rot;
  assign w3_rot = {rk_q[23:0], rk_q[31:24]};
  for (genvar b = 0; b < 4; b++) begin : g_ksb
    aes_sbox u_ksb (.i(w3_rot[31-8*b -: 8]), .o(sw[31-8*b -: 8]));
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    w0 = rk_q[127:96] ^ sw ^ {rcon_q, 24'h0};
    w1 = rk_q[95:64]  ^ w0;
    w2 = rk_q[63:32]  ^ w1;
    w3 = rk_q[31:0]   ^ w2;
    nxt_key = {w0, w1, w2, w3};
  end

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127-8*(w+4*c) -: 8] = s[127-8*(w+4*((c+w)%4)) -: 8];
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = s[127-32*c -: 8];
      a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8];
      a3 = s[103-32*c -: 8];
      r[127-32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[119-32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[103-32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  logic [127:0] sr, nxt_st;
  logic         last;
  assign last   = (rnd_q == 4'd10);
  assign sr     = shift_rows(sub);
  assign nxt_st = (last ? sr : mix_columns(sr)) ^ nxt_key;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      rk_q   <= '0;
      rnd_q  <= '0;
      rcon_q <= 8'h01;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st_q   <= pt ^ key;
        rk_q   <= key;
        rnd_q  <= 4'd1;
        rcon_q <= 8'h01;
        busy   <= 1'b1;
      end else if (busy) begin
        st_q   <= nxt_st;
        rk_q   <= nxt_key;
        rcon_q <= xtime(rcon_q);
        rnd_q  <= rnd_q + 4'd1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = st_q;

endmodule
