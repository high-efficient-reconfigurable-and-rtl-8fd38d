// tb_tx_unit: sends random frames of every length, rebuilds the bytes from
// data_out/data_out_en and checks bytes, bit order and the 8*len timing.
module tb_tx_unit;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  frame_t frame;
  logic [4:0] len;
  logic data_out, data_out_en, busy, done;
  int checks = 0, failures = 0;

  tx_unit dut (.clk, .rst_n, .start, .frame, .len, .data_out, .data_out_en, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame = '0; len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int l, bits, cyc;
      logic [7:0] got [MAX_FRAME];
      l = 1 + (n % MAX_FRAME);
      for (int b = 0; b < MAX_FRAME; b++) frame[b] = 8'($urandom);
      len = 5'(l);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      bits = 0; cyc = 0;
      while (!done) begin
        if (data_out_en) begin
          got[bits / 8][bits % 8] = data_out;
          bits++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (bits != 8 * l || cyc != 8 * l) begin
        failures++; $display("len %0d: %0d bits in %0d cycles", l, bits, cyc);
      end
      for (int b = 0; b < l; b++) begin
        checks++;
        if (got[b] !== frame[b]) begin
          failures++; $display("byte %0d %h exp %h", b, got[b], frame[b]);
        end
      end
      @(negedge clk);
      checks++;
      if (busy || data_out_en) begin failures++; $display("still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
