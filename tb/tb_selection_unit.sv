// tb_selection_unit: automatic mode must raise enable every SAMPLE_PERIOD
// cycles; manual mode only on a rising handshake edge; enable holds until ack.
module tb_selection_unit;
  localparam int P = 20;
  logic clk = 0, rst_n = 0, auto_mode = 0, handshake = 0, ack = 0;
  logic enable;
  int checks = 0, failures = 0;

  selection_unit #(.SAMPLE_PERIOD(P)) dut (.clk, .rst_n, .auto_mode, .handshake, .ack, .enable);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    int last, n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // manual mode: nothing without a handshake
    repeat (3 * P) begin @(negedge clk); chk(!enable, "manual idle"); end
    // rising edge -> enable next cycle, held until ack
    handshake = 1; @(negedge clk);
    chk(enable, "enable after handshake edge");
    repeat (5) begin @(negedge clk); chk(enable, "enable held"); end
    ack = 1; @(negedge clk); ack = 0;
    chk(!enable, "cleared by ack");
    // high level without new edge: no new request
    repeat (10) begin @(negedge clk); chk(!enable, "level is not an edge"); end
    handshake = 0; @(negedge clk);
    handshake = 1; @(negedge clk); handshake = 0;
    chk(enable, "second edge");
    ack = 1; @(negedge clk); ack = 0;
    // automatic mode: period P, acked immediately
    auto_mode = 1;
    last = -1; n = 0;
    for (int c = 0; c < 6 * P; c++) begin
      @(negedge clk);
      if (enable) begin
        if (last >= 0) chk(c - last == P, "automatic period");
        else           chk(c == P - 1, "first automatic request");
        last = c; n++;
        ack = 1;
      end else ack = 0;
    end
    ack = 0;
    chk(n == 6, "six requests in six periods");
    // handshake ignored in automatic mode
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
