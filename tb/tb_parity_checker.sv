// Self-checking testbench for parity_checker.
//
// Applies the four words of the reference waveform (10101110, 11111001,
// 11100000, 10101101; parities 1, 0, 1, 1), then random words with a
// correct or a wrong expected parity, checking parity against a bit count
// and the registered error flag, which must only change when enabled.
module tb_parity_checker;
  logic clk = 1'b0, reset = 1'b1, enable = 1'b0, expected = 1'b0;
  logic [7:0] data_in = '0;
  logic parity, error;
  int checks = 0, failures = 0;

  parity_checker dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s data=%b parity=%b error=%b", what, data_in, parity, error); end
  endtask

  logic [7:0] fig_d [4] = '{8'b10101110, 8'b11111001, 8'b11100000, 8'b10101101};
  bit fig_p [4] = '{1, 0, 1, 1};
  bit want_err, last_err;

  initial begin
    repeat (2) @(negedge clk);
    check(!error, "reset");
    reset = 1'b0;
    for (int i = 0; i < 4; i++) begin
      data_in = fig_d[i];
      #1 check(parity == fig_p[i], "reference parity");
      @(negedge clk);
    end
    last_err = error;
    for (int i = 0; i < 300; i++) begin
      data_in = 8'($urandom);
      enable = $urandom_range(0, 1);
      want_err = $urandom_range(0, 1);
      expected = ($countones(data_in) % 2 == 1) ^ want_err;
      #1 check(parity == ($countones(data_in) % 2 == 1), "parity");
      @(negedge clk);
      if (enable) last_err = want_err;
      check(error == last_err, "error flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
