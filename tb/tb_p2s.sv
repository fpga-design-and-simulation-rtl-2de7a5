// Self-checking testbench for p2s.
//
// Loads 11001010 (the word of the reference waveform) and checks that the
// bits come out LSB first, one per en, with busy and last, then that serial
// out is 0 when done. Random words follow, each loaded on the edge of the
// previous word's last shift, and must come out back to back.
module tb_p2s;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, dataready = 1'b0;
  logic [7:0] parallel_data = '0;
  logic serial_out, busy, last;
  int checks = 0, failures = 0;

  p2s dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s so=%b busy=%b last=%b", what, serial_out, busy, last); end
  endtask

  logic [7:0] w, nxt;

  initial begin
    repeat (2) @(negedge clk);
    check(!busy, "idle after reset");
    rst_n = 1'b1;
    w = 8'b11001010;
    parallel_data = w; dataready = 1'b1;
    @(negedge clk); dataready = 1'b0;
    for (int i = 0; i < 8; i++) begin
      check(busy, "busy");
      check(last == (i == 7), "last");
      check(serial_out == w[i], "bit order LSB first");
      @(negedge clk);   // idle clock, bit must hold
      check(serial_out == w[i], "hold without en");
      en = 1'b1; @(negedge clk); en = 1'b0;
    end
    check(!busy && serial_out == 1'b0, "done");
    // back to back
    w = 8'($urandom);
    parallel_data = w; dataready = 1'b1;
    @(negedge clk); dataready = 1'b0;
    for (int n = 0; n < 50; n++) begin
      nxt = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        check(serial_out == w[i] && busy, "stream bit");
        en = 1'b1;
        if (i == 7) begin parallel_data = nxt; dataready = 1'b1; end
        @(negedge clk);
        en = 1'b0; dataready = 1'b0;
      end
      w = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
