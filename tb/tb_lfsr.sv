// Self-checking testbench for lfsr.
//
// Checks the reset value (all ones), the seed load 10101111 of the reference
// waveform, every step against an independently written model of
// x^8 + x^6 + x^5 + x^4 + 1 (feedback = q7 ^ q5 ^ q4 ^ q3 into bit 0),
// the period of 255 with 128 ones per period, hold when en is low, and the
// replacement of an all-zero seed.
module tb_lfsr;
  logic clk = 1'b0, resetn = 1'b0, en = 1'b0, load = 1'b0;
  logic [7:0] seed = 8'h00, parallel_out;
  logic serial_out;
  int checks = 0, failures = 0;

  lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%b", what, parallel_out);
    end
  endtask

  function automatic logic [7:0] step(input logic [7:0] q);
    return {q[6:0], q[7] ^ q[5] ^ q[4] ^ q[3]};
  endfunction

  logic [7:0] model;
  int ones;

  initial begin
    repeat (2) @(negedge clk);
    check(parallel_out == 8'hFF, "reset value");
    resetn = 1'b1;
    seed = 8'b10101111; load = 1'b1;
    @(negedge clk); load = 1'b0;
    check(parallel_out == 8'b10101111, "seed load");
    check(serial_out == 1'b1, "serial out is MSB");
    // hold
    @(negedge clk);
    check(parallel_out == 8'b10101111, "hold while en low");
    model = 8'b10101111;
    ones = 0;
    en = 1'b1;
    for (int i = 1; i <= 255; i++) begin
      ones += serial_out;
      @(negedge clk);
      model = step(model);
      check(parallel_out == model, "step");
      check(serial_out == model[7], "serial");
      if (i < 255) check(parallel_out != 8'b10101111, "no early repeat");
    end
    check(parallel_out == 8'b10101111, "period 255");
    check(ones == 128, "128 ones per period");
    en = 1'b0;
    seed = 8'h00; load = 1'b1;
    @(negedge clk); load = 1'b0;
    check(parallel_out == 8'hFF, "zero seed replaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
