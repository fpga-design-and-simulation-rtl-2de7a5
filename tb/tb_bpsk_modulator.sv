// Self-checking testbench for bpsk_modulator.
//
// Reference carrier: round(127 * sin(2*pi*k/8)), computed with $sin. After a
// sync the output one clock later must be +/- sample k, negated when the chip
// was 1, with serial_out equal to that chip. A second instance with 12
// samples per period is compared with a tolerance of 2 LSB, which bounds the
// error of the rational sine approximation.
module tb_bpsk_modulator;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, chip = 1'b0;
  logic signed [7:0] parallel_out, out12;
  logic serial_out, ser12;
  int checks = 0, failures = 0;

  bpsk_modulator dut (.*);
  bpsk_modulator #(.SAMPLES(12), .SW(8), .AMP(120)) dut12 (
    .clk, .rst_n, .sync, .chip, .parallel_out(out12), .serial_out(ser12)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s out=%0d out12=%0d", what, parallel_out, out12); end
  endtask

  function automatic int ref_sample(input int k, input int n, input int amp);
    return int'($rtoi($floor(real'(amp) * $sin(2.0 * 3.14159265358979 * real'(k) / real'(n)) + 0.5)));
  endfunction

  int k, want, want12, d, inversions;
  logic prev_chip;

  initial begin
    repeat (2) @(negedge clk);
    check(parallel_out == 0 && !serial_out, "reset");
    rst_n = 1'b1;
    sync = 1'b1; @(negedge clk); sync = 1'b0;
    k = 0;
    inversions = 0;
    prev_chip = 1'b0;
    for (int i = 0; i < 400; i++) begin
      chip = (i % 16 < 8) ? $urandom_range(0, 1) : 1'b1;
      if (i == 200) sync = 1'b1;
      @(negedge clk);
      want = ref_sample(k % 8, 8, 127);
      want12 = ref_sample(k % 12, 12, 120);
      if (chip) begin want = -want; want12 = -want12; end
      check(parallel_out == 8'(want), "8-sample carrier");
      d = int'(out12) - want12;
      check(d >= -2 && d <= 2, "12-sample carrier");
      check(serial_out == chip && ser12 == chip, "serial out");
      if (chip != prev_chip) inversions++;
      prev_chip = chip;
      k = sync ? 0 : k + 1;
      sync = 1'b0;
    end
    check(inversions > 10, "phase inversions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
