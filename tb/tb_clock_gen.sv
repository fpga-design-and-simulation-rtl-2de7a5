// Self-checking testbench for clock_gen.
//
// With 4 samples per chip and 7 chips per bit, chip_en must be high on every
// 4th clock and bit_en on every 28th, counted from reset and again from a
// sync in mid-bit. A default-size instance must give bit_en once every
// 8 * 255 = 2040 clocks.
module tb_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0;
  logic chip_en, bit_en, chip_en_d, bit_en_d;
  logic [1:0] sample_idx;
  logic [2:0] chip_idx;
  logic [2:0] sample_idx_d;
  logic [7:0] chip_idx_d;
  int checks = 0, failures = 0;

  clock_gen #(.SAMPLES_PER_CHIP(4), .CHIPS_PER_BIT(7)) dut (.*);
  clock_gen dut_d (
    .clk, .rst_n, .sync(1'b0), .chip_en(chip_en_d), .bit_en(bit_en_d),
    .sample_idx(sample_idx_d), .chip_idx(chip_idx_d)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0d", what, t); end
  endtask

  int t, td, bits_d, last_bit_d;

  // default-size instance: period of bit_en
  always @(negedge clk) if (rst_n) begin
    if (bit_en_d) begin
      if (bits_d > 0) check(td - last_bit_d == 2040, "default bit period 2040");
      else check(td == 2039, "first default bit");
      last_bit_d = td;
      bits_d++;
    end
    check(!bit_en_d || chip_en_d, "bit_en implies chip_en");
    td++;
  end

  initial begin
    bits_d = 0; td = 0; last_bit_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t = 0;
    for (int i = 0; i < 100; i++) begin
      check(chip_en == (t % 4 == 3), "chip_en");
      check(bit_en == (t % 28 == 27), "bit_en");
      @(negedge clk);
      t++;
    end
    sync = 1'b1; @(negedge clk); sync = 1'b0;
    t = 0;
    for (int i = 0; i < 100; i++) begin
      check(chip_en == (t % 4 == 3), "chip_en after sync");
      check(bit_en == (t % 28 == 27), "bit_en after sync");
      @(negedge clk);
      t++;
    end
    wait (bits_d >= 4);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
