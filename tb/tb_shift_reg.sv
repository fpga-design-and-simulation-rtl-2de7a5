// Self-checking testbench for shift_reg.
//
// Replays the reference waveform of the shift register: load 10101111, shift
// left with si = 1 four times (01011111, 10111111, 01111111, 11111111), then
// with si = 0 (11111110), checking p0 and so (the MSB) each step. A second,
// right-shifting instance is checked against a model with random stimulus.
module tb_shift_reg;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, aload = 1'b0, si = 1'b0;
  logic [7:0] d = '0, p0, p0_r;
  logic so, so_r;
  int checks = 0, failures = 0;

  shift_reg dut (.*);
  shift_reg #(.W(8), .SHIFT_LEFT(1'b0)) dut_r (
    .clk, .rst_n, .en, .aload, .d, .si, .so(so_r), .p0(p0_r)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s p0=%b p0_r=%b", what, p0, p0_r); end
  endtask

  logic [7:0] expect_l [5] = '{8'b01011111, 8'b10111111, 8'b01111111, 8'b11111111, 8'b11111110};
  logic [7:0] model_r;

  initial begin
    repeat (2) @(negedge clk);
    check(p0 == 8'h00, "reset");
    rst_n = 1'b1;
    d = 8'b10101111; aload = 1'b1;
    @(negedge clk); aload = 1'b0;
    check(p0 == 8'b10101111 && so == 1'b1, "load");
    @(negedge clk);
    check(p0 == 8'b10101111, "hold with en low");
    en = 1'b1;
    for (int i = 0; i < 5; i++) begin
      si = (i < 4);
      @(negedge clk);
      check(p0 == expect_l[i], "left shift");
      check(so == expect_l[i][7], "so is MSB");
    end
    // right shift, random
    model_r = p0_r;
    for (int i = 0; i < 200; i++) begin
      en = $urandom_range(0, 3) != 0;
      aload = $urandom_range(0, 9) == 0;
      si = $urandom_range(0, 1);
      d = 8'($urandom);
      @(negedge clk);
      if (aload) model_r = d;
      else if (en) model_r = {si, model_r[7:1]};
      check(p0_r == model_r, "right shift");
      check(so_r == model_r[0], "so is LSB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
