// Self-checking testbench for pn_generator.
//
// An independent model steps the two polynomials x^8+x^6+x^5+x^4+1 and
// x^8+x^4+x^3+x^2+1 (second register always seeded with all ones) and
// predicts every chip in ML mode and in Gold mode, including a switch of
// code_sel in mid-stream and a second user seed. It also checks that two
// seeds give different codes and that chips change only on chip_en.
module tb_pn_generator;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, load = 1'b0;
  logic [7:0] seed = '0, state_a;
  code_e code_sel = CODE_ML;
  logic pn_chip;
  int checks = 0, failures = 0;

  pn_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] ma, mb;
  function automatic logic [7:0] step_a(input logic [7:0] q);
    return {q[6:0], q[7] ^ q[5] ^ q[4] ^ q[3]};
  endfunction
  function automatic logic [7:0] step_b(input logic [7:0] q);
    return {q[6:0], q[7] ^ q[3] ^ q[2] ^ q[1]};
  endfunction

  bit code1 [255];
  int diff;

  task automatic do_load(input logic [7:0] s);
    seed = s; load = 1'b1;
    @(negedge clk); load = 1'b0;
    ma = s; mb = 8'hFF;
  endtask

  task automatic run(input int n, input bit record);
    for (int i = 0; i < n; i++) begin
      #1;
      check(pn_chip == (code_sel == CODE_GOLD ? ma[7] ^ mb[7] : ma[7]), "chip");
      if (record && i < 255) code1[i] = pn_chip;
      // idle cycle: no change
      chip_en = 1'b0;
      @(negedge clk);
      check(pn_chip == (code_sel == CODE_GOLD ? ma[7] ^ mb[7] : ma[7]), "hold");
      chip_en = 1'b1;
      @(negedge clk);
      chip_en = 1'b0;
      ma = step_a(ma); mb = step_b(mb);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_load(8'b10101111);
    check(state_a == 8'b10101111, "state after load");
    code_sel = CODE_ML;
    run(255, 1'b1);
    check(state_a == 8'b10101111, "ML period 255");
    code_sel = CODE_GOLD;
    run(300, 1'b0);
    code_sel = CODE_ML;
    run(20, 1'b0);
    // second user: different seed gives a different code
    do_load(8'h5A);
    code_sel = CODE_ML;
    diff = 0;
    for (int i = 0; i < 255; i++) begin
      #1;
      if (pn_chip != code1[i]) diff++;
      run(1, 1'b0);
    end
    check(diff > 0, "different seed gives different code");
    code_sel = CODE_GOLD;
    run(255, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
