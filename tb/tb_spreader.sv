// Self-checking testbench for spreader.
//
// Checks all four input pairs against the product of the +1/-1 values they
// stand for (0 -> +1, 1 -> -1): a negative product must give chip 1.
module tb_spreader;
  logic data_bit, pn_chip, tx_chip;
  int checks = 0, failures = 0;
  int a, b;

  spreader dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      data_bit = i[0];
      pn_chip  = i[1];
      #1;
      a = data_bit ? -1 : 1;
      b = pn_chip ? -1 : 1;
      checks++;
      if (tx_chip != (a * b < 0)) begin
        failures++;
        $display("FAIL data=%b pn=%b chip=%b", data_bit, pn_chip, tx_chip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
