// Self-checking testbench for s2p.
//
// Shifts in 0,0,0,0,0,1,1,0 to reach 01100000 and then 1,0,1,1, which must
// give 10110000, 01011000, 10101100, 11010110 as in the reference waveform.
// Then random words are sent LSB first with gaps between bits; q must hold
// the word and full must pulse exactly once, one clock after the 8th bit.
module tb_s2p;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, x = 1'b0;
  logic [7:0] q;
  logic full;
  int checks = 0, failures = 0;

  s2p dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%b full=%b", what, q, full); end
  endtask

  task automatic put(input logic b);
    x = b; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  logic [7:0] w;
  bit pre [8] = '{0, 0, 0, 0, 0, 1, 1, 0};
  bit fig [4] = '{1, 0, 1, 1};
  logic [7:0] fig_q [4] = '{8'b10110000, 8'b01011000, 8'b10101100, 8'b11010110};
  int gap;

  initial begin
    repeat (2) @(negedge clk);
    check(q == 8'h00 && !full, "reset");
    rst = 1'b0;
    for (int i = 0; i < 8; i++) begin
      put(pre[i]);
      check(full == (i == 7), "full after 8th bit");
    end
    check(q == 8'b01100000, "01100000");
    @(negedge clk);
    check(!full, "full is one pulse");
    for (int i = 0; i < 4; i++) begin
      put(fig[i]);
      check(q == fig_q[i], "reference sequence");
    end
    // resync
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      w = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        gap = $urandom_range(0, 3);
        repeat (gap) begin
          @(negedge clk);
          check(!full, "no full in gap");
        end
        put(w[i]);
        check(full == (i == 7), "full timing");
      end
      check(q == w, "word LSB first");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
