// Self-checking testbench for data_sampler.
//
// bit_en is driven every 5th clock. Bytes are offered with random gaps (so
// pix_valid is often held while pix_ready is low); each accepted byte must
// appear on data_bit LSB first, one bit per bit period starting right after
// acceptance, with busy, last_bit and byte_parity correct, and data_bit must
// be 0 while idle. Back-to-back bytes and idle periods are both counted.
module tb_data_sampler;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, pix_valid = 1'b0;
  logic [7:0] pix_data = '0;
  logic pix_ready, data_bit, busy, last_bit, byte_parity;
  int checks = 0, failures = 0;

  data_sampler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // bit_en every 5th clock
  int ph = 0;
  always @(negedge clk) begin
    ph = (ph + 1) % 5;
    bit_en = rst_n && (ph == 4);
  end

  // model: the byte currently sent and the bit index
  logic [7:0] cur;
  int idx;          // -1 idle, else bit index
  int accepted, back_to_back, idle_periods, stalls;
  bit pend;

  always @(posedge clk) if (rst_n) begin
    if (pix_valid && !pix_ready) stalls++;
    if (bit_en) begin
      if (idx >= 0) begin
        check(data_bit == cur[idx], "data bit");
        check(last_bit == (idx == 7), "last_bit");
        check(byte_parity == ($countones(cur) % 2 == 1), "byte parity");
        check(busy, "busy");
      end else begin
        check(data_bit == 1'b0 && !busy, "idle");
        idle_periods++;
      end
      if (pix_valid && pix_ready) begin
        if (idx == 7) back_to_back++;
        cur = pix_data; idx = 0; accepted++;
      end else if (idx >= 0) begin
        idx = (idx == 7) ? -1 : idx + 1;
      end
    end else begin
      check(!pix_ready, "ready only at bit boundary");
    end
  end

  initial begin
    idx = -1; accepted = 0; back_to_back = 0; idle_periods = 0; stalls = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(0, 1) ? 0 : $urandom_range(1, 60)) @(negedge clk);
      pix_data = 8'($urandom);
      pix_valid = 1'b1;
      do @(posedge clk); while (!(pix_ready));
      @(negedge clk);
      pix_valid = 1'b0;
    end
    repeat (60) @(negedge clk);
    check(accepted == 40, "all bytes sent");
    check(back_to_back > 0, "back-to-back bytes seen");
    check(idle_periods > 0, "idle periods seen");
    check(stalls > 0, "stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
