// End-to-end testbench for ds_cdma_tx at its default parameters.
//
// Sends an 8 x 8 binary test image (a ring, eight pixels per byte) twice:
// first with the ML code of seed 10101111, then, after a new load, with the
// Gold code of seed 01011010. A reference receiver written independently of
// the RTL regenerates both PN sequences from the seed, builds the carrier
// round(127*sin(2*pi*k/8)) and correlates every 2040-sample bit period of
// cdma_signal (one clock behind the sample it belongs to) with
// carrier * (+1/-1 chip). Each correlation must be exactly +/- 255 times the
// carrier energy (so every sample of every bit is right) and its sign must
// give the bit that was sent: the image bits while a byte is on the air, 0
// while idle. rx_byte/rx_valid of the compare path must return every byte in
// order with parity_err low. Mechanisms counted and required at least once:
// ML bits, Gold bits, seed loads, stalled offers, back-to-back bytes, idle
// bit periods, BPSK phase inversions and parity checks.
module tb_ds_cdma_tx;
  localparam int SPC = 8, CPB = 255, BP = SPC * CPB;

  logic clk = 1'b0, rst_n = 1'b0, code_sel = 1'b0, load = 1'b0, pix_valid = 1'b0;
  logic [7:0] seed = '0, pix_data = '0;
  logic pix_ready, serial_out, chip_en, bit_en, tx_busy, rx_valid, parity_err;
  logic signed [7:0] cdma_signal;
  logic [7:0] rx_byte;
  int checks = 0, failures = 0;

  ds_cdma_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference code and carrier ----------------
  bit seq_a [255], seq_b [255];
  int car [8];
  int energy;
  bit gold;

  task automatic make_codes(input logic [7:0] s);
    logic [7:0] a, b;
    a = s; b = 8'hFF;
    for (int i = 0; i < 255; i++) begin
      seq_a[i] = a[7];
      seq_b[i] = b[7];
      a = {a[6:0], a[7] ^ a[5] ^ a[4] ^ a[3]};
      b = {b[6:0], b[7] ^ b[3] ^ b[2] ^ b[1]};
    end
  endtask

  // ---------------- reference receiver ----------------
  int n;                    // sample index of the current cycle since load
  bit expected [int];       // bit period -> bit sent
  longint corr;
  int m, k, c, b;
  int ml_bits, gold_bits, idle_bits, inversions, stalls, b2b, loads, par_checks;
  logic prev_chip_sign;
  bit have_prev;

  always @(posedge clk) if (rst_n) begin
    if (load) n = 0;
    else n++;
    if (pix_valid && !pix_ready) stalls++;
    if (pix_valid && pix_ready) begin
      b = n / BP;         // the byte starts with the bit period that begins now
      if (tx_busy) b2b++;
      for (int i = 0; i < 8; i++) expected[b + i] = pix_data[i];
    end
  end

  always @(negedge clk) if (rst_n && n >= 1) begin
    m = n - 1;            // cdma_signal now shows sample m
    k = m % SPC;
    c = (m / SPC) % 255;
    b = m / BP;
    if (m % BP == 0) corr = 0;
    begin
      bit ch;
      ch = seq_a[c] ^ (gold & seq_b[c]);
      corr += longint'(cdma_signal) * car[k] * (ch ? -1 : 1);
      if (k == 2) begin   // sign of the sample at the carrier peak: chip phase
        bit s;
        s = cdma_signal < 0;
        if (have_prev && s != prev_chip_sign) inversions++;
        prev_chip_sign = s; have_prev = 1'b1;
      end
    end
    if (m % BP == BP - 1) begin
      bit want, got;
      want = expected.exists(b) ? expected[b] : 1'b0;
      got = corr < 0;
      check(corr == (got ? -1 : 1) * longint'(CPB) * energy, "correlation magnitude");
      check(got == want, "despread bit");
      if (!expected.exists(b)) idle_bits++;
      else if (gold) gold_bits++;
      else ml_bits++;
      corr = 0;
    end
  end

  // ---------------- compare path ----------------
  logic [7:0] sent [$];
  always @(negedge clk) if (rst_n && rx_valid) begin
    check(sent.size() > 0, "rx without tx");
    if (sent.size() > 0) begin
      check(rx_byte == sent[0], "rx_byte");
      void'(sent.pop_front());
    end
    check(!parity_err, "parity error");
    par_checks++;
  end

  // ---------------- stimulus ----------------
  logic [7:0] image [8] = '{8'b00111100, 8'b01000010, 8'b10000001, 8'b10011001,
                            8'b10011001, 8'b10000001, 8'b01000010, 8'b00111100};

  task automatic do_load(input logic [7:0] s, input bit g);
    @(negedge clk);
    seed = s; code_sel = g; load = 1'b1;
    make_codes(s);
    gold = g;
    have_prev = 1'b0;
    expected.delete();
    loads++;
    @(negedge clk);
    load = 1'b0;
  endtask

  task automatic send(input logic [7:0] d);
    pix_data = d; pix_valid = 1'b1;
    sent.push_back(d);
    do @(posedge clk); while (!pix_ready);
    @(negedge clk);
    pix_valid = 1'b0;
  endtask

  initial begin
    energy = 0;
    for (int i = 0; i < 8; i++) begin
      car[i] = int'($rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * i / 8.0) + 0.5)));
      energy += car[i] * car[i];
    end
    ml_bits = 0; gold_bits = 0; idle_bits = 0; inversions = 0; stalls = 0;
    b2b = 0; loads = 0; par_checks = 0; n = 0; corr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // image 1: ML code
    do_load(8'b10101111, 1'b0);
    foreach (image[i]) send(image[i]);
    wait (sent.size() == 0);
    repeat (2 * BP) @(negedge clk);     // idle bit periods
    // image 2: Gold code, different user seed
    wait (!tx_busy);
    do_load(8'b01011010, 1'b1);
    foreach (image[i]) send(~image[i]);
    wait (sent.size() == 0);
    repeat (BP + 4) @(negedge clk);
    check(ml_bits == 64, "64 ML image bits");
    check(gold_bits == 64, "64 Gold image bits");
    check(idle_bits > 0, "idle bits");
    check(loads == 2, "two loads");
    check(stalls > 0, "stalled offers");
    check(b2b >= 14, "back-to-back bytes");
    check(inversions > 100, "phase inversions");
    check(par_checks == 16, "16 parity checks");
    $display("mechanisms: ml_bits=%0d gold_bits=%0d idle_bits=%0d loads=%0d stalls=%0d back_to_back=%0d inversions=%0d parity_checks=%0d",
             ml_bits, gold_bits, idle_bits, loads, stalls, b2b, inversions, par_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
