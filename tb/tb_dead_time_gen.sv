// Self-checking testbench of dead_time_gen (2 channels, DEAD = 5 clocks)
// with random pulse trains of random lengths. After each clock the upper gate
// must equal the AND of the last DEAD+2 samples of the pulse, the lower gate
// the AND of their complements; the two gates of a leg are never on together
// and each turns on only after DEAD clocks with both off.
module tb_dead_time_gen;
  localparam int NCH = 2, DEAD = 5, H = DEAD + 2;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] vg, g_hi, g_lo;
  logic [NCH-1:0] hist [H];
  int checks = 0, failures = 0, nsamp = 0;
  int on_hi = 0;

  dead_time_gen #(.NCH(NCH), .DEAD(DEAD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = H - 1; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= vg;
    nsamp <= nsamp + 1;
  end

  always @(negedge clk) if (rst_n && nsamp >= H) begin
    for (int c = 0; c < NCH; c++) begin
      bit all1, all0;
      all1 = 1; all0 = 1;
      for (int i = 0; i < H; i++) begin all1 &= hist[i][c]; all0 &= !hist[i][c]; end
      checks++;
      if (g_hi[c] != all1 || g_lo[c] != all0 || (g_hi[c] && g_lo[c])) begin
        failures++;
        if (failures < 10) $display("FAIL %0t ch%0d: hi=%b lo=%b exp %b %b", $time, c, g_hi[c], g_lo[c], all1, all0);
      end
      if (g_hi[c]) on_hi++;
    end
  end

  initial begin
    vg = '0;
    for (int i = 0; i < H; i++) hist[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      vg[$urandom_range(NCH - 1)] ^= 1'b1;
      repeat ($urandom_range(12)) @(negedge clk);
    end
    checks++;
    if (on_hi == 0) begin failures++; $display("upper gate never on"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
