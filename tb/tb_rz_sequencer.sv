// Test of the recursive-Z tile sequencer.
//
// For each screen (the six-tile-wide example of the rendering sequence,
// 320x240, 640x480, 1280x1024 and 1600x1200 in tiles, a single tile and a
// 127x127 screen) the expected order is built by walking every Morton code
// and keeping the on-screen positions, written out here with plain integer
// arithmetic. The output stream must match it tile for tile, with out_last
// only on the final tile. With out_ready always high the walk must end
// exactly one cycle per code after start (codes up to the last tile's);
// with random out_ready the order must not change. The six-wide example is
// also checked against the numbers given for it: tiles 1, 2, 7, 8 first,
// then 3, 4, 9, 10 (tiles numbered from 1, row by row).
module tb_rz_sequencer;
  import hpl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  tcoord_t tiles_x = '0, tiles_y = '0;
  logic out_valid, out_ready = 0, out_last, busy;
  tcoord_t out_x, out_y;
  bit random_ready = 0;

  always #5 clk = ~clk;

  rz_sequencer dut (.clk, .rst_n, .start, .tiles_x, .tiles_y, .out_valid, .out_ready,
                    .out_x, .out_y, .out_last, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic walk(int tx, int ty, bit rnd, output int first [8]);
    int xs [$], ys [$];
    int last_code, n, cyc, x, y;
    // expected order: every code, de-interleaved, kept when on screen
    last_code = 0;
    for (int c = 0; c < (1 << (2 * TCOORD_W)); c++) begin
      x = 0; y = 0;
      for (int i = 0; i < TCOORD_W; i++) begin
        x += ((c >> (2 * i)) & 1) << i;
        y += ((c >> (2 * i + 1)) & 1) << i;
      end
      if (x < tx && y < ty) begin xs.push_back(x); ys.push_back(y); last_code = c; end
    end
    random_ready = rnd;
    @(negedge clk);
    tiles_x = tcoord_t'(tx); tiles_y = tcoord_t'(ty); start = 1;
    @(negedge clk);
    start = 0;
    n = 0; cyc = 0;
    while (busy) begin
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        checks++;
        if (n < 8) first[n] = int'(out_y) * tx + int'(out_x) + 1;
        if (n >= xs.size() || int'(out_x) != xs[n] || int'(out_y) != ys[n]
            || out_last != (n == xs.size() - 1)) begin
          failures++;
          $display("FAIL %0dx%0d tile %0d: got %0d,%0d last %0d", tx, ty, n, out_x, out_y, out_last);
        end
        n++;
      end
      #1;
    end
    checks++;
    if (n != xs.size()) begin failures++; $display("FAIL %0dx%0d emitted %0d of %0d", tx, ty, n, xs.size()); end
    if (!rnd) begin
      checks++;
      if (cyc != last_code + 1) begin
        failures++;
        $display("FAIL %0dx%0d took %0d cycles, expected %0d", tx, ty, cyc, last_code + 1);
      end
    end
    $display("%0dx%0d tiles: %0d tiles in %0d cycles", tx, ty, n, cyc);
  endtask

  initial begin
    int first [8];
    automatic int exp_first [8] = '{1, 2, 7, 8, 3, 4, 9, 10};
    repeat (3) @(posedge clk);
    rst_n = 1;
    walk(6, 6, 0, first);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (first[i] != exp_first[i]) begin
        failures++;
        $display("FAIL six-wide example position %0d: tile %0d, expected %0d", i, first[i], exp_first[i]);
      end
    end
    walk(10, 8, 0, first);
    walk(20, 15, 1, first);
    walk(40, 32, 0, first);
    walk(50, 38, 0, first);
    walk(50, 38, 1, first);
    walk(1, 1, 0, first);
    walk(127, 127, 0, first);
    // a start pulse with an empty screen does nothing
    @(negedge clk);
    tiles_x = '0; tiles_y = 8; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL empty screen started a walk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
