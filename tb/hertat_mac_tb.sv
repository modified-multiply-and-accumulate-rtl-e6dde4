// hertat_mac_tb: end-to-end test of the low-power MAC at its default sizes
// (8-bit pixels and constants, 20-bit accumulator).
//
// 1. The 3x3 example window (65 66 70 / 66 34 68 / 0 64 64) with one constant
//    for the whole window, fed in zig-zag order and then in raster order. In
//    zig-zag order the two 66s and the two 64s arrive back to back: the
//    window must take 6 multiplications, 2 product reuses, 1 skipped zero and
//    7 additions after the first load. Raster order gives 7, 1, 1 and 7.
// 2. Random windows of 1 to 12 pixels with idle cycles, constants that
//    sometimes change inside a window, and pixels biased toward 0, 1 and
//    repeats, against an integer model of the window sums.
// Every window sum is compared with the model, and out_valid must come
// in the third cycle after the cycle that presents the window's last pixel. Each mechanism of
// the design is counted and must occur: multiply, reuse, zero skip, one
// bypass, accumulator load and clear, split and Booth multiplications, idle
// input cycles, and a repeat pixel not reused because the constant changed.
module hertat_mac_tb;
  import mac_pkg::*;
  localparam int N = 8, ACC_W = 20;

  logic             clk = 0, rst_n = 0;
  logic             in_valid = 0, in_first = 0, in_last = 0;
  logic [N-1:0]     pixel = '0, coef = '0;
  logic             out_valid;
  logic [ACC_W-1:0] out_acc;
  logic             mul_split, mul_booth;
  logic [3:0]       mul_rows;

  hertat_mac dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edge_n = 0;
  always @(posedge clk) edge_n++;

  // Scoreboard of finished windows: expected sum and the edge of its result.
  int exp_sum  [$];
  int exp_edge [$];

  // Mechanism counters.
  int n_mul = 0, n_reuse = 0, n_zero = 0, n_one = 0, n_load = 0, n_clear = 0, n_add = 0;
  int n_split = 0, n_booth = 0, n_idle = 0, n_coef_block = 0;
  logic [N-1:0] last_ref_pix, last_ref_coef;
  logic         last_ref_valid = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      case (dut.pix_class)
        PIX_MUL:   n_mul++;
        PIX_REUSE: n_reuse++;
        PIX_ZERO:  n_zero++;
        PIX_ONE:   n_one++;
        default:   ;
      endcase
      if (dut.pix_class == PIX_MUL && last_ref_valid && pixel == last_ref_pix && coef != last_ref_coef)
        n_coef_block++;
      if (dut.pix_class == PIX_MUL || dut.pix_class == PIX_ONE) begin
        last_ref_valid <= 1; last_ref_pix <= pixel; last_ref_coef <= coef;
      end
    end else n_idle++;
    if (dut.acc_op == ACC_LOAD)  n_load++;
    if (dut.acc_op == ACC_CLEAR) n_clear++;
    if (dut.acc_op == ACC_ADD)   n_add++;
    if (dut.latch2_en && !dut.latch2_sel_const && mul_split) n_split++;
    if (dut.latch2_en && !dut.latch2_sel_const && mul_booth) n_booth++;
  end

  // Result checker, sampled between edges.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_sum.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at edge %0d", edge_n);
      end else begin
        int s, e;
        s = exp_sum.pop_front();
        e = exp_edge.pop_front();
        if (int'(out_acc) != s || edge_n != e) begin
          failures++;
          $display("FAIL window sum %0d (exp %0d) at edge %0d (exp %0d)", out_acc, s, edge_n, e);
        end
      end
    end else if (exp_edge.size() != 0 && edge_n >= exp_edge[0]) begin
      checks++;
      failures++;
      $display("FAIL missing out_valid, expected at edge %0d", exp_edge[0]);
      void'(exp_sum.pop_front());
      void'(exp_edge.pop_front());
    end
  end

  // Feed one window; pixels/constants given per position.
  task automatic feed_window(input int pix [], input int cf [], input bit gaps);
    int sum;
    sum = 0;
    for (int k = 0; k < pix.size(); k++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 5) == 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        pixel = N'($urandom); coef = N'($urandom);
        @(negedge clk);
      end
      in_valid = 1;
      in_first = (k == 0);
      in_last  = (k == pix.size() - 1);
      pixel    = N'(pix[k]);
      coef     = N'(cf[k]);
      sum      = (sum + pix[k] * cf[k]) % (1 << ACC_W);
      if (in_last) begin
        exp_sum.push_back(sum);
        exp_edge.push_back(edge_n + 3);
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int win_raster [] = '{65, 66, 70, 66, 34, 68, 0, 64, 64};
  int win_zigzag [] = '{65, 66, 66, 0, 34, 70, 68, 64, 64};
  int cf9 [] = '{3, 3, 3, 3, 3, 3, 3, 3, 3};

  task automatic check_count(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    int m0, r0, z0, a0, pix [], cf [];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Example window, zig-zag order.
    m0 = n_mul; r0 = n_reuse; z0 = n_zero; a0 = n_add;
    feed_window(win_zigzag, cf9, 0);
    repeat (5) @(negedge clk);
    check_count("zig-zag multiplications", n_mul - m0, 6);
    check_count("zig-zag reuses", n_reuse - r0, 2);
    check_count("zig-zag zero skips", n_zero - z0, 1);
    check_count("zig-zag additions", n_add - a0, 7);

    // Example window, raster order.
    m0 = n_mul; r0 = n_reuse; z0 = n_zero; a0 = n_add;
    feed_window(win_raster, cf9, 0);
    repeat (5) @(negedge clk);
    check_count("raster multiplications", n_mul - m0, 7);
    check_count("raster reuses", n_reuse - r0, 1);
    check_count("raster zero skips", n_zero - z0, 1);
    check_count("raster additions", n_add - a0, 7);

    // Random windows.
    for (int w = 0; w < 400; w++) begin
      int len, c;
      len = $urandom_range(1, 12);
      pix = new[len];
      cf  = new[len];
      c   = $urandom_range(0, 255);
      for (int k = 0; k < len; k++) begin
        case ($urandom_range(0, 7))
          0:       pix[k] = 0;
          1:       pix[k] = 1;
          2, 3:    pix[k] = (k > 0) ? pix[k-1] : 66;
          4:       pix[k] = 255;
          default: pix[k] = $urandom_range(0, 255);
        endcase
        if ($urandom_range(0, 9) == 0) c = $urandom_range(0, 255);
        cf[k] = c;
      end
      feed_window(pix, cf, 1);
    end
    repeat (8) @(negedge clk);

    checks++;
    if (exp_sum.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_sum.size()); end
    $display("mul=%0d reuse=%0d zero=%0d one=%0d load=%0d clear=%0d add=%0d split=%0d booth=%0d idle=%0d coef_block=%0d",
             n_mul, n_reuse, n_zero, n_one, n_load, n_clear, n_add, n_split, n_booth, n_idle, n_coef_block);
    check_count("nonzero: mul",        int'(n_mul > 0), 1);
    check_count("nonzero: reuse",      int'(n_reuse > 0), 1);
    check_count("nonzero: zero skip",  int'(n_zero > 0), 1);
    check_count("nonzero: one bypass", int'(n_one > 0), 1);
    check_count("nonzero: load",       int'(n_load > 0), 1);
    check_count("nonzero: clear",      int'(n_clear > 0), 1);
    check_count("nonzero: add",        int'(n_add > 0), 1);
    check_count("nonzero: split",      int'(n_split > 0), 1);
    check_count("nonzero: booth",      int'(n_booth > 0), 1);
    check_count("nonzero: idle",       int'(n_idle > 0), 1);
    check_count("nonzero: coef block", int'(n_coef_block > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
