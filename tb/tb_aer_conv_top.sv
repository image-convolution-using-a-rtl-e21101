// tb_aer_conv_top: end-to-end test of the convolution chain at full size.
// A rate-coded image source (four-phase AER sender) feeds the convolution
// board; the reconstruction board's counters are read back through the host
// port and compared with the convolution worked out here.
//  1. Edge kernel [[1, 0], [0, -1]] on a random 6x6 patch, simplification
//     off. Every coefficient is exact (R = 1, P = 256), so each output pixel
//     must read exactly X(x,y) - X(x-1,y-1): the negative half-image is the
//     input shifted one pixel right and down.
//  2. The same events in a new order with simplification on. Each pixel's
//     count plus the events still held for it in the simplifier must equal
//     the same result, at most one event may be held per pixel, and fewer
//     events may cross the inter-board bus than in phase 1.
//  3. Soft kernel [[0.75, 0.1], [0.1, 0.05]] (P = 192, 26, 26, 13 of 256) on
//     one pixel and coefficient 1.2 (R = 2, P = 154) on another, 2000 input
//     events each: the counts must be within about 4.5 standard deviations
//     of the expected 1500, 200, 200, 100 and 2406.
// Every read also compares the up-down count with the difference of the
// separately integrated half-images; in phase 1 each half-image is checked
// on its own, and phase 2 must leave fewer pixels present in both halves.
// The test counts how often each mechanism happened (multi-event output,
// negative events, rejected draws, repeated slots, stalls, holds,
// cancellations, releases, bypass, clears) and fails if one never did.
module tb_aer_conv_top;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack;
  logic [PIX_W-1:0] in_data = '0;
  logic tab_we = 0;
  logic [TAB_AW-1:0] tab_waddr = '0;
  logic [TAB_DW-1:0] tab_wdata = '0;
  logic simplify_en = 0, simp_clear = 0, simp_busy;
  logic out_req, out_ack;
  logic [EVT_W-1:0] out_data;
  logic rec_clear = 0, rec_busy;
  logic rd_en = 0;
  logic [PIX_W-1:0] rd_pix = '0;
  logic rd_valid;
  logic signed [REC_W-1:0] rd_data;
  logic [REC_W-1:0] rd_pos, rd_neg;
  logic signed [REC_W:0] rd_diff;
  int pos_v, neg_v, both1 = 0, both2 = 0;
  int checks = 0, failures = 0;

  aer_conv_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_in = 0, n_map = 0, n_multi = 0, n_neg = 0, n_reject = 0, n_repeat = 0;
  int n_stall = 0, n_hold = 0, n_cancel = 0, n_release = 0, n_bypass = 0;
  int n_bus = 0, n_clear = 0, per_in = 0;
  logic out_req_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.rx_valid && dut.rx_ready) begin
      n_in++;
      if (per_in > 1) n_multi++;
      per_in = 0;
    end
    if (dut.map_valid && dut.map_ready) begin
      n_map++; per_in++;
      if (dut.map_evt.neg) n_neg++;
    end
    if (dut.map_valid && !dut.map_ready) n_stall++;
    if (dut.u_mapper.state == dut.u_mapper.S_DRAW && dut.u_mapper.out_free &&
        dut.u_mapper.rep_q != 0 && !dut.u_mapper.fire) n_reject++;
    if (dut.u_mapper.state == dut.u_mapper.S_READ && dut.u_mapper.rd_word.rep > 1) n_repeat++;
    if (dut.u_simp.state == dut.u_simp.S_UPDATE) begin
      if (dut.u_simp.send) n_release++;
      else if ((dut.u_simp.cnt_rd < 0 && !dut.u_simp.evt_q.neg) ||
               (dut.u_simp.cnt_rd > 0 && dut.u_simp.evt_q.neg)) n_cancel++;
      else n_hold++;
    end
    if (dut.map_valid && dut.map_ready && !simplify_en) n_bypass++;
    out_req_d <= out_req;
    if (out_req && !out_req_d) n_bus++;
    if (rec_clear || simp_clear) n_clear++;
  end

  // ---------------- host and source models ----------------
  function automatic logic [PIX_W-1:0] xy(int x, int y);
    return {8'(y), 8'(x)};
  endfunction

  task automatic wr_slot(logic [PIX_W-1:0] pix, int slot, bit neg, logic [PIX_W-1:0] opix,
                         int prob, int rep, bit last);
    map_word_t w;
    w.rsvd = 0; w.last = last; w.rep = REP_W'(rep); w.prob = PROB_W'(prob);
    w.evt.neg = neg; w.evt.pix = opix;
    @(negedge clk);
    tab_we = 1; tab_waddr = {pix, SLOT_W'(slot)}; tab_wdata = w;
    @(negedge clk);
    tab_we = 0;
  endtask

  // four-phase AER sender: one event
  task automatic send_evt(logic [PIX_W-1:0] pix);
    @(negedge clk);
    in_data = pix;
    @(negedge clk);
    in_req = 1;
    wait (in_ack == 1);
    @(negedge clk);
    in_req = 0;
    wait (in_ack == 0);
  endtask

  task automatic read_pix(logic [PIX_W-1:0] p, output int v);
    @(negedge clk);
    rd_en = 1; rd_pix = p;
    @(negedge clk);
    rd_en = 0;
    v = int'(rd_data);
    pos_v = int'(rd_pos);
    neg_v = int'(rd_neg);
    // the two reconstructions must agree
    checks++;
    if (int'(rd_diff) != v) begin
      failures++;
      $display("pixel %h: up-down %0d, half-images %0d - %0d = %0d", p, v, pos_v, neg_v, rd_diff);
    end
  endtask

  task automatic wait_idle();
    // let the chain drain: no traffic for 200 clocks
    int quiet = 0;
    while (quiet < 200) begin
      @(posedge clk);
      if (dut.rx_valid || dut.map_valid || dut.simp_valid || out_req || out_ack ||
          dut.u_mapper.state != dut.u_mapper.S_IDLE) quiet = 0;
      else quiet++;
    end
  endtask

  task automatic clear_all();
    @(negedge clk); rec_clear = 1; simp_clear = 1;
    @(negedge clk); rec_clear = 0; simp_clear = 0;
    @(negedge clk);
    wait (!rec_busy && !simp_busy);
  endtask

  // ---------------- test ----------------
  localparam int X0 = 20, Y0 = 20, W = 6;
  int img [W][W];
  logic [PIX_W-1:0] evq [$];

  function automatic int X(int x, int y);
    if (x < X0 || y < Y0 || x >= X0 + W || y >= Y0 + W) return 0;
    return img[y - Y0][x - X0];
  endfunction

  task automatic shuffle_send();
    evq.shuffle();
    foreach (evq[i]) send_evt(evq[i]);
    wait_idle();
  endtask

  initial begin
    int v, bus1, held, tot;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wait (!rec_busy && !simp_busy);

    // table for the edge kernel on the patch
    for (int y = Y0; y < Y0 + W; y++)
      for (int x = X0; x < X0 + W; x++) begin
        wr_slot(xy(x, y), 0, 0, xy(x, y), 256, 1, 0);
        wr_slot(xy(x, y), 1, 1, xy(x + 1, y + 1), 256, 1, 1);
      end
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = $urandom_range(0, 6);
        repeat (img[y][x]) evq.push_back(xy(X0 + x, Y0 + y));
      end

    // 1. simplification off
    simplify_en = 0;
    n_bus = 0;
    shuffle_send();
    bus1 = n_bus;
    for (int y = Y0; y <= Y0 + W; y++)
      for (int x = X0; x <= X0 + W; x++) begin
        read_pix(xy(x, y), v);
        if (pos_v > 0 && neg_v > 0) both1++;
        checks++;
        if (pos_v != X(x, y) || neg_v != X(x - 1, y - 1)) begin
          failures++;
          $display("phase 1 (%0d,%0d): half-images %0d, %0d", x, y, pos_v, neg_v);
        end
        checks++;
        if (v != X(x, y) - X(x - 1, y - 1)) begin
          failures++;
          $display("phase 1 (%0d,%0d): %0d expected %0d", x, y, v, X(x, y) - X(x - 1, y - 1));
        end
      end

    // 2. simplification on
    clear_all();
    simplify_en = 1;
    n_bus = 0;
    shuffle_send();
    for (int y = Y0; y <= Y0 + W; y++)
      for (int x = X0; x <= X0 + W; x++) begin
        read_pix(xy(x, y), v);
        held = int'(dut.u_simp.cnt_mem[xy(x, y)]);
        if (pos_v > 0 && neg_v > 0) both2++;
        checks++;
        if (v + held != X(x, y) - X(x - 1, y - 1) || held > 1 || held < -1) begin
          failures++;
          $display("phase 2 (%0d,%0d): %0d + held %0d expected %0d", x, y, v, held,
                   X(x, y) - X(x - 1, y - 1));
        end
      end
    checks++;
    if (n_bus >= bus1) begin failures++; $display("bus events %0d not below %0d", n_bus, bus1); end
    $display("bus events: %0d without simplification, %0d with", bus1, n_bus);
    // simplified traffic should rarely put a pixel in both half-images
    $display("pixels present in both half-images: %0d without simplification, %0d with",
             both1, both2);
    checks++;
    if (both2 >= both1) begin failures++; $display("simplification left as many mixed pixels"); end

    // 3. probabilistic kernels
    clear_all();
    simplify_en = 0;
    wr_slot(xy(100, 100), 0, 0, xy(100, 100), 192, 1, 0);
    wr_slot(xy(100, 100), 1, 0, xy(101, 100), 26, 1, 0);
    wr_slot(xy(100, 100), 2, 0, xy(100, 101), 26, 1, 0);
    wr_slot(xy(100, 100), 3, 0, xy(101, 101), 13, 1, 1);
    wr_slot(xy(150, 150), 0, 0, xy(150, 150), 154, 2, 1);
    evq.delete();
    repeat (2000) begin
      evq.push_back(xy(100, 100));
      evq.push_back(xy(150, 150));
    end
    shuffle_send();
    begin
      int exp_v [5] = '{1500, 200, 200, 100, 2406};
      int tol   [5] = '{88, 61, 61, 44, 100};
      logic [PIX_W-1:0] px [5];
      px = '{xy(100, 100), xy(101, 100), xy(100, 101), xy(101, 101), xy(150, 150)};
      for (int i = 0; i < 5; i++) begin
        read_pix(px[i], v);
        checks++;
        if (v < exp_v[i] - tol[i] || v > exp_v[i] + tol[i]) begin
          failures++;
          $display("phase 3 pixel %h: %0d expected %0d +- %0d", px[i], v, exp_v[i], tol[i]);
        end
        $display("phase 3 pixel %h: %0d (expected %0d)", px[i], v, exp_v[i]);
      end
    end

    // mechanisms
    $display("inputs %0d mapped %0d multi %0d negative %0d rejected %0d repeated %0d stalls %0d",
             n_in, n_map, n_multi, n_neg, n_reject, n_repeat, n_stall);
    $display("hold %0d cancel %0d release %0d bypass %0d clears %0d",
             n_hold, n_cancel, n_release, n_bypass, n_clear);
    tot = 0;
    foreach (img[y, x]) tot += img[y][x];
    checks++;
    if (n_in != 2 * tot + 4000) begin failures++; $display("inputs %0d expected %0d", n_in, 2 * tot + 4000); end
    checks++;
    if (n_multi == 0 || n_neg == 0 || n_reject == 0 || n_repeat == 0 || n_stall == 0 ||
        n_hold == 0 || n_cancel == 0 || n_release == 0 || n_bypass == 0 || n_clear == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
