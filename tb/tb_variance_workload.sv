// tb_variance_workload: the probability-noise experiment on the full chain.
// One input pixel receives 255 events per frame (a full-scale pixel), mapped
// through a single slot with probability P to one output pixel, for 30
// frames at each P in 0, 10, 20, ..., 100 %. Input events have random gaps,
// as from an asynchronous source. The reconstruction counter is read at the
// end of every frame; the per-frame counts give a mean and a variance for
// each P. Expected behaviour: the mean is 255*P; the variance is zero at 0 %
// and 100 % and largest near 50 % (it follows 255*P*(1-P) for independent
// draws); and at 50 % the value averaged over more frames comes closer to
// 127.5, within 5 % after 30 frames. Finally 1000 frames at 50 % are
// integrated in one counter (about 127500 events) and their per-frame
// variance must be within 25 % of 255*0.25.
module tb_variance_workload;
  import aer_pkg::*;
  localparam int VIN = 255, FRAMES = 30, LONG = 1000;
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
  int checks = 0, failures = 0;
  real var_p [11];

  aer_conv_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [PIX_W-1:0] PIN = 16'h0A0A, POUT = 16'h0B0B;

  task automatic set_prob(int prob);
    map_word_t w;
    w = '0; w.last = 1; w.rep = 1; w.prob = PROB_W'(prob); w.evt.pix = POUT;
    @(negedge clk);
    tab_we = 1; tab_waddr = {PIN, SLOT_W'(0)}; tab_wdata = w;
    @(negedge clk);
    tab_we = 0;
  endtask

  task automatic send_evt(logic [PIX_W-1:0] pix);
    @(negedge clk);
    in_data = pix;
    repeat ($urandom_range(0, 12)) @(negedge clk);
    in_req = 1;
    wait (in_ack == 1);
    @(negedge clk);
    in_req = 0;
    wait (in_ack == 0);
  endtask

  task automatic read_out(output int v);
    // let the last events reach the counter
    repeat (60) @(negedge clk);
    rd_en = 1; rd_pix = POUT;
    @(negedge clk);
    rd_en = 0;
    v = int'(rd_data);
  endtask

  initial begin
    int prev, now, cnt [FRAMES];
    real mean, vr, p, tol, cum;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wait (!rec_busy && !simp_busy);
    prev = 0;
    for (int k = 0; k <= 10; k++) begin
      p = k / 10.0;
      set_prob(int'(p * 256.0));   // int'() rounds to nearest
      for (int f = 0; f < FRAMES; f++) begin
        repeat (VIN) send_evt(PIN);
        read_out(now);
        cnt[f] = now - prev;
        prev = now;
      end
      mean = 0;
      foreach (cnt[f]) mean += cnt[f];
      mean /= FRAMES;
      vr = 0;
      foreach (cnt[f]) vr += (cnt[f] - mean) * (cnt[f] - mean);
      vr /= FRAMES;
      var_p[k] = vr;
      // mean within 4.5 standard errors (plus rounding of P to 1/256)
      tol = 4.5 * $sqrt(VIN * p * (1.0 - p) / FRAMES) + 1.0;
      checks++;
      if (mean < VIN * p - tol || mean > VIN * p + tol) begin
        failures++;
        $display("P=%0.1f: mean %0.2f expected %0.2f", p, mean, VIN * p);
      end
      $display("P=%3d%%: mean %6.2f (expected %6.2f)  variance %6.2f (independent draws %6.2f)",
               k * 10, mean, VIN * p, vr, VIN * p * (1.0 - p));
      if (k == 5) begin
        // Fig.-7-style: normalised running average over frames
        cum = 0;
        for (int f = 0; f < FRAMES; f++) begin
          cum += cnt[f];
          if (f == 0 || f == 4 || f == 29)
            $display("  P=50%%: average over %2d frames / 127.5 = %0.3f", f + 1, cum / (f + 1) / 127.5);
        end
        checks++;
        if (cum / FRAMES / 127.5 < 0.95 || cum / FRAMES / 127.5 > 1.05) begin
          failures++;
          $display("30-frame average off by more than 5 %%");
        end
      end
    end
    // 1000 frames at 50 %: the long-integration case. The counter is cleared
    // first and must reach about 127500, beyond a 16-bit count.
    @(negedge clk); rec_clear = 1; @(negedge clk); rec_clear = 0;
    @(negedge clk);
    wait (!rec_busy);
    set_prob(128);
    prev = 0;
    mean = 0; vr = 0;
    for (int f = 0; f < LONG; f++) begin
      repeat (VIN) send_evt(PIN);
      read_out(now);
      mean += now - prev;
      vr += (now - prev - 127.5) * (now - prev - 127.5);
      prev = now;
    end
    vr /= LONG;
    $display("P= 50%%, %0d frames: total %0d (expected %0d), variance per frame %6.2f",
             LONG, now, VIN * LONG / 2, vr);
    checks++;
    if (now < VIN * LONG / 2 - 1150 || now > VIN * LONG / 2 + 1150) begin
      failures++; $display("1000-frame total off");
    end
    checks++;
    if (vr < 0.75 * 63.75 || vr > 1.25 * 63.75) begin
      failures++; $display("1000-frame variance off");
    end
    checks++;
    if (var_p[0] != 0.0 || var_p[10] != 0.0) begin
      failures++; $display("variance at 0 %% or 100 %% not zero");
    end
    checks++;
    if (!(var_p[5] > var_p[1] && var_p[5] > var_p[9] && var_p[4] > var_p[1] && var_p[6] > var_p[9])) begin
      failures++; $display("variance does not peak in the middle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
