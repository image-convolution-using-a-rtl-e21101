// tb_image_workload: convolution of a whole (small) image on the full chain.
// A 16x16 synthetic image is sent as rate-coded events: a dim background
// gradient with a bright tower in the middle, 2..40 events per pixel and
// frame, in random order with random gaps. The soft 2x2 kernel
// [[0.75, 0.1], [0.1, 0.05]] is loaded for every pixel (each input pixel
// feeds itself, its right and lower neighbours and the diagonal one). The
// reconstruction is read after 1 frame and after 10 frames and compared with
// the exact convolution times the number of frames. The mean absolute error,
// relative to the mean pixel value, must be below 7 % after 10 frames and
// smaller than after one frame: longer integration averages out the noise of
// the random draws.
module tb_image_workload;
  import aer_pkg::*;
  localparam int N = 16, X0 = 40, Y0 = 40, FR = 10;
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
  int img [N][N];
  real kern [2][2] = '{'{0.75, 0.1}, '{0.1, 0.05}};   // [dy][dx]
  logic [PIX_W-1:0] evq [$];

  aer_conv_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PIX_W-1:0] xy(int x, int y);
    return {8'(y), 8'(x)};
  endfunction

  function automatic int X(int x, int y);
    if (x < 0 || y < 0 || x >= N || y >= N) return 0;
    return img[y][x];
  endfunction

  task automatic wr_slot(logic [PIX_W-1:0] pix, int slot, logic [PIX_W-1:0] opix, int prob,
                         bit last);
    map_word_t w;
    w = '0; w.last = last; w.rep = 1; w.prob = PROB_W'(prob); w.evt.pix = opix;
    @(negedge clk);
    tab_we = 1; tab_waddr = {pix, SLOT_W'(slot)}; tab_wdata = w;
    @(negedge clk);
    tab_we = 0;
  endtask

  task automatic send_evt(logic [PIX_W-1:0] pix);
    @(negedge clk);
    in_data = pix;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    in_req = 1;
    wait (in_ack == 1);
    @(negedge clk);
    in_req = 0;
    wait (in_ack == 0);
  endtask

  // mean absolute error of the reconstruction after f frames, relative to
  // the mean expected pixel value
  task automatic measure(int f, output real err);
    real sum_err = 0, sum_exp = 0, e;
    repeat (100) @(negedge clk);
    for (int y = 0; y <= N; y++)
      for (int x = 0; x <= N; x++) begin
        e = 0;
        // output (x, y) collects input (x-dx, y-dy) with weight kern[dy][dx]
        for (int dy = 0; dy < 2; dy++)
          for (int dx = 0; dx < 2; dx++) e += kern[dy][dx] * X(x - dx, y - dy);
        e *= f;
        @(negedge clk);
        rd_en = 1; rd_pix = xy(X0 + x, Y0 + y);
        @(negedge clk);
        rd_en = 0;
        sum_err += (rd_data > e) ? (rd_data - e) : (e - rd_data);
        sum_exp += e;
      end
    err = sum_err / sum_exp;
  endtask

  initial begin
    real err1, err10;
    int pr [2][2];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wait (!rec_busy && !simp_busy);
    // image: gradient background, bright tower with darker windows
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        img[y][x] = 4 + (x + y) / 3;
        if (x >= 6 && x < 10 && y >= 2) img[y][x] = (y % 4 == 1 && x % 2 == 1) ? 12 : 40;
        if (y >= 13) img[y][x] = 2;
      end
    // table: P = round(256 k), R = 1
    foreach (kern[dy, dx]) pr[dy][dx] = int'(kern[dy][dx] * 256.0);
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        wr_slot(xy(X0 + x, Y0 + y), 0, xy(X0 + x,     Y0 + y),     pr[0][0], 0);
        wr_slot(xy(X0 + x, Y0 + y), 1, xy(X0 + x + 1, Y0 + y),     pr[0][1], 0);
        wr_slot(xy(X0 + x, Y0 + y), 2, xy(X0 + x,     Y0 + y + 1), pr[1][0], 0);
        wr_slot(xy(X0 + x, Y0 + y), 3, xy(X0 + x + 1, Y0 + y + 1), pr[1][1], 1);
      end
    for (int f = 1; f <= FR; f++) begin
      evq.delete();
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) repeat (img[y][x]) evq.push_back(xy(X0 + x, Y0 + y));
      evq.shuffle();
      foreach (evq[i]) send_evt(evq[i]);
      if (f == 1) measure(1, err1);
    end
    measure(FR, err10);
    $display("mean absolute error: %0.1f %% after 1 frame, %0.1f %% after %0d frames",
             100.0 * err1, 100.0 * err10, FR);
    checks++;
    if (err10 >= 0.07) begin failures++; $display("error after %0d frames too large", FR); end
    checks++;
    if (err10 >= err1) begin failures++; $display("error did not fall with integration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
