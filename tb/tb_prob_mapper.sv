// tb_prob_mapper: checks the probabilistic multi-event mapper together with
// the table memory and the LFSR it reads.
//  1. Deterministic slots (P = 256 always emits, P = 0 never): pixel A has
//     slots X (R=1), Y negative (R=3), Z (P=0, R=2), an empty slot (R=0) and
//     W (R=1, last). It must give X Y Y Y W, in order, and back-to-back
//     events must be accepted 1 + (2 + 4 + 3 + 2 + 2) = 14 clocks apart.
//  2. Pixel B fills all 8 slots without a last bit: the walk stops after 8.
//  3. The same deterministic events under random output back-pressure.
//  4. Statistics: pixel C has one slot with P = 128 (0.5); pixel D has
//     coefficient 1.2 as R = 2, P = 154 (0.6). Event counts must lie within
//     about 4.5 standard deviations of N*0.5 and N*2*154/256.
module tb_prob_mapper;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [PIX_W-1:0] in_pix = '0;
  logic ram_re;
  logic [TAB_AW-1:0] ram_raddr;
  logic [TAB_DW-1:0] ram_rdata;
  logic tab_we = 0;
  logic [TAB_AW-1:0] tab_waddr = '0;
  logic [TAB_DW-1:0] tab_wdata = '0;
  logic [RND_W-1:0] rnd;
  logic out_valid, out_ready;
  aer_evt_t out_evt;
  logic bp = 0;                      // random back-pressure on
  int checks = 0, failures = 0;
  aer_evt_t expq [$];
  int n_out = 0;
  int cnt_c = 0, cnt_d = 0;
  logic [PIX_W-1:0] PIX_A = 16'h0102, PIX_B = 16'h0203, PIX_C = 16'h0304, PIX_D = 16'h0405;

  map_ram u_ram (.clk, .we(tab_we), .waddr(tab_waddr), .wdata(tab_wdata),
                 .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));
  lfsr_rng u_rng (.clk, .rst_n, .rnd, .state());
  prob_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) out_ready <= bp ? ($urandom_range(0, 2) == 0) : 1'b1;

  function automatic aer_evt_t ev(bit neg, logic [PIX_W-1:0] p);
    ev.neg = neg; ev.pix = p;
  endfunction

  task automatic wr(logic [PIX_W-1:0] pix, int slot, aer_evt_t e, int prob, int rep, bit last);
    map_word_t w;
    w.rsvd = 0; w.last = last; w.rep = REP_W'(rep); w.prob = PROB_W'(prob); w.evt = e;
    @(negedge clk);
    tab_we = 1; tab_waddr = {pix, SLOT_W'(slot)}; tab_wdata = w;
    @(negedge clk);
    tab_we = 0;
  endtask

  // output monitor: deterministic pixels are checked against expq,
  // statistical ones are counted
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    n_out++;
    if (out_evt.pix == 16'hC000) cnt_c++;
    else if (out_evt.pix == 16'hD000) cnt_d++;
    else begin
      checks++;
      if (expq.size() == 0 || out_evt !== expq[0]) begin
        failures++;
        $display("unexpected output %h", out_evt);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  int t_acc [$];
  always @(posedge clk) if (rst_n && in_valid && in_ready) t_acc.push_back(int'($time / 10));

  task automatic send(logic [PIX_W-1:0] pix);
    @(negedge clk);
    in_valid = 1; in_pix = pix;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_a();
    expq.push_back(ev(0, 16'hA001));
    repeat (3) expq.push_back(ev(1, 16'hA002));
    expq.push_back(ev(0, 16'hA004));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // table
    wr(PIX_A, 0, ev(0, 16'hA001), 256, 1, 0);
    wr(PIX_A, 1, ev(1, 16'hA002), 256, 3, 0);
    wr(PIX_A, 2, ev(0, 16'hA003), 0,   2, 0);
    wr(PIX_A, 3, ev(0, 16'hA0FF), 256, 0, 0);
    wr(PIX_A, 4, ev(0, 16'hA004), 256, 1, 1);
    wr(PIX_A, 5, ev(0, 16'hAEEE), 256, 1, 1);   // beyond the last slot
    for (int s = 0; s < 8; s++) wr(PIX_B, s, ev(s[0], 16'hB000 + 16'(s)), 256, 1, 0);
    wr(PIX_C, 0, ev(0, 16'hC000), 128, 1, 1);
    wr(PIX_D, 0, ev(0, 16'hD000), 154, 2, 1);

    // 1. back-to-back events to A: accept spacing 14 clocks
    t_acc.delete();
    @(negedge clk);
    in_valid = 1; in_pix = PIX_A;
    repeat (3) expect_a();
    begin
      int got = 0;
      while (got < 3) begin
        @(posedge clk);
        if (in_ready) got++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (t_acc.size() != 3 || t_acc[1] - t_acc[0] != 14 || t_acc[2] - t_acc[1] != 14) begin
      failures++;
      $display("accept times %p, expected spacing 14", t_acc);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events missing (1)", expq.size()); end

    // 2. all eight slots
    for (int s = 0; s < 8; s++) expq.push_back(ev(s[0], 16'hB000 + 16'(s)));
    send(PIX_B);
    repeat (40) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events missing (2)", expq.size()); end

    // 3. back-pressure
    bp = 1;
    for (int i = 0; i < 20; i++) begin
      if (i % 2 == 0) expect_a();
      else for (int s = 0; s < 8; s++) expq.push_back(ev(s[0], 16'hB000 + 16'(s)));
      send((i % 2 == 0) ? PIX_A : PIX_B);
    end
    repeat (200) @(negedge clk);
    bp = 0;
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events missing (3)", expq.size()); end

    // 4. statistics
    for (int i = 0; i < 4000; i++) begin
      send(PIX_C);
      send(PIX_D);
      repeat ($urandom_range(0, 7)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    // C: mean 2000, sd 31.6; D: 8000 draws p=154/256, mean 4812.5, sd 43.8
    checks++;
    if (cnt_c < 1860 || cnt_c > 2140) begin failures++; $display("P=0.5 gave %0d of 4000", cnt_c); end
    checks++;
    if (cnt_d < 4615 || cnt_d > 5010) begin failures++; $display("coef 1.2 gave %0d for 4000", cnt_d); end
    $display("P=0.5: %0d/4000, coefficient 1.2 (R=2, P=154/256): %0d/4000", cnt_c, cnt_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
