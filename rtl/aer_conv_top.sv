// aer_conv_top: AER image convolution by probabilistic event mapping.
//
// Two boards of the demonstration chain, joined by an AER bus:
//
//   convolution board:  AER in -> aer_rx -> prob_mapper -> event_simplifier
//                       -> aer_tx -> AER bus (out_*)
//                       prob_mapper reads its kernel from map_ram and its
//                       random numbers from lfsr_rng.
//   reconstruction:     AER bus -> aer_rx -+-> updown_integrator    -> host
//                                          +-> halfimage_integrator -> host
//
// An image arrives as a rate-coded event stream: each event is a 16-bit pixel
// address, and a pixel's value is its event rate. For every input event the
// mapper emits, with the probabilities and repetitions loaded in the table,
// signed events to the pixels the kernel spreads that input pixel to, so the
// output event rates form the convolved image. Negative coefficients produce
// events with the sign bit set. The simplifier, when simplify_en is high,
// cancels positive against negative events of the same pixel on the bus; when
// low it passes them through. The reconstruction side integrates the events
// in two ways at once, over an integration period that the host delimits with
// rec_clear: one signed up-down counter per pixel (rd_data), and separate
// counts of the positive and negative half-images (rd_pos, rd_neg) with their
// difference (rd_diff). Both integrators take each event in the same clock;
// they have identical timing, so the stream is simply forked to them.
//
// The host (a USB micro-controller on the real boards) loads the table
// through tab_*, sets simplify_en, and reads the reconstructed image through
// rd_*. The inter-board AER bus is brought out (out_req, out_ack, out_data)
// for observation; in this top it is connected internally. Both boards run
// on clk here; the handshakes are synchronised on each side, so separate
// clocks would work as well. The image source, the host link and the
// display are outside this design.
module aer_conv_top
  import aer_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // AER input: events from an image-to-AER source or a retina
  input  logic                in_req,
  output logic                in_ack,
  input  logic [PIX_W-1:0]    in_data,
  // host: mapping table load
  input  logic                tab_we,
  input  logic [TAB_AW-1:0]   tab_waddr,
  input  logic [TAB_DW-1:0]   tab_wdata,
  // host: on-bus simplification
  input  logic                simplify_en,
  input  logic                simp_clear,
  output logic                simp_busy,
  // inter-board AER bus, observed
  output logic                out_req,
  output logic                out_ack,
  output logic [EVT_W-1:0]    out_data,
  // host: reconstruction
  input  logic                rec_clear,
  output logic                rec_busy,
  input  logic                rd_en,
  input  logic [PIX_W-1:0]    rd_pix,
  output logic                rd_valid,
  output logic signed [REC_W-1:0] rd_data,
  output logic [REC_W-1:0]    rd_pos,
  output logic [REC_W-1:0]    rd_neg,
  output logic signed [REC_W:0] rd_diff
);

  // ---------------- convolution board ----------------
  logic              rx_valid, rx_ready;
  logic [PIX_W-1:0]  rx_pix;
  logic              ram_re;
  logic [TAB_AW-1:0] ram_raddr;
  logic [TAB_DW-1:0] ram_rdata;
  logic [RND_W-1:0]  rnd;
  logic              map_valid, map_ready;
  aer_evt_t          map_evt;
  logic              simp_valid, simp_ready;
  aer_evt_t          simp_evt;

  aer_rx #(.AW(PIX_W)) u_conv_rx (
    .clk, .rst_n,
    .aer_req(in_req), .aer_ack(in_ack), .aer_data(in_data),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_pix)
  );

  map_ram u_map_ram (
    .clk,
    .we(tab_we), .waddr(tab_waddr), .wdata(tab_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  lfsr_rng u_lfsr (
    .clk, .rst_n, .rnd(rnd), .state()
  );

  prob_mapper u_mapper (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_pix(rx_pix),
    .ram_re, .ram_raddr, .ram_rdata,
    .rnd,
    .out_valid(map_valid), .out_ready(map_ready), .out_evt(map_evt)
  );

  event_simplifier u_simp (
    .clk, .rst_n,
    .enable(simplify_en), .clear(simp_clear), .busy(simp_busy),
    .in_valid(map_valid), .in_ready(map_ready), .in_evt(map_evt),
    .out_valid(simp_valid), .out_ready(simp_ready), .out_evt(simp_evt)
  );

  aer_tx #(.AW(EVT_W)) u_conv_tx (
    .clk, .rst_n,
    .in_valid(simp_valid), .in_ready(simp_ready), .in_data(simp_evt),
    .aer_req(out_req), .aer_ack(out_ack), .aer_data(out_data)
  );

  // ---------------- reconstruction board ----------------
  logic             rec_valid, rec_ready;
  logic [EVT_W-1:0] rec_data;

  aer_rx #(.AW(EVT_W)) u_rec_rx (
    .clk, .rst_n,
    .aer_req(out_req), .aer_ack(out_ack), .aer_data(out_data),
    .out_valid(rec_valid), .out_ready(rec_ready), .out_data(rec_data)
  );

  logic integ_ready, half_ready, integ_busy, half_busy, half_valid;

  assign rec_ready = integ_ready && half_ready;
  assign rec_busy  = integ_busy || half_busy;

  updown_integrator #(.CNT_W(REC_W)) u_integ (
    .clk, .rst_n,
    .clear(rec_clear), .busy(integ_busy),
    .in_valid(rec_valid && rec_ready), .in_ready(integ_ready),
    .in_evt(aer_evt_t'(rec_data)),
    .rd_en, .rd_pix, .rd_valid, .rd_data
  );

  halfimage_integrator #(.CNT_W(REC_W)) u_half (
    .clk, .rst_n,
    .clear(rec_clear), .busy(half_busy),
    .in_valid(rec_valid && rec_ready), .in_ready(half_ready),
    .in_evt(aer_evt_t'(rec_data)),
    .rd_en, .rd_pix, .rd_valid(half_valid), .rd_pos, .rd_neg, .rd_diff
  );

  // both integrators run in step
  a_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    integ_ready == half_ready && half_valid == rd_valid);

endmodule
