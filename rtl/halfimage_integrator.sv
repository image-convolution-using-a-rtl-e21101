// halfimage_integrator: rebuilds the positive and negative half-images.
//
// A signed kernel turns one image into two event streams: events with the
// sign bit clear form the positive half-image and events with it set form
// the negative one. This block integrates the two separately: every pixel
// has one unsigned counter for positive and one for negative events. The host
// reads both and their difference, which is the convolved pixel. It gives the
// same result as counting up and down in one counter (updown_integrator), but
// it also shows each half-image on its own. That is how one sees whether
// on-bus simplification worked: ideally no pixel has events in both halves.
// Separate integration followed by subtraction is one of the two
// reconstruction methods of the published scheme. The counter width,
// saturation at the top of the range, the clear sweep and the read port are
// this design's choices, the same as in updown_integrator.
//
// Interface and timing: events come on a valid/ready stream and take two
// clocks each (read, then increment and write back the counter of the event's
// sign). A pulse on clear, and reset, zero all counters one pixel per clock
// (2^PIX_W clocks, busy high, no events taken). rd_en / rd_pix read a pixel;
// rd_pos, rd_neg and rd_diff = rd_pos - rd_neg are valid with rd_valid one
// clock later.
module halfimage_integrator
  import aer_pkg::*;
#(
  parameter int unsigned CNT_W = REC_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  output logic                  busy,
  // events in
  input  logic                  in_valid,
  output logic                  in_ready,
  input  aer_evt_t              in_evt,
  // host read port
  input  logic                  rd_en,
  input  logic [PIX_W-1:0]      rd_pix,
  output logic                  rd_valid,
  output logic [CNT_W-1:0]      rd_pos,
  output logic [CNT_W-1:0]      rd_neg,
  output logic signed [CNT_W:0] rd_diff
);

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_UPDATE} half_state_t;
  half_state_t state;

  logic [CNT_W-1:0] pos_mem [2**PIX_W];
  logic [CNT_W-1:0] neg_mem [2**PIX_W];
  logic [CNT_W-1:0] cnt_rd;
  logic [CNT_W-1:0] cnt_new;
  logic [PIX_W-1:0] clr_idx;
  aer_evt_t         evt_q;

  assign busy     = (state == S_CLEAR);
  assign in_ready = (state == S_IDLE) && !clear;
  assign cnt_new  = (cnt_rd == '1) ? cnt_rd : cnt_rd + CNT_W'(1);
  assign rd_diff  = $signed({1'b0, rd_pos}) - $signed({1'b0, rd_neg});

  always_ff @(posedge clk) begin
    if (state == S_CLEAR) pos_mem[clr_idx] <= '0;
    else if (state == S_UPDATE && !evt_q.neg) pos_mem[evt_q.pix] <= cnt_new;
  end

  always_ff @(posedge clk) begin
    if (state == S_CLEAR) neg_mem[clr_idx] <= '0;
    else if (state == S_UPDATE && evt_q.neg) neg_mem[evt_q.pix] <= cnt_new;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      cnt_rd <= in_evt.neg ? neg_mem[in_evt.pix] : pos_mem[in_evt.pix];
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_pos <= pos_mem[rd_pix];
      rd_neg <= neg_mem[rd_pix];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      clr_idx  <= '0;
      evt_q    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      unique case (state)
        S_CLEAR: begin
          clr_idx <= clr_idx + PIX_W'(1);
          if (clr_idx == '1) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clear) begin
            clr_idx <= '0;
            state   <= S_CLEAR;
          end else if (in_valid) begin
            evt_q <= in_evt;
            state <= S_UPDATE;
          end
        end
        S_UPDATE: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
