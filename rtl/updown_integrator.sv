// updown_integrator: rebuilds the convolved image from signed events.
//
// The image a stream of events represents is, for each pixel, the number of
// events that arrived for it in an integration period. With signed events the
// positive and negative half-images must be subtracted; this block does the
// subtraction while it integrates: each pixel has a signed up-down counter
// that counts up on a positive event and down on a negative one. Counters
// saturate at the ends of their CNT_W-bit signed range instead of wrapping.
// The host reads a pixel's counter through a second, independent read port
// (rd_en / rd_pix, result in rd_data with rd_valid one clock later), and
// starts a new integration period with a pulse on clear, which zeroes all
// 2^PIX_W counters, one per clock, with busy high; events are not taken
// meanwhile. Reset also clears. The 20-bit counter width (enough for 1000 frames of a full-scale 255-event pixel), saturation, the clear
// sweep and the read port are this design's choices; up-down counting of
// signed events per pixel is the reconstruction being implemented.
//
// Timing: the counters sit in a memory with a synchronous read, so each event
// takes two clocks (read, then add and write back); in_ready is high at most
// every other clock. A host read in the clock an event's count is written
// returns the count from before that event.
module updown_integrator
  import aer_pkg::*;
#(
  parameter int unsigned CNT_W = REC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  output logic                    busy,
  // events in
  input  logic                    in_valid,
  output logic                    in_ready,
  input  aer_evt_t                in_evt,
  // host read port
  input  logic                    rd_en,
  input  logic [PIX_W-1:0]        rd_pix,
  output logic                    rd_valid,
  output logic signed [CNT_W-1:0] rd_data
);

  localparam logic signed [CNT_W-1:0] CMAX = {1'b0, {(CNT_W-1){1'b1}}};
  localparam logic signed [CNT_W-1:0] CMIN = {1'b1, {(CNT_W-1){1'b0}}};

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_UPDATE} int_state_t;
  int_state_t state;

  logic signed [CNT_W-1:0] cnt_mem [2**PIX_W];
  logic signed [CNT_W-1:0] cnt_rd;
  logic signed [CNT_W-1:0] cnt_new;
  logic [PIX_W-1:0]        clr_idx;
  aer_evt_t                evt_q;

  assign busy     = (state == S_CLEAR);
  assign in_ready = (state == S_IDLE) && !clear;

  always_comb begin
    cnt_new = cnt_rd;
    if (!evt_q.neg) begin
      if (cnt_rd != CMAX) cnt_new = cnt_rd + CNT_W'(1);
    end else begin
      if (cnt_rd != CMIN) cnt_new = cnt_rd - CNT_W'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_CLEAR)       cnt_mem[clr_idx]   <= '0;
    else if (state == S_UPDATE) cnt_mem[evt_q.pix] <= cnt_new;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) cnt_rd <= cnt_mem[in_evt.pix];
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= cnt_mem[rd_pix];
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
