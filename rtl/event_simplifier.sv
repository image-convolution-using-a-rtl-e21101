// event_simplifier: cancels positive against negative events on the bus.
//
// A signed kernel splits the convolved image into a positive and a negative
// half-image, carried by events with the sign bit clear or set. Instead of
// subtracting the two at the receiver, this block cancels them in the event
// stream: it keeps, for every pixel, a small signed count c of events it is
// holding back (positive c = held positive events, negative c = held
// negative events, |c| <= 2^HOLD_W - 1). For an arriving event of sign s:
//   - if c has the opposite sign, one held event and the new one annihilate:
//     c moves one step towards zero and nothing is sent;
//   - else, if fewer than 2^HOLD_W - 1 events are held, the new one is held;
//   - else the count is full and an event of that pixel and sign is sent
//     (the oldest held one leaves and the new one takes its place).
// With HOLD_W = 1 this is the basic scheme (a positive event waits for the
// next event of its pixel: another positive releases it, a negative removes
// both); a wider count lets groups of one sign wait longer for their
// opposites. Treating negative events the same way as positive ones, and
// never flushing held events (each pixel may keep up to 2^HOLD_W - 1 of them,
// an error of that many events in the result), are this design's choices.
//
// With enable low the block passes events through unchanged and leaves its
// counts alone. After reset, and after a pulse on clear, the counts of all
// 2^PIX_W pixels are zeroed one per clock; busy is high and no event is taken
// meanwhile. The counts live in a memory with a synchronous read, so each
// event takes two clocks (read, then update and write): in_ready is high at
// most every other clock while enabled.
module event_simplifier
  import aer_pkg::*;
#(
  parameter int unsigned HOLD_W = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  logic     clear,
  output logic     busy,
  // events in
  input  logic     in_valid,
  output logic     in_ready,
  input  aer_evt_t in_evt,
  // events out
  output logic     out_valid,
  input  logic     out_ready,
  output aer_evt_t out_evt
);

  localparam int unsigned CW = HOLD_W + 1;   // signed count width
  localparam logic signed [CW-1:0] CMAX = CW'((2 ** HOLD_W) - 1);

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_UPDATE} simp_state_t;
  simp_state_t state;

  logic signed [CW-1:0] cnt_mem [2**PIX_W];
  logic signed [CW-1:0] cnt_rd;
  logic signed [CW-1:0] cnt_new;
  logic [PIX_W-1:0]     clr_idx;
  aer_evt_t             evt_q;
  logic                 out_free;
  logic                 take;
  logic                 send;

  assign out_free = !out_valid || out_ready;
  assign busy     = (state == S_CLEAR);
  assign in_ready = (state == S_IDLE) && out_free;
  assign take     = in_valid && in_ready;

  // decision for the event held in evt_q against its pixel's count cnt_rd
  always_comb begin
    cnt_new = cnt_rd;
    send    = 1'b0;
    if (!evt_q.neg) begin
      if (cnt_rd < CMAX) cnt_new = cnt_rd + CW'(1);
      else               send    = 1'b1;
    end else begin
      if (cnt_rd > -CMAX) cnt_new = cnt_rd - CW'(1);
      else                send    = 1'b1;
    end
  end

  // count memory: one read port, one write port
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)       cnt_mem[clr_idx]   <= '0;
    else if (state == S_UPDATE) cnt_mem[evt_q.pix] <= cnt_new;
  end

  always_ff @(posedge clk) begin
    if (take) cnt_rd <= cnt_mem[in_evt.pix];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_idx   <= '0;
      evt_q     <= '0;
      out_valid <= 1'b0;
      out_evt   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          clr_idx <= clr_idx + PIX_W'(1);
          if (clr_idx == '1) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clear) begin
            clr_idx <= '0;
            state   <= S_CLEAR;
          end else if (take) begin
            if (enable) begin
              evt_q <= in_evt;
              state <= S_UPDATE;
            end else begin
              out_valid <= 1'b1;
              out_evt   <= in_evt;
            end
          end
        end
        S_UPDATE: begin
          // in_ready was low, so the output register is free here
          if (send) begin
            out_valid <= 1'b1;
            out_evt   <= evt_q;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_evt));

endmodule
