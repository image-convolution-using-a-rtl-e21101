// prob_mapper: probabilistic multi-event mapper.
//
// For every input event (a pixel address) the mapper reads that pixel's
// slots from the mapping table, {pixel, 0}, {pixel, 1}, ... Each slot names
// an output event (a pixel address and a sign), a probability P/256 and a
// repetition factor R. The mapper makes R draws for the slot; in each draw it
// compares P with the random number from the free-running LFSR and emits the
// output event only if P is greater. The expected number of output events per
// input event is therefore R*P/256, which lets the table realise a
// convolution kernel: for each input pixel the slots hold the neighbouring
// output pixels that the kernel spreads it to, with R = ceil(|k|) and
// P = 256*|k|/R, and the negative half-image address when k < 0. The walk
// stops after the slot whose last bit is set, or after slot SLOTS-1. A slot
// with R = 0 is skipped. Reading slots in order, comparing with an LFSR value
// and repeating R times follow the mapper's description; the table word
// layout (aer_pkg::map_word_t), the stop bit and the timing are this design's.
//
// Timing (table read latency 1): each slot takes one clock to read plus
// max(R,1) clocks of draws, one draw per clock. An event whose last used slot
// is k occupies the mapper for one accepting clock (idle, in_ready high) plus
// the sum over slots 0..k of (1 + max(R,1)) clocks; back-to-back events are
// accepted that many clocks apart unless the output stream stalls. The
// output is one register: a draw is made only when that register is free or
// being emptied in the same clock, so a stall never changes which draws emit.
module prob_mapper
  import aer_pkg::*;
#(
  parameter int unsigned NSLOTS = SLOTS
) (
  input  logic              clk,
  input  logic              rst_n,
  // input events: pixel addresses
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_pix,
  // mapping table read port
  output logic              ram_re,
  output logic [TAB_AW-1:0] ram_raddr,
  input  logic [TAB_DW-1:0] ram_rdata,
  // random number from the LFSR
  input  logic [RND_W-1:0]  rnd,
  // output events
  output logic              out_valid,
  input  logic              out_ready,
  output aer_evt_t          out_evt
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAW} map_state_t;
  map_state_t        state;
  logic [PIX_W-1:0]  pix_q;
  logic [SLOT_W-1:0] slot_q;
  aer_evt_t          evt_q;
  logic [PROB_W-1:0] prob_q;
  logic              last_q;
  logic [REP_W-1:0]  rep_q;
  logic              out_free;
  logic              slot_done;
  logic              walk_done;
  logic              fire;

  map_word_t rd_word;
  assign rd_word = map_word_t'(ram_rdata);

  // the output register can take a new event this clock
  assign out_free  = !out_valid || out_ready;
  // the current slot ends with this clock's draw (or has no draws)
  assign slot_done = (state == S_DRAW) && out_free && (rep_q <= REP_W'(1));
  assign walk_done = last_q || (slot_q == SLOT_W'(NSLOTS - 1));
  // this clock's draw emits
  assign fire      = (state == S_DRAW) && out_free && (rep_q != '0) &&
                     (prob_q > {1'b0, rnd});

  assign in_ready = (state == S_IDLE);

  always_comb begin
    ram_re    = 1'b0;
    ram_raddr = {pix_q, slot_q + SLOT_W'(1)};
    if (state == S_IDLE) begin
      ram_re    = in_valid;
      ram_raddr = {in_pix, SLOT_W'(0)};
    end else if (slot_done && !walk_done) begin
      ram_re    = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pix_q     <= '0;
      slot_q    <= '0;
      evt_q     <= '0;
      prob_q    <= '0;
      last_q    <= 1'b0;
      rep_q     <= '0;
      out_valid <= 1'b0;
      out_evt   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out_evt   <= evt_q;
      end
      unique case (state)
        S_IDLE: if (in_valid) begin
          pix_q  <= in_pix;
          slot_q <= '0;
          state  <= S_READ;
        end
        S_READ: begin
          evt_q  <= rd_word.evt;
          prob_q <= rd_word.prob;
          last_q <= rd_word.last;
          rep_q  <= rd_word.rep;
          state  <= S_DRAW;
        end
        S_DRAW: if (out_free) begin
          if (rep_q != '0) rep_q <= rep_q - REP_W'(1);
          if (slot_done) begin
            if (walk_done) begin
              state <= S_IDLE;
            end else begin
              slot_q <= slot_q + SLOT_W'(1);
              state  <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_evt));

endmodule
