// aer_tx: sender side of an asynchronous AER link.
//
// Takes one event at a time from a valid/ready stream and sends it with the
// AER four-phase handshake: the address is driven on the data lines one clock
// before req rises, req stays high until the synchronised ack is seen high,
// then req falls and the sender waits for ack to fall before it takes the
// next event. ack passes through a two-flop synchroniser because the receiver
// may run on another clock. The data lines do not change while req is high
// (checked by an assertion), which is what a bundled-data receiver relies on.
//
// Timing: in_ready is high only in the idle state; an event takes four clocks
// of this module plus two synchroniser delays for each ack edge. Active-high
// req/ack and the one-clock address set-up are this design's choices.
module aer_tx #(
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  // event stream from the board logic
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_data,
  // AER bus
  output logic          aer_req,
  input  logic          aer_ack,
  output logic [AW-1:0] aer_data
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WAIT_ACK, S_WAIT_REL} tx_state_t;
  tx_state_t state;
  logic ack_meta, ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_meta <= 1'b0;
      ack_s    <= 1'b0;
    end else begin
      ack_meta <= aer_ack;
      ack_s    <= ack_meta;
    end
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      aer_req  <= 1'b0;
      aer_data <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          aer_data <= in_data;
          state    <= S_SETUP;
        end
        S_SETUP: if (!ack_s) begin
          aer_req <= 1'b1;
          state   <= S_WAIT_ACK;
        end
        S_WAIT_ACK: if (ack_s) begin
          aer_req <= 1'b0;
          state   <= S_WAIT_REL;
        end
        S_WAIT_REL: if (!ack_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Bundled data: the address must not change while req is high.
  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
    aer_req && $past(aer_req) |-> $stable(aer_data));

endmodule
