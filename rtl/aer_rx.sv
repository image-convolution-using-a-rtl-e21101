// aer_rx: receiver side of an asynchronous AER link.
//
// An AER bus moves one address per four-phase handshake: the sender puts the
// address on the data lines and raises req; the receiver takes the address
// and raises ack; the sender drops req; the receiver drops ack. This module
// is the receiving end. req comes from another clock domain and passes
// through a two-flop synchroniser; the data lines are sampled only after the
// synchronised req is seen high, which relies on the sender holding them
// stable while req is high (bundled data). The captured address is offered on
// a valid/ready stream (out_valid/out_ready). ack is raised in the cycle the
// address is captured, and a new address is taken only when the previous one
// has been handed on, so a slow consumer stalls the sender through ack.
//
// Timing: a req rising edge reaches out_valid about three clocks later; one
// event costs at least two synchroniser delays of the sender plus four clocks
// here. Active-high req/ack and the two-flop synchroniser are this design's
// choices; the two-line request/acknowledge handshake is standard AER.
module aer_rx #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // AER bus
  input  logic          aer_req,
  output logic          aer_ack,
  input  logic [AW-1:0] aer_data,
  // event stream towards the board logic
  output logic          out_valid,
  input  logic          out_ready,
  output logic [AW-1:0] out_data
);

  logic req_meta, req_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_meta <= 1'b0;
      req_s    <= 1'b0;
    end else begin
      req_meta <= aer_req;
      req_s    <= req_meta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aer_ack   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!aer_ack) begin
        // wait for a request, and for room to hold its address
        if (req_s && (!out_valid || out_ready)) begin
          out_data  <= aer_data;
          out_valid <= 1'b1;
          aer_ack   <= 1'b1;
        end
      end else if (!req_s) begin
        aer_ack <= 1'b0;
      end
    end
  end

  // The stream must hold its event until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
