// Packet data path: first-in first-out buffer of 64B beats between the
// receive queue and the executor's Active Packet Selector.
//
// Packets enter here in the same cycle their beats enter the Warp Engine
// pipeline and leave in the same order, so the executor always finds the
// data of the packet whose context it has just taken at the head of the
// buffer. DEPTH beats (default 64, enough for the packets that can be in
// flight in the 28-cycle pipeline) are held; in_ready drops when it is
// full. Standard valid/ready on both sides; a beat written into an empty
// FIFO is readable on the next cycle.
//
// Moving the packet data along with the pipeline on a 64B datapath follows
// the design; using a FIFO for it, and its depth, are this implementation's
// own.
module pkt_fifo
  import warp_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [BEAT_W-1:0]     in_data,
  input  logic [BEAT_BYTES-1:0] in_keep,
  input  logic                  in_last,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [BEAT_W-1:0]     out_data,
  output logic [BEAT_BYTES-1:0] out_keep,
  output logic                  out_last
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic [BEAT_W-1:0]     data;
    logic [BEAT_BYTES-1:0] keep;
    logic                  last;
  } beat_t;

  beat_t        mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         full, empty, push, pop;

  assign empty    = (wptr == rptr);
  assign full     = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign in_ready = !full;
  assign push     = in_valid && !full;
  assign out_valid = !empty;
  assign pop      = out_ready && !empty;

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= '{data: in_data, keep: in_keep, last: in_last};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  beat_t head;
  assign head     = mem[rptr[AW-1:0]];
  assign out_data = head.data;
  assign out_keep = head.keep;
  assign out_last = head.last;

  // a head beat that is not taken stays offered, unchanged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(head));

endmodule
