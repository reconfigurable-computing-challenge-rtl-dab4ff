// sink: end of the FPGA pipeline. Holds each log event until the CPM has
// decided on it, then writes the events with at least one passing rule to
// the output (towards host memory and the full matcher) and drops the rest.
//
// Data flits wait in a DEPTH-flit buffer; verdicts arrive in packet order.
// The head flit is forwarded or dropped according to the head verdict, and
// the verdict is consumed with the packet's last flit. A verdict needs the
// whole packet to have passed the CPM, so an event longer than DEPTH flits
// would stall the pipeline for good: events are limited to DEPTH flits
// (4 KiB at the defaults). The filtering role follows the published system
// figure; the buffer and its size are this design's own.
// Timing: valid/ready, one flit per cycle.
module sink
  import rs_pkg::*;
#(
  parameter int DEPTH = MAX_EVENT_FLITS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  flit_t    in_flit,
  input  logic     in_valid,
  output logic     in_ready,
  input  verdict_t verdict,
  input  logic     verdict_valid,
  output logic     verdict_ready,
  output flit_t    out_flit,
  output logic [15:0] out_pid,     // packet number of the forwarded event
  output logic     out_valid,
  input  logic     out_ready,
  output logic     dropping        // a flit of an unmatched event is dropped
);
  flit_t b_flit;
  logic  b_valid, b_ready;

  stream_fifo #(.W($bits(flit_t)), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .in_data(in_flit), .in_valid, .in_ready,
    .out_data(b_flit), .out_valid(b_valid), .out_ready(b_ready)
  );

  always_comb begin
    out_flit      = b_flit;
    out_pid       = verdict.pid;
    out_valid     = b_valid && verdict_valid && verdict.matched;
    b_ready       = verdict_valid && (!verdict.matched || out_ready);
    verdict_ready = b_valid && b_ready && b_flit.eop;
    dropping      = b_valid && verdict_valid && !verdict.matched;
  end
endmodule
