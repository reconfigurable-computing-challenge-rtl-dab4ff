// source_split: first kernel of the source. Cuts the raw log byte stream
// into log-event packets at newline bytes (0x0A).
//
// Each input flit is handled in place: bytes keep their lane, the newline
// itself and the bytes that belong to the other packet become padding
// (keep=0). For a flit with one newline the kernel writes, in the same cycle,
// the part before the newline (eop=1, split=1) to the regular stream and the
// part after it (sop=1) to the newline stream. That the work is split over
// two output streams and a second merging kernel follows the published
// design. A flit holding several newlines is this design's own extension: the
// kernel keeps the flit, emits one event per cycle on the regular stream and
// consumes the flit when at most one newline is left (a stall of the input).
// The input keep mask should be all ones except in the last flit of a trace.
// Output handshakes are valid/ready; both outputs must be ready to advance.
module source_split
  import rs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,       // sop, eop and tag are ignored
  input  logic  in_valid,
  output logic  in_ready,
  output flit_t reg_flit,      // regular stream
  output logic  reg_split,     // a newline-stream flit follows this one
  output logic  reg_valid,
  input  logic  reg_ready,
  output flit_t nl_flit,       // newline stream
  output logic  nl_valid,
  input  logic  nl_ready,
  output logic  multi_nl_stall // a flit with several newlines is being held
);
  logic [LANES-1:0] consumed;  // bytes of the held flit already emitted
  logic             at_start;  // next emitted byte starts a packet

  logic [LANES-1:0] avail, nl, pre_nl, post_nl, nl_after;
  logic             have_nl, more_nl, rest_empty, go;

  always_comb begin
    avail = in_flit.keep & ~consumed;
    for (int i = 0; i < LANES; i++) nl[i] = avail[i] && (in_flit.data[i] == 8'h0A);
    have_nl = |nl;
    // pre_nl: lanes below the first newline; post_nl: lanes above it
    pre_nl = '0;
    begin
      logic seen;
      seen = 1'b0;
      for (int i = 0; i < LANES; i++) begin
        if (!seen && nl[i]) seen = 1'b1;
        else if (!seen) pre_nl[i] = 1'b1;
      end
    end
    post_nl    = have_nl ? ~(pre_nl | nl & ~(nl - 1'b1)) : '0; // above first newline
    nl_after = nl & post_nl;
    more_nl  = |nl_after;
    rest_empty = ~|(avail & post_nl);

    reg_flit      = in_flit;
    reg_flit.tag  = '0;
    reg_flit.sop  = at_start;
    reg_flit.keep = have_nl ? (avail & pre_nl) : avail;
    reg_flit.eop  = have_nl;
    reg_split     = have_nl && !more_nl && !rest_empty;

    nl_flit      = in_flit;
    nl_flit.tag  = '0;
    nl_flit.keep = avail & post_nl;
    nl_flit.sop  = 1'b1;
    nl_flit.eop  = 1'b0;

    go        = in_valid && reg_ready && (!reg_split || nl_ready);
    reg_valid = in_valid && (!reg_split || nl_ready);
    nl_valid  = in_valid && reg_ready && reg_split;
    in_ready  = go && !more_nl;
    multi_nl_stall = in_valid && more_nl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      consumed <= '0;
      at_start <= 1'b1;
    end else if (go) begin
      if (more_nl) begin
        consumed <= consumed | ~post_nl;  // this event and its newline are done
        at_start <= 1'b1;
      end else begin
        consumed <= '0;
        // newline in the last lanes: the next packet starts in the next flit
        at_start <= have_nl && rest_empty;
      end
    end
  end
endmodule
