// source_merge: second kernel of the source. Interleaves the regular and
// newline streams of source_split into one packet stream, one flit per cycle.
//
// After a regular flit marked split it takes the next flit from the newline
// stream; otherwise it takes the regular stream. While it takes a newline
// flit the regular stream is not read, which back-pressures the splitter:
// the total output is limited to one stream width, as in the published
// design. Output: valid/ready packet flits with sop/eop.
module source_merge
  import rs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t reg_flit,
  input  logic  reg_split,
  input  logic  reg_valid,
  output logic  reg_ready,
  input  flit_t nl_flit,
  input  logic  nl_valid,
  output logic  nl_ready,
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  nl_turn        // this cycle serves the newline stream
);
  logic take_nl;

  always_comb begin
    nl_turn   = take_nl;
    out_flit  = take_nl ? nl_flit : reg_flit;
    out_valid = take_nl ? nl_valid : reg_valid;
    reg_ready = !take_nl && out_ready;
    nl_ready  = take_nl && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) take_nl <= 1'b0;
    else if (out_valid && out_ready) take_nl <= !take_nl && reg_split;
  end
endmodule
