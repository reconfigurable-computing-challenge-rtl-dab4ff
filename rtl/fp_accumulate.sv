// fp_accumulate: builds the fingerprint of each packet in the CPM.
//
// Takes the CPM hash-check result of each flit: every literal hit (table t,
// hash h) sets fingerprint bit fp_index(t, h); the bits of all flits of a
// packet are ORed together, like a Bloom filter of the literals present.
// At the packet's last flit the finished fingerprint is written to the
// fingerprint output. The data flit is passed on to the sink. A flit is
// released when both outputs have taken what they need from it.
// The accumulate stage and the Bloom-filter-like fingerprint follow the
// published design; the fingerprint width and index function are this
// design's own. Timing: combinational outputs from the input flit, one flit
// per cycle, state updated at the clock.
module fp_accumulate
  import rs_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  flit_t                         in_flit,
  input  logic [NTABLES-1:0][LANES-1:0] in_hit,
  input  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] in_hash,
  input  logic                          in_valid,
  output logic                          in_ready,
  output flit_t                         data_flit,
  output logic                          data_valid,
  input  logic                          data_ready,
  output logic [FP_BITS-1:0]            fp,
  output logic                          fp_valid,
  input  logic                          fp_ready
);
  logic [FP_BITS-1:0] acc, bits;
  logic               data_done, fp_done;

  always_comb begin
    bits = '0;
    for (int t = 0; t < NTABLES; t++)
      for (int i = 0; i < LANES; i++)
        if (in_hit[t][i]) bits[fp_index(t, in_hash[t][i])] = 1'b1;
    fp         = (in_flit.sop ? '0 : acc) | bits;
    data_flit  = in_flit;
    data_valid = in_valid && !data_done;
    fp_valid   = in_valid && in_flit.eop && !fp_done;
    in_ready   = (data_done || data_ready) && (!in_flit.eop || fp_done || fp_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      data_done <= 1'b0;
      fp_done   <= 1'b0;
    end else if (in_valid) begin
      if (in_ready) begin
        acc       <= in_flit.eop ? '0 : fp;
        data_done <= 1'b0;
        fp_done   <= 1'b0;
      end else begin
        data_done <= data_done || data_ready;
        fp_done   <= fp_done || (fp_valid && fp_ready);
      end
    end
  end
endmodule
