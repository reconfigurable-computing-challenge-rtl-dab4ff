// hash_check: line-rate literal lookup used at the head of both the
// multi-string pattern matcher (MSPM) and the conjunct pattern matcher (CPM).
//
// For every byte lane i and every literal length L = 1..NTABLES it hashes the
// L bytes ending at lane i and looks the hash up in table L-1. A lane hits in
// table L-1 when all L bytes are real (keep=1, same packet), the entry is
// valid, and the entry's field is 0 or equals the field tag of lane i. A
// history of the previous NTABLES-1 bytes lets literals straddle two flits of
// one packet. The result is LANES x NTABLES hit bits with their hashes.
// Hash tables and a line-rate check whose hits are passed on per lane follow
// the published design (Fig. 4, Fig. 5); the hash function, the one-table-per-
// length organisation and the field check on the last byte are this design's
// choices. The tables are cleared by a sweep of 2**HASH_BITS cycles after
// reset (init_done=0 meanwhile, input not accepted) and written through the
// configuration port. Timing: one register stage, valid/ready.
module hash_check
  import rs_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      init_done,
  input  logic                      cfg_we,
  input  logic [$clog2(NTABLES)-1:0] cfg_table,
  input  logic [HASH_BITS-1:0]      cfg_addr,
  input  htab_entry_t               cfg_entry,
  input  flit_t                     in_flit,
  input  logic                      in_valid,
  output logic                      in_ready,
  output flit_t                     out_flit,
  output logic [NTABLES-1:0][LANES-1:0] out_hit,
  output logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] out_hash,
  output logic                      out_valid,
  input  logic                      out_ready
);
  localparam int H = MAXLEN - 1;

  htab_entry_t tbl [NTABLES][2**HASH_BITS];

  logic [HASH_BITS:0] sweep;
  byte_t [H-1:0] hist_b;
  logic  [H-1:0] hist_v;

  byte_t [H+LANES-1:0] wb;
  logic  [H+LANES-1:0] wv;
  logic [NTABLES-1:0][LANES-1:0] hit;
  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] hsh;

  assign init_done = sweep[HASH_BITS];

  always_comb begin
    wb = {in_flit.data, in_flit.sop ? '0 : hist_b};
    wv = {in_flit.keep, in_flit.sop ? '0 : hist_v};
    for (int i = 0; i < LANES; i++) begin
      logic [HASH_BITS-1:0] h;
      // table t covers bytes wb[H+i-t .. H+i], hashed oldest byte first
      for (int t = 0; t < NTABLES; t++) begin
        h = '0;
        for (int k = t; k >= 0; k--) h = hash_step(h, wb[H+i-k]);
        hsh[t][i] = h;
      end
      for (int t = 0; t < NTABLES; t++) begin
        htab_entry_t e;
        logic        allv;
        allv = 1'b1;
        for (int k = 0; k <= t; k++) allv = allv && wv[H+i-k];
        e = tbl[t][hsh[t][i]];
        hit[t][i] = allv && e.valid &&
                    (e.field == '0 || e.field == in_flit.tag[i]);
      end
    end
  end

  assign in_ready = init_done && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep     <= '0;
      out_valid <= 1'b0;
      hist_v    <= '0;
    end else begin
      if (!init_done) sweep <= sweep + 1'b1;
      if (in_ready) out_valid <= in_valid;
      if (in_valid && in_ready)
        hist_v <= in_flit.eop ? '0 : wv[H+LANES-1 -: H];
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      for (int t = 0; t < NTABLES; t++) tbl[t][sweep[HASH_BITS-1:0]] <= '0;
    end else if (cfg_we) begin
      tbl[cfg_table][cfg_addr] <= cfg_entry;
    end
    if (in_valid && in_ready) begin
      hist_b   <= wb[H+LANES-1 -: H];
      out_flit <= in_flit;
      out_hit  <= hit;
      out_hash <= hsh;
    end
  end
endmodule
