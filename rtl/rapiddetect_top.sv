// rapiddetect_top: the FPGA part of a streaming log-monitoring system. A
// stream of newline-separated JSON log events enters at LANES bytes per
// cycle; events that may match a detection rule leave, with the candidate
// rules, for full regular-expression matching on a host CPU.
//
//   raw bytes -> source (split + merge kernels, events at newlines)
//             -> field tagger (marks bytes of selected JSON field values)
//             -> MSPM (fast-pattern hash check, compaction, rule lookup,
//                      downshift, overload expansion) -> candidate rules
//             -> CPM  (literal fingerprint per event, check of each
//                      candidate's conjunction) -> matches, verdicts
//             -> sink (forwards only events with a passing rule)
// The tagged stream is copied to both MSPM and CPM; the candidate rules go
// from MSPM to CPM; the CPM's copy of the stream goes on to the sink.
//
// The order of the stages follows the published system; all tables are
// loaded through one configuration bus (cfg, see rs_pkg::cfg_target_e)
// after init_done rises (about 4096 cycles after reset). Streams are
// valid/ready. The memory, DMA and host parts of the system are outside this
// module: raw input and filtered output are plain streams. The *_evt outputs
// pulse when a flow-control mechanism acts and are meant for counters.
module rapiddetect_top
  import rs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic        init_done,
  input  cfg_t        cfg,
  input  byte_t [LANES-1:0] in_data,
  input  logic [LANES-1:0]  in_keep,
  input  logic        in_valid,
  output logic        in_ready,
  output flit_t       out_flit,      // filtered events
  output logic [15:0] out_pid,
  output logic        out_valid,
  input  logic        out_ready,
  output match_t      match,         // passing (event, rule) pairs
  output logic        match_valid,
  input  logic        match_ready,
  output logic        multi_nl_evt,  // source holds a flit with several newlines
  output logic        nl_turn_evt,   // source merge serves the newline stream
  output logic        hc_stall_evt,  // MSPM hash check waits on compactors
  output logic        expand_evt,    // overload slow path busy
  output logic        drop_evt       // sink drops a flit of an unmatched event
);
  // ---------------- source ----------------
  flit_t raw;
  always_comb begin
    raw      = '0;
    raw.data = in_data;
    raw.keep = in_keep;
  end

  flit_t s_reg, q_reg, s_nl, q_nl;
  logic  s_reg_split, q_reg_split;
  logic  s_reg_v, s_reg_r, q_reg_v, q_reg_r, s_nl_v, s_nl_r, q_nl_v, q_nl_r;

  source_split u_split (
    .clk, .rst_n,
    .in_flit(raw), .in_valid, .in_ready,
    .reg_flit(s_reg), .reg_split(s_reg_split), .reg_valid(s_reg_v), .reg_ready(s_reg_r),
    .nl_flit(s_nl), .nl_valid(s_nl_v), .nl_ready(s_nl_r),
    .multi_nl_stall(multi_nl_evt)
  );

  stream_fifo #(.W($bits(flit_t) + 1), .DEPTH(2)) u_q_reg (
    .clk, .rst_n,
    .in_data({s_reg_split, s_reg}), .in_valid(s_reg_v), .in_ready(s_reg_r),
    .out_data({q_reg_split, q_reg}), .out_valid(q_reg_v), .out_ready(q_reg_r)
  );

  stream_fifo #(.W($bits(flit_t)), .DEPTH(2)) u_q_nl (
    .clk, .rst_n,
    .in_data(s_nl), .in_valid(s_nl_v), .in_ready(s_nl_r),
    .out_data(q_nl), .out_valid(q_nl_v), .out_ready(q_nl_r)
  );

  flit_t pk;
  logic  pk_v, pk_r;

  source_merge u_merge (
    .clk, .rst_n,
    .reg_flit(q_reg), .reg_split(q_reg_split), .reg_valid(q_reg_v), .reg_ready(q_reg_r),
    .nl_flit(q_nl), .nl_valid(q_nl_v), .nl_ready(q_nl_r),
    .out_flit(pk), .out_valid(pk_v), .out_ready(pk_r),
    .nl_turn(nl_turn_evt)
  );

  // ---------------- field tagger ----------------
  flit_t tg;
  logic  tg_v, tg_r;

  field_tagger u_tag (
    .clk, .rst_n,
    .cfg_we(cfg.we && cfg.target == CFG_FIELD_KEY),
    .cfg_key(cfg.addr[$clog2(NFIELDS)-1:0]),
    .cfg_bytes(cfg.data[8*KEYMAX-1:0]),
    .cfg_mask(cfg.data[8*KEYMAX +: KEYMAX]),
    .in_flit(pk), .in_valid(pk_v), .in_ready(pk_r),
    .out_flit(tg), .out_valid(tg_v), .out_ready(tg_r)
  );

  // ---------------- fan-out to MSPM and CPM ----------------
  // The CPM needs an event's last flit before it can judge that event's
  // candidates, while the MSPM may stall inside the event when its
  // compactors fill. The MSPM side therefore has a FIFO that holds a whole
  // event, so the CPM copy can always run ahead to the event's end.
  flit_t m_in, c_in;
  logic  qm_in_r, qc_in_r, m_in_v, m_in_r, c_in_v, c_in_r;

  assign tg_r = qm_in_r && qc_in_r;

  stream_fifo #(.W($bits(flit_t)), .DEPTH(MAX_EVENT_FLITS + 4)) u_q_mspm (
    .clk, .rst_n,
    .in_data(tg), .in_valid(tg_v && qc_in_r), .in_ready(qm_in_r),
    .out_data(m_in), .out_valid(m_in_v), .out_ready(m_in_r)
  );

  stream_fifo #(.W($bits(flit_t)), .DEPTH(4)) u_q_cpm (
    .clk, .rst_n,
    .in_data(tg), .in_valid(tg_v && qm_in_r), .in_ready(qc_in_r),
    .out_data(c_in), .out_valid(c_in_v), .out_ready(c_in_r)
  );

  // ---------------- MSPM ----------------
  rtok_t m_cand, c_cand;
  logic  m_cand_v, m_cand_r, c_cand_v, c_cand_r;
  logic  m_init, c_init;

  mspm u_mspm (
    .clk, .rst_n, .init_done(m_init), .cfg,
    .in_flit(m_in), .in_valid(m_in_v), .in_ready(m_in_r),
    .cand_tok(m_cand), .cand_valid(m_cand_v), .cand_ready(m_cand_r),
    .hc_stall(hc_stall_evt), .expanding(expand_evt)
  );

  stream_fifo #(.W($bits(rtok_t)), .DEPTH(4)) u_q_cand (
    .clk, .rst_n,
    .in_data(m_cand), .in_valid(m_cand_v), .in_ready(m_cand_r),
    .out_data(c_cand), .out_valid(c_cand_v), .out_ready(c_cand_r)
  );

  // ---------------- CPM ----------------
  flit_t    k_data;
  logic     k_data_v, k_data_r;
  verdict_t vd;
  logic     vd_v, vd_r;

  cpm u_cpm (
    .clk, .rst_n, .init_done(c_init), .cfg,
    .in_flit(c_in), .in_valid(c_in_v), .in_ready(c_in_r),
    .cand_tok(c_cand), .cand_valid(c_cand_v), .cand_ready(c_cand_r),
    .data_flit(k_data), .data_valid(k_data_v), .data_ready(k_data_r),
    .match, .match_valid, .match_ready,
    .verdict(vd), .verdict_valid(vd_v), .verdict_ready(vd_r)
  );

  // ---------------- sink ----------------
  sink u_sink (
    .clk, .rst_n,
    .in_flit(k_data), .in_valid(k_data_v), .in_ready(k_data_r),
    .verdict(vd), .verdict_valid(vd_v), .verdict_ready(vd_r),
    .out_flit, .out_pid, .out_valid, .out_ready,
    .dropping(drop_evt)
  );

  assign init_done = m_init && c_init;
endmodule
