// rs_pkg: types and sizes shared by the streaming string-matching pipeline.
//
// A flit is one beat of the log stream: LANES bytes, a per-byte keep mask
// (padding bytes have keep=0), a per-byte field tag written by the field
// tagger, and start/end-of-packet flags. A packet is one log event (one line
// of the input). The 64-byte flit, the 8 hash tables (one per fast-pattern
// length 1..8) and the table depths are this design's choices; the pipeline
// structure (source, field tagger, MSPM, CPM, sink) follows the published
// architecture.
package rs_pkg;

  localparam int LANES     = 64;   // bytes per flit (512-bit stream)
  localparam int FIELD_W   = 3;    // field tag width, 0 = no field
  localparam int NFIELDS   = 4;    // number of JSON field keys the tagger knows
  localparam int KEYMAX    = 16;   // longest field key, in bytes
  localparam int NTABLES   = 8;    // hash tables, table t holds literals of length t+1
  localparam int MAXLEN    = NTABLES;
  localparam int HASH_BITS = 12;   // entries per hash table = 2**HASH_BITS
  localparam int RULE_W    = 12;   // rule id width (4096 rules)
  localparam int CNT_W     = 4;    // rules per overloaded fast pattern, up to 15
  localparam int FP_BITS   = 256;  // CPM fingerprint width
  localparam int FPIDX_W   = $clog2(FP_BITS);
  localparam int MAX_EVENT_FLITS = 64;  // longest log event, in flits (4 KiB)

  typedef logic [7:0] byte_t;
  typedef logic [FIELD_W-1:0] field_t;

  typedef struct packed {
    byte_t  [LANES-1:0] data;
    logic   [LANES-1:0] keep;
    field_t [LANES-1:0] tag;
    logic               sop;
    logic               eop;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Hash-table entry: a valid bit and the field the literal must lie in
  // (0 = any field or no field).
  typedef struct packed {
    logic   valid;
    field_t field;
  } htab_entry_t;

  // Token leaving a hash-check leaf. last=1 marks the end of a packet; a
  // token may carry a hit, the end mark, or both.
  typedef struct packed {
    logic                 hit;
    logic                 last;
    logic [HASH_BITS-1:0] hash;
  } mtok_t;

  // Rule-table entry. overload=1: rule is a pointer into the expansion
  // table and count is the number of rules sharing the fast pattern.
  typedef struct packed {
    logic              valid;
    logic              overload;
    logic [RULE_W-1:0] rule;
    logic [CNT_W-1:0]  count;
  } rtab_entry_t;

  typedef struct packed {
    logic              hit;
    logic              last;
    logic              overload;
    logic [RULE_W-1:0] rule;
    logic [CNT_W-1:0]  count;
  } ctok_t;

  // Candidate rule after overload expansion.
  typedef struct packed {
    logic              hit;
    logic              last;
    logic [RULE_W-1:0] rule;
  } rtok_t;

  typedef struct packed {
    logic              hit;
    logic              last;
    logic [RULE_W-1:0] rule;
    logic [FP_BITS-1:0] fp;
  } ftok_t;

  typedef struct packed {
    logic [15:0]       pid;
    logic [RULE_W-1:0] rule;
  } match_t;

  typedef struct packed {
    logic [15:0] pid;
    logic        matched;
  } verdict_t;

  // Configuration targets of the table-write bus.
  typedef enum logic [2:0] {
    CFG_FIELD_KEY = 3'd0,  // addr = key index, data = key bytes + mask
    CFG_MSPM_HASH = 3'd1,  // table, addr = hash, data = htab_entry_t
    CFG_MSPM_RULE = 3'd2,  // table, addr = hash, data = rtab_entry_t
    CFG_MSPM_EXP  = 3'd3,  // addr = slot, data = rule id
    CFG_CPM_HASH  = 3'd4,  // table, addr = hash, data = htab_entry_t
    CFG_CPM_FP    = 3'd5   // addr = rule id, data = fingerprint
  } cfg_target_e;

  // One write on the configuration bus.
  typedef struct packed {
    logic               we;
    cfg_target_e        target;
    logic [2:0]         table_id;
    logic [15:0]        addr;
    logic [FP_BITS-1:0] data;
  } cfg_t;

  // Substring hash: rotate-left by 5 then xor the next byte, oldest byte first.
  function automatic logic [HASH_BITS-1:0] hash_step(logic [HASH_BITS-1:0] h, byte_t b);
    return {h[HASH_BITS-6:0], h[HASH_BITS-1:HASH_BITS-5]} ^ HASH_BITS'(b);
  endfunction

  // Fingerprint bit set by a CPM literal hit in table t with hash h.
  function automatic logic [FPIDX_W-1:0] fp_index(int unsigned t, logic [HASH_BITS-1:0] h);
    return FPIDX_W'(h) ^ FPIDX_W'(h >> FPIDX_W) ^ FPIDX_W'(t * 37);
  endfunction

endpackage
