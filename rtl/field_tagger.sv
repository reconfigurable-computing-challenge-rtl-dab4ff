// field_tagger: first stage after the source. Finds predetermined JSON field
// keys in the log stream and tags every byte of the string value that follows
// a key with that key's field number (1..NFIELDS; 0 = no field).
//
// A key is stored right-aligned in KEYMAX byte slots with a compare mask, and
// normally includes the opening quote of the value, e.g. `"path": "`. The
// value runs up to, not including, the next `"` byte. All LANES byte
// positions are examined in one cycle; a history of the previous KEYMAX-1
// bytes lets a key straddle two flits, and the field state carries across the
// flits of a packet and is cleared at sop. Escaped quotes inside values are
// not recognised. Key storage is written through the configuration port and
// resets to empty (no key matches).
// That the tagger marks the bytes of predetermined fields' values and is a
// fully unrolled line-rate kernel follows the published design; the key
// format and the value rule are this design's choices.
// Timing: one register stage, valid/ready, one flit per cycle.
module field_tagger
  import rs_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(NFIELDS)-1:0] cfg_key,
  input  byte_t [KEYMAX-1:0]        cfg_bytes,  // byte KEYMAX-1 = last key char
  input  logic [KEYMAX-1:0]         cfg_mask,   // 1 = compare this slot
  input  flit_t                     in_flit,
  input  logic                      in_valid,
  output logic                      in_ready,
  output flit_t                     out_flit,
  output logic                      out_valid,
  input  logic                      out_ready
);
  localparam int H = KEYMAX - 1;

  byte_t [KEYMAX-1:0] key_b [NFIELDS];
  logic  [KEYMAX-1:0] key_m [NFIELDS];
  byte_t [H-1:0]      hist_b;   // hist_b[H-1] is the byte just before lane 0
  logic  [H-1:0]      hist_v;
  field_t             state;    // field whose value is open at the flit start

  byte_t [H+LANES-1:0] wb;
  logic  [H+LANES-1:0] wv;
  field_t [LANES-1:0]  tag;
  field_t              st_end;

  always_comb begin
    logic m;
    m  = 1'b0;
    wb = {in_flit.data, in_flit.sop ? '0 : hist_b};
    wv = {in_flit.keep, in_flit.sop ? '0 : hist_v};
    st_end = in_flit.sop ? '0 : state;
    for (int i = 0; i < LANES; i++) begin
      tag[i] = '0;
      if (in_flit.keep[i]) begin
        if (st_end != '0) begin
          if (in_flit.data[i] == 8'h22) st_end = '0;
          else tag[i] = st_end;
        end
        if (st_end == '0) begin
          for (int k = NFIELDS - 1; k >= 0; k--) begin
            m = |key_m[k];
            for (int j = 0; j < KEYMAX; j++)
              if (key_m[k][j] && (!wv[i+j] || wb[i+j] != key_b[k][j])) m = 1'b0;
            if (m) st_end = field_t'(k + 1);
          end
        end
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      state     <= '0;
      hist_v    <= '0;
      for (int k = 0; k < NFIELDS; k++) key_m[k] <= '0;
    end else begin
      if (cfg_we) key_m[cfg_key] <= cfg_mask;
      if (in_ready) out_valid <= in_valid;
      if (in_valid && in_ready) begin
        state  <= in_flit.eop ? '0 : st_end;
        hist_v <= in_flit.eop ? '0 : wv[H+LANES-1 -: H];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) key_b[cfg_key] <= cfg_bytes;
    if (in_valid && in_ready) begin
      hist_b       <= wb[H+LANES-1 -: H];
      out_flit     <= in_flit;
      out_flit.tag <= tag;
    end
  end
endmodule
