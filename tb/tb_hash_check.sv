// tb_hash_check: loads literals of lengths 1..8 (some restricted to a field)
// into the eight tables, then streams packets of random text over a small
// alphabet with random field tags, padding lanes and random back-pressure.
// For every flit, lane and table the reference recomputes the hash of the
// bytes ending there (including bytes of the previous flit of the packet),
// looks it up in its own copy of the tables and predicts the hit bit.
module tb_hash_check;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0, cross_hits = 0;

  logic init_done, cfg_we;
  logic [$clog2(NTABLES)-1:0] cfg_table;
  logic [HASH_BITS-1:0] cfg_addr;
  htab_entry_t cfg_entry;
  flit_t in_flit, out_flit;
  logic [NTABLES-1:0][LANES-1:0] out_hit;
  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] out_hash;
  logic in_valid, in_ready, out_valid, out_ready;

  hash_check dut (.*);

  int unsigned model [int];       // (t << HASH_BITS | h) -> {valid, field}
  flit_t stim[$];
  typedef struct { logic [NTABLES-1:0][LANES-1:0] hit; logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] h; } exp_t;
  exp_t expq[$];


  task automatic make_packets(int n);
    for (int p = 0; p < n; p++) begin
      int nf = $urandom_range(1, 3);
      byte_t hb[$];
      bit    hv[$];
      for (int f = 0; f < nf; f++) begin
        automatic flit_t fl = '0;
        automatic exp_t  e;
        int lo = (f == 0) ? $urandom_range(0, 20) : 0;
        int hi = (f == nf - 1) ? $urandom_range(40, LANES - 1) : LANES - 1;
        fl.sop = (f == 0);
        fl.eop = (f == nf - 1);
        for (int i = 0; i < LANES; i++) begin
          fl.data[i] = byte_t'(8'h61 + $urandom_range(0, 1));
          fl.keep[i] = (i >= lo && i <= hi);
          fl.tag[i]  = field_t'($urandom_range(0, 2));
        end
        // reference: bytes = 7 history bytes + this flit
        e.hit = '0;
        for (int i = 0; i < LANES; i++)
          for (int t = 0; t < NTABLES; t++) begin
            byte_t w[$];
            bit ok = 1;
            for (int k = t; k >= 0; k--) begin
              int idx = i - k;
              if (idx >= 0) begin w.push_back(fl.data[idx]); ok &= fl.keep[idx]; end
              else if (hb.size() + idx >= 0) begin w.push_back(hb[hb.size() + idx]); ok &= hv[hv.size() + idx]; end
              else begin w.push_back(8'h00); ok = 0; end
            end
            e.h[t][i] = HASH_BITS'(ref_hash(w, 0, t + 1));
            if (ok && model.exists((t << HASH_BITS) | int'(e.h[t][i]))) begin
              int unsigned m = model[(t << HASH_BITS) | int'(e.h[t][i])];
              if (m == 0 || m == int'(fl.tag[i])) begin
                e.hit[t][i] = 1;
                if (i < t) cross_hits++;
              end
            end
          end
        for (int i = 0; i < LANES; i++) begin hb.push_back(fl.data[i]); hv.push_back(fl.keep[i]); end
        stim.push_back(fl);
        expq.push_back(e);
      end
    end
  endtask

  initial begin
    cfg_we = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rst_n);
    wait (init_done);
    // literals: 3 per length, random over the alphabet, field 0 for most
    for (int t = 0; t < NTABLES; t++)
      for (int j = 0; j < 3; j++) begin
        byte_t l[$];
        int unsigned h, fld;
        for (int k = 0; k <= t; k++) l.push_back(byte_t'(8'h61 + $urandom_range(0, 1)));
        h = ref_hash(l, 0, t + 1);
        fld = (j == 2) ? 1 : 0;
        model[(t << HASH_BITS) | int'(h)] = fld;
        @(negedge clk);
        cfg_we = 1; cfg_table = 3'(t); cfg_addr = HASH_BITS'(h);
        cfg_entry = '{valid: 1'b1, field: field_t'(fld)};
      end
    @(negedge clk) cfg_we = 0;
    make_packets(60);
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && !cfg_we && stim.size() > 0;
    if (stim.size() > 0) in_flit <= stim[0];
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && out_valid && out_ready) begin
      automatic exp_t e = expq.pop_front();
      checks++;
      for (int t = 0; t < NTABLES; t++) hits += $countones(out_hit[t]);
      if (out_hit != e.hit) begin
        failures++;
        for (int t = 0; t < NTABLES; t++)
          if (out_hit[t] != e.hit[t]) $display("table %0d hits %h exp %h", t, out_hit[t], e.hit[t]);
      end
      for (int t = 0; t < NTABLES; t++)
        for (int i = 0; i < LANES; i++)
          if (out_flit.keep[i] && out_hit[t][i] && out_hash[t][i] != e.h[t][i]) begin
            failures++;
            $display("hash t%0d lane %0d %h exp %h", t, i, out_hash[t][i], e.h[t][i]);
          end
    end
  end

  initial begin
    wait (rst_n);
    wait (init_done);
    repeat (40) @(posedge clk);
    wait (stim.size() == 0 && expq.size() == 0);
    repeat (2) @(posedge clk);
    checks += 2;
    if (hits == 0) begin failures++; $display("no hits"); end
    if (cross_hits == 0) begin failures++; $display("no hit across a flit boundary"); end
    $display("hits=%0d cross=%0d", hits, cross_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
