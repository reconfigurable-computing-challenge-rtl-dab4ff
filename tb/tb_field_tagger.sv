// tb_field_tagger: loads three field keys, sends JSON log events that span
// one to four flits (keys and values crossing flit boundaries, padding
// lanes at both ends as the source produces them), and compares every byte's
// tag with a byte-serial reference over the whole event. Random output
// back-pressure; data, keep, sop and eop must pass unchanged.
module tb_field_tagger;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_tagged = 0;

  logic cfg_we;
  logic [$clog2(NFIELDS)-1:0] cfg_key;
  byte_t [KEYMAX-1:0] cfg_bytes;
  logic [KEYMAX-1:0] cfg_mask;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready;

  field_tagger dut (.*);

  string keys[NFIELDS] = '{"\"path\": \"", "\"cmdline\": \"", "\"user\":\"", ""};
  string vals[6] = '{"/bin/sh", "ls -la /tmp", "root", "", "x\\y", "a-much-longer-value-that-crosses-a-flit-boundary-for-sure-0123456789"};
  flit_t stim[$], expq[$];

  task automatic make_event(int first_lane);
    byte_t b[$];
    int tags[$];
    string s = "{\"event_id\": \"8P65\"";
    int n = $urandom_range(1, 4);
    int pos;
    for (int j = 0; j < n; j++) begin
      int k = $urandom_range(0, 3);
      string v = vals[$urandom_range(0, 5)];
      if (k == 3) s = {s, ", \"other\": \"", v, "\""};
      else s = {s, ", ", keys[k], v, "\""};
    end
    s = {s, "}"};
    str_bytes(s, b);
    ref_tags(b, keys, tags);
    pos = 0;
    while (pos < b.size()) begin
      automatic flit_t f = '0;
      int lane0 = (pos == 0) ? first_lane : 0;
      f.sop = (pos == 0);
      for (int i = lane0; i < LANES && pos < b.size(); i++) begin
        f.data[i] = b[pos];
        f.keep[i] = 1;
        f.tag[i]  = field_t'(tags[pos]);
        if (tags[pos] != 0) n_tagged++;
        pos++;
      end
      f.eop = (pos == b.size());
      expq.push_back(f);
      f.tag = '0;
      stim.push_back(f);
    end
  endtask

  initial begin
    cfg_we = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NFIELDS; k++) begin
      automatic logic [8*KEYMAX+KEYMAX-1:0] c = key_cfg(keys[k]);
      @(negedge clk);
      cfg_we = 1; cfg_key = 2'(k); cfg_bytes = c[8*KEYMAX-1:0]; cfg_mask = c[8*KEYMAX +: KEYMAX];
    end
    @(negedge clk) cfg_we = 0;
    for (int e = 0; e < 120; e++) make_event((e % 3 == 0) ? $urandom_range(0, 40) : 0);
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && !cfg_we && stim.size() > 0;
    if (stim.size() > 0) in_flit <= stim[0];
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && out_valid && out_ready) begin
      automatic flit_t e = expq.pop_front();
      checks++;
      if (out_flit != e) begin
        failures++;
        for (int i = 0; i < LANES; i++)
          if (out_flit.tag[i] != e.tag[i])
            $display("lane %0d byte '%c' tag %0d exp %0d", i, e.data[i], out_flit.tag[i], e.tag[i]);
      end
    end
  end

  initial begin
    wait (rst_n);
    repeat (10) @(posedge clk);
    wait (stim.size() == 0 && expq.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (n_tagged == 0) begin failures++; $display("no n_tagged bytes in the stimulus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
