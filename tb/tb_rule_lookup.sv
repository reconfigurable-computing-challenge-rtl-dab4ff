// tb_rule_lookup: programs random rule-table entries (plain and overloaded,
// some invalid), sends random hit / end-mark tokens and checks each output
// against a reference copy of the table: hits on invalid entries vanish,
// end marks always pass, order is kept.
module tb_rule_lookup;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, dropped = 0;

  logic init_done, cfg_we, in_valid, in_ready, out_valid, out_ready;
  logic [HASH_BITS-1:0] cfg_addr;
  rtab_entry_t cfg_entry;
  mtok_t in_tok;
  ctok_t out_tok;

  rule_lookup dut (.*);

  rtab_entry_t model [int];
  mtok_t stim[$];
  ctok_t expq[$];

  initial begin
    cfg_we = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int n = 0; n < 64; n++) begin
      automatic rtab_entry_t e;
      automatic int a = $urandom_range(0, 127);
      e.valid = ($urandom_range(0, 5) != 0);
      e.overload = $urandom_range(0, 1);
      e.rule = RULE_W'($urandom);
      e.count = CNT_W'($urandom_range(1, 15));
      model[a] = e;
      @(negedge clk);
      cfg_we = 1; cfg_addr = HASH_BITS'(a); cfg_entry = e;
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 400; n++) begin
      automatic mtok_t t;
      automatic rtab_entry_t e = '0;
      t.hash = HASH_BITS'($urandom_range(0, 127));
      t.last = ($urandom_range(0, 3) == 0);
      t.hit  = !t.last || $urandom_range(0, 1);
      if (model.exists(int'(t.hash))) e = model[int'(t.hash)];
      stim.push_back(t);
      if ((t.hit && e.valid) || t.last)
        expq.push_back('{hit: t.hit && e.valid, last: t.last, overload: e.overload,
                         rule: e.rule, count: e.count});
      else dropped++;
    end
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && init_done && !cfg_we && stim.size() > 0;
    if (stim.size() > 0) in_tok <= stim[0];
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && out_valid && out_ready) begin
      automatic ctok_t e = expq.pop_front();
      checks++;
      if (out_tok.hit != e.hit || out_tok.last != e.last ||
          (e.hit && (out_tok.rule != e.rule || out_tok.overload != e.overload || out_tok.count != e.count))) begin
        failures++;
        $display("got %p exp %p", out_tok, e);
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (init_done);
    repeat (100) @(posedge clk);
    wait (stim.size() == 0 && expq.size() == 0);
    repeat (4) @(posedge clk);
    checks += 2;
    if (out_valid) begin failures++; $display("extra output"); end
    if (dropped == 0) begin failures++; $display("no invalid-entry hit dropped"); end
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
