// tb_fp_accumulate: packets of 1..3 flits with random hit bits and hashes.
// The reference ORs 1 << fp_index(t, h) over all hits of a packet; the
// fingerprint emitted at each end of packet and every passed-on data flit
// are checked, with independent random back-pressure on the two outputs.
module tb_fp_accumulate;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit, data_flit;
  logic [NTABLES-1:0][LANES-1:0] in_hit;
  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] in_hash;
  logic in_valid, in_ready, data_valid, data_ready, fp_valid, fp_ready;
  logic [FP_BITS-1:0] fp;

  fp_accumulate dut (.*);

  typedef struct { flit_t f; logic [NTABLES-1:0][LANES-1:0] hit; logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] h; } st_t;
  st_t stim[$];
  flit_t dq[$];
  logic [FP_BITS-1:0] fq[$];

  initial begin
    in_valid = 0;
    for (int p = 0; p < 80; p++) begin
      automatic int nf = $urandom_range(1, 3);
      automatic logic [FP_BITS-1:0] acc = '0;
      for (int f = 0; f < nf; f++) begin
        automatic st_t s;
        s.f = '0;
        s.f.sop = (f == 0);
        s.f.eop = (f == nf - 1);
        s.f.data[0] = byte_t'(p);
        s.f.keep = '1;
        for (int t = 0; t < NTABLES; t++)
          for (int i = 0; i < LANES; i++) begin
            s.hit[t][i] = ($urandom_range(0, 60) == 0);
            s.h[t][i] = HASH_BITS'($urandom);
            if (s.hit[t][i]) acc[ref_fp_index(t, int'(s.h[t][i]))] = 1'b1;
          end
        stim.push_back(s);
        dq.push_back(s.f);
      end
      fq.push_back(acc);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) begin
    in_valid <= rst_n && stim.size() > 0;
    if (stim.size() > 0) begin
      in_flit <= stim[0].f; in_hit <= stim[0].hit; in_hash <= stim[0].h;
    end
    data_ready <= ($urandom_range(0, 2) != 0);
    fp_ready   <= ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && data_valid && data_ready) begin
      automatic flit_t e = dq.pop_front();
      checks++;
      if (data_flit != e) begin failures++; $display("data flit mismatch"); end
    end
    if (rst_n && fp_valid && fp_ready) begin
      automatic logic [FP_BITS-1:0] e = fq.pop_front();
      checks++;
      if (fp != e) begin failures++; $display("fp %h exp %h", fp, e); end
    end
  end

  initial begin
    wait (rst_n);
    wait (stim.size() == 0 && dq.size() == 0 && fq.size() == 0);
    repeat (2) @(posedge clk);
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
