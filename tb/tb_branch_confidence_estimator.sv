// tb_branch_confidence_estimator: self-checking test of the composite
// confidence estimator against a reference model written here.
// The model keeps the local (5-bit: +1 / halve) and global (3-bit: +1 / reset)
// tables, the per-bucket correct/total counts and the bucket fractions
// floor(256*correct/total) (255 when the bucket is empty or always right),
// refreshed every INTERVAL updates with the counts halved afterwards.
// Updates and lookups use a small pool of histories so that tables saturate
// and buckets fill. Updates pause while a refresh runs, whose length is
// checked (one load cycle and FRAC_W+1 divide cycles per bucket).
module tb_branch_confidence_estimator;
  import bfetch_pkg::*;
  localparam int INTERVAL = 256;
  localparam int NB = 45;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  lk_lhist, up_lhist;
  logic [11:0] lk_ghist, up_ghist;
  logic [1:0]  lk_self_l, lk_self_g, up_self_l, up_self_g;
  logic [7:0]  lk_conf;
  logic [5:0]  lk_cnum;
  logic        up_valid, up_correct, refresh_busy;

  branch_confidence_estimator #(.INTERVAL(INTERVAL)) dut (.*);

  int m_l [1024];
  int m_g [4096];
  int m_c [NB];
  int m_t [NB];
  int m_f [NB];
  int since;
  int refreshes;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup_check();
    int e;
    lk_lhist  = 10'($urandom % 16);
    lk_ghist  = 12'($urandom % 16);
    lk_self_l = 2'($urandom);
    lk_self_g = 2'($urandom);
    #1;
    e = m_l[lk_lhist] + m_g[lk_ghist] + lk_self_l + lk_self_g;
    check(lk_cnum == 6'(e), $sformatf("cnum %0d exp %0d", lk_cnum, e));
    check(lk_conf == 8'(m_f[e]), $sformatf("conf of bucket %0d: %0d exp %0d", e, lk_conf, m_f[e]));
  endtask

  initial begin
    int b, cyc;
    up_valid = 0; up_correct = 0; up_lhist = '0; up_ghist = '0; up_self_l = '0; up_self_g = '0;
    lk_lhist = '0; lk_ghist = '0; lk_self_l = '0; lk_self_g = '0;
    for (int i = 0; i < 1024; i++) m_l[i] = 0;
    for (int i = 0; i < 4096; i++) m_g[i] = 0;
    for (int i = 0; i < NB; i++) begin m_c[i] = 0; m_t[i] = 0; m_f[i] = 255; end
    since = 0; refreshes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3 * INTERVAL; it++) begin
      @(negedge clk);
      lookup_check();
      up_valid   = 1;
      up_lhist   = 10'($urandom % 16);
      up_ghist   = 12'($urandom % 16);
      up_self_l  = 2'($urandom);
      up_self_g  = 2'($urandom);
      // mostly correct, history 0..3 are hard to predict
      up_correct = (up_lhist < 4) ? ($urandom % 2) : (($urandom % 10) != 0);
      b = m_l[up_lhist] + m_g[up_ghist] + up_self_l + up_self_g;
      @(posedge clk);
      m_t[b]++;
      if (up_correct) m_c[b]++;
      if (up_correct) begin
        if (m_l[up_lhist] < 31) m_l[up_lhist]++;
        if (m_g[up_ghist] < 7)  m_g[up_ghist]++;
      end else begin
        m_l[up_lhist] = m_l[up_lhist] / 2;
        m_g[up_ghist] = 0;
      end
      since++;
      @(negedge clk);
      up_valid = 0;
      if (since == INTERVAL) begin
        since = 0;
        refreshes++;
        for (int k = 0; k < NB; k++) begin
          m_f[k] = (m_t[k] == 0 || m_c[k] >= m_t[k]) ? 255 : (m_c[k] * 256) / m_t[k];
          m_c[k] = m_c[k] / 2;
          m_t[k] = m_t[k] / 2;
        end
        check(refresh_busy, "refresh started");
        cyc = 0;
        while (refresh_busy) begin @(negedge clk); cyc++; end
        check(cyc == NB * 10, $sformatf("refresh took %0d cycles", cyc));
      end
    end
    for (int k = 0; k < 200; k++) begin @(negedge clk); lookup_check(); end
    check(refreshes == 3, "three refreshes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
