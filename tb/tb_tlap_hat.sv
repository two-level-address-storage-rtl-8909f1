// tb_tlap_hat: checks the High-Address Table against a model kept here:
// associative search, link counters (saturating at 7 and at 0), decrement
// before insertion in the same cycle, reuse of empty entries, no-MRU random
// eviction (the model mirrors the 16-bit replacement LFSR) and both read
// ports. Default size: 64 entries of 50 high bits. High values come from a
// small pool so that hits, saturation and full-table evictions all occur.
module tb_tlap_hat;
  localparam int unsigned N = 64, HW = 50, CMAX = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0]  pidx = 0, uidx = 0, didx = 0;
  logic [HW-1:0] phigh, uhigh, ihigh = 0;
  logic        den = 0, ien = 0;
  logic [5:0]  iidx, mru;
  logic        ihit, iempty, irnd;
  int checks = 0, failures = 0;
  int n_hit = 0, n_empty = 0, n_rnd = 0, n_sat = 0;

  tlap_hat #(.ENTRIES(N), .HIGH_W(HW), .CNT_W(3)) dut (
    .clk(clk), .rst_n(rst_n),
    .pred_idx_i(pidx), .pred_high_o(phigh), .upd_idx_i(uidx), .upd_high_o(uhigh),
    .dec_en_i(den), .dec_idx_i(didx), .ins_en_i(ien), .ins_high_i(ihigh),
    .ins_idx_o(iidx), .ins_hit_o(ihit), .ins_empty_o(iempty), .ins_random_o(irnd), .mru_o(mru)
  );

  logic [HW-1:0] m_high [N];
  int            m_cnt  [N];
  int            m_mru = 0;
  logic [15:0]   m_lfsr = 16'hACE1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) begin m_high[j] = '0; m_cnt[j] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      int ev, kind;
      bit hit;
      den  = ($urandom_range(2) == 0);
      didx = 6'($urandom());
      ien  = ($urandom_range(1) == 0);
      // Phases: a small pool of values (hits, saturation), then a large one
      // (full table, random evictions).
      ihigh = (n < 10000) ? HW'($urandom_range(40)) : HW'(1000 + $urandom_range(300));
      if (n >= 20000) den = ($urandom_range(1) == 0);
      pidx = 6'($urandom()); uidx = 6'($urandom());
      #1;
      check(phigh == m_high[pidx] && uhigh == m_high[uidx], "read ports");
      // model: decrement, then insert
      if (den && m_cnt[didx] > 0) m_cnt[didx]--;
      if (ien) begin
        hit = 0; ev = -1;
        for (int j = 0; j < N; j++) if (!hit && m_high[j] == ihigh) begin hit = 1; ev = j; end
        if (hit) begin
          kind = 0;
          if (m_cnt[ev] == CMAX) n_sat++;
          if (m_cnt[ev] < CMAX) m_cnt[ev]++;
        end else begin
          for (int j = 0; j < N; j++) if (ev < 0 && m_cnt[j] == 0) ev = j;
          if (ev >= 0) kind = 1;
          else begin
            kind = 2;
            ev = int'(m_lfsr) % N;
            if (ev == m_mru) ev = (ev + 1) % N;
            m_lfsr = m_lfsr[0] ? ((m_lfsr >> 1) ^ 16'hB400) : (m_lfsr >> 1);
          end
          m_high[ev] = ihigh;
          m_cnt[ev] = 1;
        end
        check(iidx == 6'(ev), "inserted entry");
        check(ihit == (kind == 0) && iempty == (kind == 1) && irnd == (kind == 2), "insert outcome");
        if (kind == 2) check(6'(ev) != 6'(m_mru), "no-MRU");
        if (kind == 0) n_hit++; else if (kind == 1) n_empty++; else n_rnd++;
        m_mru = ev;
      end else check(!ihit && !iempty && !irnd, "no outcome without insertion");
      @(posedge clk);
      #1;
      den = 0; ien = 0;
      check(mru == 6'(m_mru), "MRU register");
    end
    check(n_hit > 0 && n_empty > 0 && n_rnd > 0 && n_sat > 0, "all outcomes seen");
    $display("hits %0d empty %0d random %0d saturated %0d", n_hit, n_empty, n_rnd, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
