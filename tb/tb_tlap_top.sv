// tb_tlap_top: end-to-end test of the Two-Level Address Predictor at its
// default size (4096-entry LAT, 64-entry HAT, b = 14, 5 tag bits).
//
// A reference model in this file keeps its own LAT and HAT arrays and applies
// every executed load in program order with the predictor's rules; it mirrors
// the replacement LFSR so that random evictions can be predicted exactly.
// A synthetic load stream mixes loads with a constant address, loads that walk
// through many 2^14-byte regions (HAT pressure), random addresses, strides that
// are multiples of 2^14 (chunk selection), occasional address changes, loads
// that alias in the LAT and back-to-back updates of one load (forwarding).
// Each prediction is compared with the model (made / not made, address), each
// update's event record is compared with the model's, and the latency of both
// ports is checked to be two cycles. Every mechanism must occur at least once.
module tb_tlap_top;
  import tlap_pkg::*;

  localparam int unsigned LAT_N  = 4096;
  localparam int unsigned HAT_N  = 64;
  localparam int unsigned B      = 14;
  localparam int unsigned TAG_W  = 5;
  localparam int unsigned CNT_MX = 7;
  localparam int unsigned NCH    = (64 + B - 1) / B;
  localparam int unsigned LIDX_W = 12;
  localparam int unsigned NLOADS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ready;
  logic        pred_req = 1'b0;
  logic [63:0] pred_pc = '0;
  logic        pred_valid, pred_hit;
  logic [63:0] pred_addr;
  logic        upd_req = 1'b0;
  logic [63:0] upd_pc = '0, upd_addr = '0;
  logic        upd_valid;
  upd_event_t  upd_event;

  tlap_top dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .ready_o      (ready),
    .pred_req_i   (pred_req),
    .pred_pc_i    (pred_pc),
    .pred_valid_o (pred_valid),
    .pred_hit_o   (pred_hit),
    .pred_addr_o  (pred_addr),
    .upd_req_i    (upd_req),
    .upd_pc_i     (upd_pc),
    .upd_addr_i   (upd_addr),
    .upd_valid_o  (upd_valid),
    .upd_event_o  (upd_event)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------- reference model
  logic [TAG_W-1:0] m_tag  [LAT_N];
  int               m_conf [LAT_N];
  int               m_cid  [LAT_N];
  logic [63:0]      m_low  [LAT_N];
  int               m_link [LAT_N];
  logic [63:0]      m_high [HAT_N];
  int               m_cnt  [HAT_N];
  int               m_mru;
  logic [15:0]      m_lfsr;
  int               last_widx = -1;  // LAT word written by the previous cycle's update

  function automatic int idx_of(logic [63:0] pc);
    return int'((pc >> 2) & 64'(LAT_N - 1));
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [63:0] pc);
    return TAG_W'(pc >> (2 + LIDX_W));
  endfunction
  function automatic logic [63:0] chunk_of(logic [63:0] a, int k);
    return (a >> (k * B)) & ((64'd1 << B) - 64'd1);
  endfunction
  function automatic logic [63:0] high_of(logic [63:0] a);
    return a >> B;
  endfunction

  function automatic void model_reset();
    for (int i = 0; i < LAT_N; i++) begin
      m_tag[i] = '0; m_conf[i] = 0; m_cid[i] = 0; m_low[i] = '0; m_link[i] = 0;
    end
    for (int j = 0; j < HAT_N; j++) begin m_high[j] = '0; m_cnt[j] = 0; end
    m_mru = 0;
    m_lfsr = 16'hACE1;
  endfunction

  // INSERT: returns the linked entry, reports the outcome in ev.
  function automatic int model_insert(logic [63:0] high, ref upd_event_t ev);
    int v;
    ev.hat_insert = 1'b1;
    for (int j = 0; j < HAT_N; j++)
      if (m_high[j] == high) begin
        ev.hat_hit = 1'b1;
        if (m_cnt[j] < CNT_MX) m_cnt[j]++;
        m_mru = j;
        return j;
      end
    v = -1;
    for (int j = 0; j < HAT_N; j++)
      if (v < 0 && m_cnt[j] == 0) v = j;
    if (v >= 0) ev.hat_empty = 1'b1;
    else begin
      ev.hat_random = 1'b1;
      v = int'(m_lfsr % 16'(HAT_N));
      if (v == m_mru) v = (v + 1) % HAT_N;
      m_lfsr = m_lfsr[0] ? ((m_lfsr >> 1) ^ 16'hB400) : (m_lfsr >> 1);
    end
    m_high[v] = high;
    m_cnt[v]  = 1;
    m_mru     = v;
    return v;
  endfunction

  function automatic void model_dec(int j, ref upd_event_t ev);
    ev.hat_dec = 1'b1;
    if (m_cnt[j] > 0) m_cnt[j]--;
  endfunction

  function automatic upd_event_t model_update(logic [63:0] pc, logic [63:0] a, bit back_to_back);
    upd_event_t ev = '0;
    int i = idx_of(pc);
    logic [TAG_W-1:0] t = tag_of(pc);
    logic [63:0] pa;
    ev.bypass = back_to_back && (last_widx == i);
    if (m_tag[i] != t) begin
      ev.lat_miss = 1'b1;
      if (m_conf[i] > 1) model_dec(m_link[i], ev);
      m_tag[i] = t; m_conf[i] = 1; m_cid[i] = 0; m_low[i] = chunk_of(a, 0);
    end else if (m_conf[i] > 1) begin
      ev.predicted = 1'b1;
      pa = (m_high[m_link[i]] << B) | m_low[i];
      if (pa == a) begin
        ev.correct = 1'b1;
        if (m_conf[i] < 3) m_conf[i]++;
      end else begin
        m_conf[i]--;
        if (m_conf[i] == 1) begin
          int k = 0;
          while (chunk_of(a, k) == chunk_of(pa, k)) k++;
          ev.to_unpred = 1'b1;
          ev.chunk_moved = (k != 0);
          model_dec(m_link[i], ev);
          m_cid[i] = k;
          m_low[i] = chunk_of(a, k);
        end else begin
          m_low[i] = chunk_of(a, 0);
          if (high_of(a) != m_high[m_link[i]]) begin
            model_dec(m_link[i], ev);
            m_link[i] = model_insert(high_of(a), ev);
          end
        end
      end
    end else begin
      logic [63:0] c = chunk_of(a, m_cid[i]);
      if (c == m_low[i]) begin if (m_conf[i] < 3) m_conf[i]++; end
      else if (m_conf[i] > 0) m_conf[i]--;
      m_low[i] = c;
      if (m_conf[i] == 2) begin
        ev.to_pred = 1'b1;
        m_cid[i] = 0;
        m_low[i] = chunk_of(a, 0);
        m_link[i] = model_insert(high_of(a), ev);
      end
    end
    last_widx = i;
    return ev;
  endfunction

  // ------------------------------------------------ expected update results
  upd_event_t exp_q[$];
  int         issue_cycle_q[$];
  int         cycle = 0;
  // Counted on the falling edge so that it is stable at every rising edge.
  always @(negedge clk) cycle++;

  // mechanism counters
  int n_pred_made = 0, n_pred_correct = 0, n_mispred = 0, n_lat_miss = 0, n_to_unpred = 0,
      n_to_pred = 0, n_chunk_moved = 0, n_hat_hit = 0, n_hat_empty = 0, n_hat_random = 0,
      n_hat_dec = 0, n_bypass = 0, n_sat = 0, n_stale = 0;

  always @(posedge clk) begin
    if (rst_n && upd_valid) begin
      upd_event_t e;
      int c0;
      if (exp_q.size() == 0) check(1'b0, "unexpected update result");
      else begin
        e  = exp_q.pop_front();
        c0 = issue_cycle_q.pop_front();
        check(upd_event == e, "update event record");
        if (upd_event != e)
          if (failures < 20) $display("  got %b exp %b", upd_event, e);
        // Requested in cycle c0, visible in cycle c0 + 2, sampled here at the
        // end of that cycle.
        check(cycle - c0 == 3, "update latency of two cycles");
        if (cycle - c0 != 3 && failures < 20) $display("  latency %0d c0 %0d cyc %0d q %0d", cycle - c0, c0, cycle, issue_cycle_q.size());
        if (e.predicted && e.correct) n_pred_correct++;
        if (e.predicted && !e.correct) n_mispred++;
        if (e.lat_miss) n_lat_miss++;
        if (e.to_unpred) n_to_unpred++;
        if (e.to_pred) n_to_pred++;
        if (e.chunk_moved) n_chunk_moved++;
        if (e.hat_hit) n_hat_hit++;
        if (e.hat_empty) n_hat_empty++;
        if (e.hat_random) n_hat_random++;
        if (e.hat_dec) n_hat_dec++;
        if (e.bypass) n_bypass++;
      end
    end
  end

  // ----------------------------------------------------------- drivers
  task automatic issue_update(logic [63:0] pc, logic [63:0] a, bit back_to_back);
    upd_event_t e;
    e = model_update(pc, a, back_to_back);
    exp_q.push_back(e);
    issue_cycle_q.push_back(cycle);
    upd_req  = 1'b1;
    upd_pc   = pc;
    upd_addr = a;
    @(posedge clk);
    #1;
    upd_req  = 1'b0;
  endtask

  task automatic drain();
    repeat (3) @(posedge clk);
    #1;
    last_widx = -1;
  endtask

  task automatic predict_and_check(logic [63:0] pc);
    int i = idx_of(pc);
    bit exp_hit = (m_tag[i] == tag_of(pc)) && (m_conf[i] > 1);
    logic [63:0] exp_addr = (m_high[m_link[i]] << B) | m_low[i];
    int c0 = cycle;
    pred_req = 1'b1;
    pred_pc  = pc;
    @(posedge clk);
    #1;
    pred_req = 1'b0;
    check(!pred_valid, "prediction not early");
    @(posedge clk);
    #1;
    check(pred_valid && (cycle - c0 == 2), "prediction latency of two cycles");
    check(pred_hit == exp_hit, "prediction made");
    if (exp_hit) begin
      check(pred_addr == exp_addr, "predicted address");
      n_pred_made++;
    end
  endtask

  // --------------------------------------------------------- load stream
  logic [63:0] ld_pc   [NLOADS];
  int          ld_kind [NLOADS];
  logic [63:0] ld_addr [NLOADS];
  logic [63:0] ld_base [NLOADS];

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [63:0] next_addr(int l, int round);
    case (ld_kind[l])
      0: return ld_base[l];                                        // constant
      1: return ld_base[l] + 64'(round / 4) * 64'd8;                // slow stride: changes every 4th run
      2: return rnd64() & ~64'h7;                                   // unpredictable
      3: return ld_base[l] + 64'((round / 3) % 2) * (64'd1 << (2 * B)); // stride in chunk 2
      4: return ld_base[l] + 64'(round / 6) * (64'd1 << B);         // new high part every 6th run
      default: return ld_base[l];
    endcase
  endfunction

  // Sum of LAT entries linked to each HAT entry, from the model's LAT.
  task automatic count_links_and_stale();
    int sum [HAT_N];
    for (int j = 0; j < HAT_N; j++) sum[j] = 0;
    for (int i = 0; i < LAT_N; i++)
      if (m_conf[i] > 1) begin
        sum[m_link[i]]++;
      end
    for (int j = 0; j < HAT_N; j++) if (sum[j] > CNT_MX) n_sat++;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    model_reset();
    for (int l = 0; l < NLOADS; l++) begin
      // PCs: distinct LAT indices for the first 256 loads, the rest alias
      // (same index, other tag) with some of the first ones.
      if (l < 256) ld_pc[l] = 64'h1_2000_0000 + 64'(l) * 64'd4 * 64'd13;
      else         ld_pc[l] = ld_pc[l - 256] + (64'd1 << (2 + LIDX_W)) * 64'(1 + l % 3);
      ld_kind[l] = l % 5;
      // Bases spread over about 100 regions of 2^14 bytes, plus a shared one.
      if (l % 7 == 0) ld_base[l] = 64'h0000_0011_4000_0000 + 64'(l) * 64'd8;
      else            ld_base[l] = 64'h0000_0020_0000_0000 + 64'(l % 97) * (64'd1 << 20) + 64'(l) * 64'd8;
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!ready, "busy while the LAT is cleared");
    wait (ready);
    @(posedge clk);
    #1;

    for (int round = 0; round < 40; round++) begin
      for (int l = 0; l < NLOADS; l++) begin
        // The aliasing loads run only in some rounds, to evict and re-allocate.
        if (l >= 256 && (round % 8) != 7) continue;
        if (l < 256 && (round % 8) == 7 && l >= 44) continue;
        if ((l % 3) == 0) predict_and_check(ld_pc[l]);
        issue_update(ld_pc[l], next_addr(l, round), 1'b1);
        if ((l % 11) == 0) begin
          // the same load again, back to back
          issue_update(ld_pc[l], next_addr(l, round), 1'b1);
        end
      end
      drain();
      for (int l = 0; l < 40; l++) predict_and_check(ld_pc[l]);
      count_links_and_stale();
    end
    drain();

    // stale links: LAT entries that predict but whose HAT entry was re-used
    for (int i = 0; i < LAT_N; i++) if (m_conf[i] > 1) begin
      automatic int lid = -1;
      for (int l = 0; l < NLOADS; l++) if (idx_of(ld_pc[l]) == i && tag_of(ld_pc[l]) == m_tag[i]) lid = l;
      if (lid >= 0 && ld_kind[lid] == 0 && (m_high[m_link[i]] != high_of(ld_base[lid]))) n_stale++;
    end

    n_pred_made = n_pred_made + 0;
    check(exp_q.size() == 0, "all updates reported");
    check(n_pred_made > 0,    "mechanism: prediction made");
    check(n_pred_correct > 0, "mechanism: correct prediction");
    check(n_mispred > 0,      "mechanism: misprediction");
    check(n_lat_miss > 0,     "mechanism: LAT miss / allocation");
    check(n_to_unpred > 0,    "mechanism: 2->1 transition, link broken");
    check(n_to_pred > 0,      "mechanism: 1->2 transition, link made");
    check(n_chunk_moved > 0,  "mechanism: chunk selection above chunk 0");
    check(n_hat_hit > 0,      "mechanism: HAT hit");
    check(n_hat_empty > 0,    "mechanism: empty HAT entry reused");
    check(n_hat_random > 0,   "mechanism: no-MRU random eviction");
    check(n_hat_dec > 0,      "mechanism: link counter decrement");
    check(n_bypass > 0,       "mechanism: back-to-back update forwarding");
    check(n_sat > 0,          "mechanism: link counter saturation");
    $display("predictions %0d correct %0d mispred %0d lat_miss %0d to_unpred %0d to_pred %0d chunk %0d",
             n_pred_made, n_pred_correct, n_mispred, n_lat_miss, n_to_unpred, n_to_pred, n_chunk_moved);
    $display("hat_hit %0d hat_empty %0d hat_random %0d hat_dec %0d bypass %0d sat %0d stale %0d",
             n_hat_hit, n_hat_empty, n_hat_random, n_hat_dec, n_bypass, n_sat, n_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
