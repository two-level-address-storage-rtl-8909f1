// tb_tlap_vs_base: the 2LAP at its default size against a behavioural
// one-level last-address predictor (4096-entry table of full 64-bit addresses,
// same index, 5-bit tags, same two-bit confidence counters).
//
// Phase 1 uses a load stream whose addresses fall in at most 48 regions of
// 2^14 bytes, so the 64-entry HAT never has to evict. The two predictors must
// then make exactly the same predictions: same number predicted and same
// number correct. Phase 2 spreads the loads over 400 regions, all touched in
// every pass of the loop: the HAT thrashes, and the 2LAP must lose
// predictions relative to the one-level table (never gain). This is the
// case the two-level organisation is not meant for; real programs touch far
// fewer high-order regions at a time. Predictability (correct / executed) and accuracy
// (correct / predicted) of both are printed. Updates are issued back to back,
// one per cycle.
module tb_tlap_vs_base;
  import tlap_pkg::*;

  localparam int unsigned LAT_N = 4096, LIDX_W = 12, TAG_W = 5, NL = 1500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready, pv, ph, uv;
  logic [63:0] pa;
  logic upd_req = 0;
  logic [63:0] upd_pc = 0, upd_addr = 0;
  upd_event_t ev;

  tlap_top dut (
    .clk(clk), .rst_n(rst_n), .ready_o(ready),
    .pred_req_i(1'b0), .pred_pc_i(64'd0), .pred_valid_o(pv), .pred_hit_o(ph), .pred_addr_o(pa),
    .upd_req_i(upd_req), .upd_pc_i(upd_pc), .upd_addr_i(upd_addr), .upd_valid_o(uv), .upd_event_o(ev)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one-level base predictor
  logic [TAG_W-1:0] b_tag [LAT_N];
  logic [63:0]      b_addr [LAT_N];
  int               b_conf [LAT_N];
  int bp_pred = 0, bp_corr = 0, tl_pred = 0, tl_corr = 0, n_exec = 0, n_random = 0;

  function automatic void base_update(logic [63:0] pc, logic [63:0] a);
    int i = int'((pc >> 2) & 64'(LAT_N - 1));
    logic [TAG_W-1:0] t = TAG_W'(pc >> (2 + LIDX_W));
    if (b_tag[i] == t) begin
      if (b_conf[i] > 1) begin
        bp_pred++;
        if (b_addr[i] == a) bp_corr++;
      end
      if (b_addr[i] == a) begin if (b_conf[i] < 3) b_conf[i]++; end
      else if (b_conf[i] > 0) b_conf[i]--;
    end else begin
      b_tag[i] = t;
      b_conf[i] = 1;
    end
    b_addr[i] = a;
  endfunction

  always @(posedge clk)
    if (rst_n && uv) begin
      if (ev.predicted) tl_pred++;
      if (ev.correct) tl_corr++;
      if (ev.hat_random) n_random++;
    end

  logic [63:0] pcs [NL];
  logic [63:0] base [NL];
  int          kind [NL];
  int          runs [NL];

  task automatic run_phase(int regions, int rounds);
    for (int l = 0; l < NL; l++) begin
      pcs[l]  = 64'h4000_0000 + 64'(l) * 64'd4 * 64'd3 + ((l % 10 == 9) ? (64'd1 << 14) : 64'd0);
      kind[l] = l % 4;
      runs[l] = 0;
      base[l] = 64'h0000_7000_0000_0000 + 64'($urandom_range(regions - 1)) * (64'd1 << 14)
              + 64'($urandom_range(1023)) * 64'd8;
    end
    for (int r = 0; r < rounds; r++)
      for (int l = 0; l < NL; l++) begin
        logic [63:0] a;
        // Skip some loads in some rounds so the stream is not a fixed loop.
        if ((l * 7 + r) % 5 == 0) continue;
        case (kind[l])
          0, 1: a = base[l];                                    // constant
          2:    a = base[l] + 64'((runs[l] / 5) % 16) * 64'd8;  // changes every 5th run
          default: a = base[l] + 64'(runs[l] % 256) * 64'd8;    // never repeats
        endcase
        runs[l]++;
        n_exec++;
        base_update(pcs[l], a);
        upd_req = 1; upd_pc = pcs[l]; upd_addr = a;
        @(posedge clk); #1;
      end
    upd_req = 0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LAT_N; i++) begin b_tag[i] = '0; b_addr[i] = '0; b_conf[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (ready);
    @(posedge clk); #1;

    run_phase(48, 30);
    $display("phase 1: executed %0d  base: predicted %0d correct %0d  2LAP: predicted %0d correct %0d",
             n_exec, bp_pred, bp_corr, tl_pred, tl_corr);
    check(bp_corr > n_exec / 4, "stream is predictable");
    check(n_random == 0, "48 regions fit in the 64-entry HAT");
    check(tl_pred == bp_pred, "same number of predictions as the one-level table");
    check(tl_corr == bp_corr, "same number of correct predictions as the one-level table");

    n_exec = 0; bp_pred = 0; bp_corr = 0; tl_pred = 0; tl_corr = 0;
    run_phase(400, 30);
    $display("phase 2: executed %0d  base: predicted %0d correct %0d  2LAP: predicted %0d correct %0d  HAT evictions %0d",
             n_exec, bp_pred, bp_corr, tl_pred, tl_corr, n_random);
    $display("phase 2 predictability: base %0d.%0d%%  2LAP %0d.%0d%%",
             bp_corr * 100 / n_exec, (bp_corr * 1000 / n_exec) % 10, tl_corr * 100 / n_exec, (tl_corr * 1000 / n_exec) % 10);
    check(n_random > 0, "400 regions force HAT evictions");
    check(tl_corr <= bp_corr, "2LAP never beats the one-level table of equal entries");
    check(tl_corr < bp_corr, "HAT capacity misses cost predictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
