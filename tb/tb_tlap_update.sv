// tb_tlap_update: checks the update decision of the 2LAP for random LAT
// entries and addresses, against the rules written out here: allocation on a
// tag miss (with a link decrement when the old entry was predictable),
// confidence changes on correct and wrong predictions, the 2 -> 1 transition
// with lowest-differing-chunk selection, the 3 -> 2 relink when the high bits
// change, and chunk-based classification with the 1 -> 2 link. b = 14,
// 5 tag bits, 64 HAT entries.
module tb_tlap_update;
  import tlap_pkg::*;
  localparam int unsigned B = 14, TAG_W = 5, NCH = 5;
  logic [TAG_W-1:0] rt, et, nt;
  logic [63:0]      a;
  conf_t            ec, nc;
  logic [2:0]       ecid, ncid;
  logic [B-1:0]     elow, nlow;
  logic [5:0]       elink, nlink, iidx, didx;
  logic [63-B:0]    hh, ihigh;
  logic den, ien, lm, pr, co, tu, tp, cm;
  int checks = 0, failures = 0;
  int seen [8];

  tlap_update #(.B(B), .TAG_W(TAG_W), .HAT_ENTRIES(64)) dut (
    .req_tag_i(rt), .addr_i(a), .e_tag_i(et), .e_conf_i(ec), .e_cid_i(ecid), .e_low_i(elow),
    .e_link_i(elink), .hat_high_i(hh), .ins_idx_i(iidx),
    .n_tag_o(nt), .n_conf_o(nc), .n_cid_o(ncid), .n_low_o(nlow), .n_link_o(nlink),
    .dec_en_o(den), .dec_idx_o(didx), .ins_en_o(ien), .ins_high_o(ihigh),
    .lat_miss_o(lm), .predicted_o(pr), .correct_o(co), .to_unpred_o(tu), .to_pred_o(tp),
    .chunk_moved_o(cm)
  );

  function automatic logic [B-1:0] ch(logic [63:0] x, int k);
    return B'((x >> (k * B)) & ((64'd1 << B) - 1));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) seen[s] = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] pa;
      // expected
      logic [TAG_W-1:0] x_t; int x_c, x_cid; logic [B-1:0] x_low; logic [5:0] x_link;
      bit x_den, x_ien, x_lm, x_pr, x_co, x_tu, x_tp, x_cm;
      automatic int scen = n % 8;
      rt = 5'($urandom()); et = (scen == 0) ? 5'(rt + 5'd1) : rt;
      ec = conf_t'($urandom()); ecid = 3'($urandom_range(NCH - 1));
      elow = B'($urandom()); elink = 6'($urandom()); iidx = 6'($urandom());
      hh = (64 - B)'({$urandom(), $urandom()});
      pa = (64'(hh) << B) | 64'(elow);
      case (scen)
        1, 2: a = pa;                                                // correct / chunk match
        3:    a = pa ^ (64'd1 << $urandom_range(B - 1));             // low bits differ
        4:    a = pa ^ (64'd1 << (B + $urandom_range(63 - B)));      // high bits differ
        5:    a = pa ^ (64'd1 << (2 * B + $urandom_range(B - 1)));   // chunk 2 differs
        6:    begin a = {$urandom(), $urandom()}; a[ecid * B +: B] = elow; end
        default: a = {$urandom(), $urandom()};
      endcase
      #1;
      x_t = et; x_c = int'(ec); x_cid = int'(ecid); x_low = elow; x_link = elink;
      x_den = 0; x_ien = 0; x_lm = 0; x_pr = 0; x_co = 0; x_tu = 0; x_tp = 0; x_cm = 0;
      if (et != rt) begin
        x_lm = 1; x_den = (ec > 1); x_t = rt; x_c = 1; x_cid = 0; x_low = ch(a, 0);
      end else if (ec > 1) begin
        x_pr = 1;
        if (a == pa) begin x_co = 1; x_c = (ec == 3) ? 3 : int'(ec) + 1; end
        else begin
          x_c = int'(ec) - 1;
          if (x_c == 1) begin
            automatic int k = 0;
            while (ch(a, k) == ch(pa, k)) k++;
            x_tu = 1; x_den = 1; x_cid = k; x_low = ch(a, k); x_cm = (k != 0);
          end else begin
            x_low = ch(a, 0);
            if ((a >> B) != 64'(hh)) begin x_den = 1; x_ien = 1; x_link = iidx; end
          end
        end
      end else begin
        x_c = (ch(a, int'(ecid)) == elow) ? int'(ec) + 1 : ((ec == 0) ? 0 : int'(ec) - 1);
        x_low = ch(a, int'(ecid));
        if (x_c == 2) begin x_tp = 1; x_cid = 0; x_low = ch(a, 0); x_ien = 1; x_link = iidx; end
      end
      check(nt == x_t && int'(nc) == x_c && int'(ncid) == x_cid, "new tag/conf/chunk_id");
      check(nlow == x_low, "new low bits");
      check(!x_ien || nlink == x_link, "new link");
      check(den == x_den && (!x_den || didx == elink), "decrement command");
      check(ien == x_ien && (!x_ien || ihigh == (64 - B)'(a >> B)), "insert command");
      check({lm, pr, co, tu, tp, cm} == {x_lm, x_pr, x_co, x_tu, x_tp, x_cm}, "event flags");
      if (x_tu) seen[0]++;
      if (x_tp) seen[1]++;
      if (x_cm) seen[2]++;
      if (x_ien && x_pr) seen[3]++;
      if (x_co) seen[4]++;
      if (x_lm && x_den) seen[5]++;
    end
    for (int s = 0; s < 6; s++) check(seen[s] > 0, "scenario reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
