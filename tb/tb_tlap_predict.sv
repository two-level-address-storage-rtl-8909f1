// tb_tlap_predict: checks the prediction decision (tag match and confidence
// above one) and the {high, low} concatenation for random inputs.
module tb_tlap_predict;
  import tlap_pkg::*;
  localparam int unsigned B = 14, TAG_W = 5;
  logic [TAG_W-1:0] rt, et;
  conf_t            ec;
  logic [B-1:0]     el;
  logic [63-B:0]    hh;
  logic             p;
  logic [63:0]      pa;
  int checks = 0, failures = 0;

  tlap_predict #(.B(B), .TAG_W(TAG_W)) dut (
    .req_tag_i(rt), .e_tag_i(et), .e_conf_i(ec), .e_low_i(el), .hat_high_i(hh),
    .predicted_o(p), .pred_addr_o(pa)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      rt = 5'($urandom());
      et = (n % 2) ? rt : 5'($urandom());
      ec = conf_t'($urandom());
      el = B'($urandom());
      hh = (64 - B)'({$urandom(), $urandom()});
      #1;
      check(p == ((et == rt) && (int'(ec) > 1)), "predicted");
      check(pa == ((64'(hh) << B) | 64'(el)), "predicted address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
