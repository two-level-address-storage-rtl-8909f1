// tb_tlap_chunk_unit: checks chunk extraction and the lowest-differing-chunk
// search of tlap_chunk_unit against shifts and masks computed here, for
// b = 14 (five chunks, the top one 8 bits wide). Reference pairs differ in
// one random chunk, in several, or not at all.
module tb_tlap_chunk_unit;
  import tlap_pkg::*;
  localparam int unsigned B = 14;
  localparam int unsigned NCH = 5;

  logic [63:0] a, r;
  logic [2:0]  sel;
  logic [B-1:0] sel_chunk, dif_chunk;
  logic [2:0]  dif_id;
  logic        differ;
  int checks = 0, failures = 0;

  tlap_chunk_unit #(.B(B)) dut (
    .addr_i(a), .ref_i(r), .sel_id_i(sel),
    .sel_chunk_o(sel_chunk), .dif_id_o(dif_id), .dif_chunk_o(dif_chunk), .differ_o(differ)
  );

  function automatic logic [B-1:0] ch(logic [63:0] x, int k);
    return B'((x >> (k * B)) & ((64'd1 << B) - 1));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s a=%h r=%h", what, a, r); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int k, exp_id;
      a = {$urandom(), $urandom()};
      k = $urandom_range(NCH - 1);
      case (n % 4)
        0: r = a;
        1: r = a ^ (64'd1 << (k * B + $urandom_range(k == NCH - 1 ? 7 : B - 1)));
        2: r = a ^ {$urandom(), $urandom()};
        default: r = a ^ (64'd1 << 63);
      endcase
      sel = 3'($urandom_range(NCH - 1));
      #1;
      exp_id = 0;
      for (int j = NCH - 1; j >= 0; j--) if (ch(a, j) != ch(r, j)) exp_id = j;
      check(sel_chunk == ch(a, int'(sel)), "selected chunk");
      check(differ == (a != r), "differ flag");
      check(dif_id == 3'(exp_id), "lowest differing chunk id");
      check(dif_chunk == ch(a, exp_id), "lowest differing chunk value");
    end
    // the top chunk holds only bits 63:56
    a = '1; sel = 3'd4; #1;
    check(sel_chunk == B'(8'hFF), "top chunk zero-extended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
