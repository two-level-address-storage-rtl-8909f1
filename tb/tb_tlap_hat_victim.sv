// tb_tlap_hat_victim: checks the HAT victim choice (lowest empty entry first,
// else a random entry that is never the MRU one) on random empty vectors,
// MRU indices and random inputs, with 64 entries.
module tb_tlap_hat_victim;
  localparam int unsigned N = 64;
  logic [N-1:0] empty;
  logic [5:0]   mru, victim;
  logic [15:0]  rnd;
  logic         found;
  int checks = 0, failures = 0;

  tlap_hat_victim #(.ENTRIES(N)) dut (
    .empty_i(empty), .mru_i(mru), .rnd_i(rnd), .victim_o(victim), .empty_found_o(found)
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
    for (int n = 0; n < 5000; n++) begin
      int exp_v;
      case (n % 3)
        0: empty = '0;
        1: empty = N'(64'd1 << $urandom_range(N - 1));
        default: empty = {$urandom(), $urandom()} & {$urandom(), $urandom()};
      endcase
      mru = 6'($urandom_range(N - 1));
      rnd = (n % 5 == 0) ? {10'($urandom()), mru} : 16'($urandom());
      #1;
      if (empty != 0) begin
        exp_v = -1;
        for (int j = 0; j < N; j++) if (exp_v < 0 && empty[j]) exp_v = j;
      end else begin
        exp_v = int'(rnd) % N;
        if (exp_v == int'(mru)) exp_v = (exp_v + 1) % N;
      end
      check(found == (empty != 0), "empty found");
      check(victim == 6'(exp_v), "victim index");
      if (empty == 0) check(victim != mru, "never the MRU entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
