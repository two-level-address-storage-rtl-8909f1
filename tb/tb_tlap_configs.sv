// tb_tlap_configs: runs the end-to-end 2LAP check at the other evaluated
// sizes: b = 10 with a 16-entry HAT and a 256-entry LAT (9 tag bits), b = 12
// with a 32-entry HAT and a 1024-entry LAT (7 tag bits), and b = 10 with a
// 64-entry HAT and a 2048-entry LAT (6 tag bits). Index plus tag bits stay 17.
module tb_tlap_configs;
  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;

  tlap_e2e_harness #(.LAT_N(256),  .HAT_N(16), .B(10), .TAG_W(9)) u_small (.checks(c0), .failures(f0), .done(d0));
  tlap_e2e_harness #(.LAT_N(1024), .HAT_N(32), .B(12), .TAG_W(7)) u_mid   (.checks(c1), .failures(f1), .done(d1));
  tlap_e2e_harness #(.LAT_N(2048), .HAT_N(64), .B(10), .TAG_W(6)) u_b10   (.checks(c2), .failures(f2), .done(d2));

  initial begin : watchdog
    #100ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
