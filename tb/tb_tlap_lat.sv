// tb_tlap_lat: checks the LAT array: the clearing sweep after reset (busy for
// ENTRIES cycles, every word zero afterwards), one-cycle synchronous reads on
// both ports, writes, and old data on a read of the word written in the same
// cycle. Runs at the default 4096 x 30 bits against a shadow array.
module tb_tlap_lat;
  localparam int unsigned N = 4096, W = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic busy, r0e = 0, r1e = 0, we = 0;
  logic [11:0] r0i = 0, r1i = 0, wi = 0;
  logic [W-1:0] r0d, r1d, wd = 0;
  logic [W-1:0] shadow [N];
  int checks = 0, failures = 0, busy_cycles = 0;

  tlap_lat #(.ENTRIES(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .init_busy_o(busy),
    .rd0_en_i(r0e), .rd0_idx_i(r0i), .rd0_data_o(r0d),
    .rd1_en_i(r1e), .rd1_idx_i(r1i), .rd1_data_o(r1d),
    .we_i(we), .widx_i(wi), .wdata_i(wd)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // writes during the sweep are ignored
    we = 1; wi = 12'd4000; wd = '1;
    while (busy) begin @(posedge clk); #1; busy_cycles++; end
    we = 0;
    check(busy_cycles == N, "sweep lasts ENTRIES cycles");
    for (int i = 0; i < N; i++) shadow[i] = '0;
    // read everything back through both ports
    for (int i = 0; i < N; i++) begin
      r0e = 1; r0i = 12'(i); r1e = 1; r1i = 12'(N - 1 - i);
      @(posedge clk); #1;
      check(r0d == '0 && r1d == '0, "cleared after reset");
    end
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      logic [11:0] a0, a1, aw;
      logic [W-1:0] e0, e1;
      a0 = 12'($urandom()); a1 = 12'($urandom()); aw = (n % 4 == 0) ? a0 : 12'($urandom());
      r0e = 1; r0i = a0; r1e = 1; r1i = a1;
      we = $urandom_range(1); wi = aw; wd = W'($urandom());
      e0 = shadow[a0]; e1 = shadow[a1];
      @(posedge clk); #1;
      if (we) shadow[aw] = wd;
      check(r0d == e0, "port 0 read (old data on same-cycle write)");
      check(r1d == e1, "port 1 read");
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
