`timescale 1ps/1ps
// Workload testbench: two devices. Two instances with different CHIP_ID
// (different fixed delays in the network model) serve one request each
// with the same host seed and the same challenge configuration. Their
// outputs must not agree: the inter-device Hamming distance must be close
// to 50 % (40..60 % accepted), and each output must hold 45..55 % ones.
module tb_trng_devices;
  logic clk = 0, rst_n = 0;
  logic [63:0] chlng = 64'hC0FF_EE00_1234_5678;
  int checks = 0, failures = 0;

  always #10000 clk = ~clk;

  logic        cc1, cc2, wr1, wr2, ov1, ov2, ack1, ack2, busy1, busy2, done1, done2, fin1, fin2;
  logic [4:0]  ph1, ph2;
  logic [1:0]  ad1, ad2;
  logic [31:0] wd1, wd2;
  logic [7:0]  od1, od2;
  int ndone1 = 0, ndone2 = 0;

  sirf_trng_top #(.CHIP_ID(1)) dut1 (.clk, .rst_n, .capture_clk(cc1), .phase(ph1), .chlng,
    .ps_wr(wr1), .ps_addr(ad1), .ps_wdata(wd1), .ps_out_data(od1), .ps_out_valid(ov1),
    .ps_out_ack(ack1), .busy(busy1), .done(done1));
  sirf_trng_top #(.CHIP_ID(2)) dut2 (.clk, .rst_n, .capture_clk(cc2), .phase(ph2), .chlng,
    .ps_wr(wr2), .ps_addr(ad2), .ps_wdata(wd2), .ps_out_data(od2), .ps_out_valid(ov2),
    .ps_out_ack(ack2), .busy(busy2), .done(done2));

  trng_host_model #(.N_REQ(1)) host1 (.clk, .rst_n, .phase(ph1), .capture_clk(cc1), .ps_wr(wr1),
    .ps_addr(ad1), .ps_wdata(wd1), .ps_out_data(od1), .ps_out_valid(ov1), .ps_out_ack(ack1), .finished(fin1));
  trng_host_model #(.N_REQ(1)) host2 (.clk, .rst_n, .phase(ph2), .capture_clk(cc2), .ps_wr(wr2),
    .ps_addr(ad2), .ps_wdata(wd2), .ps_out_data(od2), .ps_out_valid(ov2), .ps_out_ack(ack2), .finished(fin2));

  always @(posedge clk) if (rst_n) begin
    if (done1) ndone1++;
    if (done2) ndone2++;
  end

  initial begin
    #800_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hd(input int off_a, input int off_b, input bit b_dev2);
    int d = 0;
    for (int i = 0; i < 5120; i++)
      d += $countones(host1.bytes[off_a + i] ^ (b_dev2 ? host2.bytes[off_b + i] : host1.bytes[off_b + i]));
    return d;
  endfunction

  task automatic pct_check(input string what, input int v, input int lo, input int hi);
    checks++;
    $display("%s: %0d of 40960 bits (%0.2f %%)", what, v, 100.0 * v / 40960.0);
    if (v < 40960 * lo / 100 || v > 40960 * hi / 100) begin failures++; $display("  out of %0d..%0d %%", lo, hi); end
  endtask

  initial begin
    int ones;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin1 && fin2);
    repeat (5) @(posedge clk);
    checks++;
    if (ndone1 != 1 || ndone2 != 1) begin failures++; $display("done pulses %0d/%0d", ndone1, ndone2); end
    for (int r = 0; r < 1; r++) begin
      ones = 0;
      for (int i = 0; i < 5120; i++) ones += $countones(host1.bytes[r*5120 + i]);
      pct_check($sformatf("device 1 request %0d ones", r + 1), ones, 45, 55);
    end
    ones = 0;
    for (int i = 0; i < 5120; i++) ones += $countones(host2.bytes[i]);
    pct_check("device 2 ones", ones, 45, 55);
    pct_check("device 1 vs device 2: Hamming distance", hd(0, 0, 1), 40, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
