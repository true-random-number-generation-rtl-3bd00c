`timescale 1ps/1ps
// Workload testbench: repeated requests on one device. The device serves
// two requests with the same fixed host seed, as the host seed is not
// secret and may be constant. A TRNG must never repeat itself: the Hamming
// distance between the two 5120-byte outputs must be close to 50 %
// (40..60 % accepted) and each output must hold 45..55 % ones. Both
// requests must deliver all bytes and end with done.
module tb_trng_repeat;
  logic clk = 0, rst_n = 0;
  logic [63:0] chlng = 64'hC0FF_EE00_1234_5678;
  int checks = 0, failures = 0;

  always #10000 clk = ~clk;

  logic        cc1, wr1, ov1, ack1, busy1, done1, fin1;
  logic [4:0]  ph1;
  logic [1:0]  ad1;
  logic [31:0] wd1;
  logic [7:0]  od1;
  int ndone1 = 0;

  sirf_trng_top #(.CHIP_ID(1)) dut1 (.clk, .rst_n, .capture_clk(cc1), .phase(ph1), .chlng,
    .ps_wr(wr1), .ps_addr(ad1), .ps_wdata(wd1), .ps_out_data(od1), .ps_out_valid(ov1),
    .ps_out_ack(ack1), .busy(busy1), .done(done1));

  trng_host_model #(.N_REQ(2)) host1 (.clk, .rst_n, .phase(ph1), .capture_clk(cc1), .ps_wr(wr1),
    .ps_addr(ad1), .ps_wdata(wd1), .ps_out_data(od1), .ps_out_valid(ov1), .ps_out_ack(ack1), .finished(fin1));

  always @(posedge clk) if (rst_n) begin
    if (done1) ndone1++;
  end

  initial begin
    #800_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hd(input int off_a, input int off_b);
    int d = 0;
    for (int i = 0; i < 5120; i++) d += $countones(host1.bytes[off_a + i] ^ host1.bytes[off_b + i]);
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
    wait (fin1);
    repeat (5) @(posedge clk);
    checks++;
    if (ndone1 != 2) begin failures++; $display("done pulses %0d", ndone1); end
    for (int r = 0; r < 2; r++) begin
      ones = 0;
      for (int i = 0; i < 5120; i++) ones += $countones(host1.bytes[r*5120 + i]);
      pct_check($sformatf("device 1 request %0d ones", r + 1), ones, 45, 55);
    end
    pct_check("same device, same seed, two requests: Hamming distance", hd(0, 5120), 40, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
