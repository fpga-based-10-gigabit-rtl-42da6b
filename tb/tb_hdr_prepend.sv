// Testbench of hdr_prepend with the header sizes of the IP core (20 bytes),
// the Ethernet core (14 bytes) and a whole-word header (8 bytes), each in
// its own harness (hdr_prepend_harness).
module tb_hdr_prepend;
  logic clk = 0, rst_n = 0;
  bit   d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;

  hdr_prepend_harness #(.HDR_BYTES(20)) h_ip  (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  hdr_prepend_harness #(.HDR_BYTES(14)) h_eth (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  hdr_prepend_harness #(.HDR_BYTES(8))  h_8   (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
