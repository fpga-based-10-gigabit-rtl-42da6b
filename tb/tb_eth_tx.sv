// Testbench of eth_tx: IP packets of random length with random destinations
// go in, with random gaps and random back-pressure from the MAC side. Each
// frame must be the Ethernet II header worked out here (destination MAC from
// the prefix and the low 24 bits of the destination IP, source MAC, EtherType
// 0x0800) followed by the packet. A 1500-byte packet at full rate must leave
// in 190 beats without a gap.
module tb_eth_tx;
  import injector_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [47:0] cfg_src_mac = 48'h0200_1122_3344;
  logic [23:0] cfg_dst_mac_prefix = 24'h02AB_CD;
  logic in_valid, in_ready, meta_valid, meta_ready, out_valid, out_ready;
  beat_t in, out;
  logic [31:0] meta_dest_ip;
  int checks = 0, failures = 0;
  int bp_pct = 30;

  eth_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned e_bytes[$];
  int           e_len[$];
  int got = 0, cyc = 0, t_first = -1, t_last = 0, beats = 0;

  always @(posedge clk) begin
    cyc++;
    out_ready  <= ($urandom_range(0, 99) >= bp_pct);
  end


  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int n;
    n = out.eop ? 8 - int'(out.empty) : 8;
    check(out.sop == (got == 0), "sop");
    if (t_first < 0) t_first = cyc;
    t_last = cyc; beats++;
    for (int b = 0; b < n; b++) begin
      if (e_bytes.size() == 0 || e_bytes[0] != out.data[63 - 8*b -: 8]) begin
        check(0, $sformatf("byte %0d of packet: %h", got + b, out.data[63 - 8*b -: 8])); break;
      end
      void'(e_bytes.pop_front());
    end
    got += n;
    if (out.eop) begin
      check(e_len.size() > 0 && got == e_len[0], $sformatf("packet of %0d bytes", got));
      if (e_len.size() > 0) void'(e_len.pop_front());
      got = 0;
    end
  end

  task automatic send(input int len, input int gap_pct);
    bit taken;
    bytes_t h;
    byte unsigned m[$];
    meta_dest_ip = $urandom;
    h = eth_hdr({cfg_dst_mac_prefix, meta_dest_ip[23:0]}, cfg_src_mac);
    foreach (h[i]) e_bytes.push_back(h[i]);
    for (int i = 0; i < len; i++) begin m.push_back(8'($urandom)); e_bytes.push_back(m[i]); end
    e_len.push_back(len + 14);
    meta_valid = 1;
    do begin #1; taken = meta_ready; @(posedge clk); #1; end while (!taken);
    meta_valid = 0;
    for (int w = 0; w * 8 < len; w++) begin
      while ($urandom_range(0, 99) < gap_pct) begin in_valid = 0; @(posedge clk); #1; end
      in_valid = 1;
      in.data = '0;
      for (int b = 0; b < 8 && w*8 + b < len; b++) in.data[63 - 8*b -: 8] = m[w*8 + b];
      in.sop = (w == 0);
      in.eop = ((w + 1) * 8 >= len);
      in.empty = in.eop ? 3'((8 - len % 8) % 8) : 3'd0;
      do begin #1; taken = in_ready; @(posedge clk); #1; end while (!taken);
    end
    in_valid = 0;
  endtask

  initial begin
    meta_valid = 0; in_valid = 0; meta_dest_ip = '0; in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 150; k++) send($urandom_range(1, 400), 20);
    send(1500, 0);
    repeat (30) @(posedge clk);
    bp_pct = 0;
    repeat (3) @(posedge clk); #1;
    t_first = -1; beats = 0;
    send(1500, 0);
    repeat (30) @(posedge clk);
    check(beats == 190 && t_last - t_first + 1 == 190, $sformatf("%0d beats in %0d cycles", beats, t_last - t_first + 1));
    check(e_len.size() == 0, "packets missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
