// Testbench of ip_tx: pieces with random descriptors and payloads go in, with
// random back-pressure on the packet output and on the destination handed to
// the Ethernet core. Each packet must be the 20-byte IPv4 header worked out
// here (checksum included) followed by the payload, and each destination
// must come out once, in order. A 1480-byte piece at full rate must leave in
// 188 beats without a gap.
module tb_ip_tx;
  import injector_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] cfg_src_ip = 32'h0A0B0C0D;
  logic frag_valid, frag_ready, in_valid, in_ready, meta_valid, meta_ready, out_valid, out_ready;
  frag_desc_t frag;
  beat_t in, out;
  logic [31:0] meta_dest_ip;
  int checks = 0, failures = 0;
  int bp_pct = 30;

  ip_tx dut (.*);
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
  int unsigned  e_dst[$];
  int got = 0, cyc = 0, t_first = -1, t_last = 0, beats = 0;

  always @(posedge clk) begin
    cyc++;
    out_ready  <= ($urandom_range(0, 99) >= bp_pct);
    meta_ready <= ($urandom_range(0, 99) >= bp_pct);
  end

  always @(posedge clk) if (rst_n && meta_valid && meta_ready) begin
    check(e_dst.size() > 0 && meta_dest_ip == e_dst[0], "meta destination");
    if (e_dst.size() > 0) void'(e_dst.pop_front());
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
    frag.payload_len = 16'(len);
    frag.frag_off    = 13'($urandom);
    frag.more_frags  = 1'($urandom);
    frag.ident       = 16'($urandom);
    frag.dest_ip     = $urandom;
    h = ip_hdr(len, frag.ident, frag.more_frags, frag.frag_off, cfg_src_ip, frag.dest_ip);
    foreach (h[i]) e_bytes.push_back(h[i]);
    for (int i = 0; i < len; i++) begin m.push_back(8'($urandom)); e_bytes.push_back(m[i]); end
    e_len.push_back(len + 20);
    e_dst.push_back(frag.dest_ip);
    frag_valid = 1;
    do begin #1; taken = frag_ready; @(posedge clk); #1; end while (!taken);
    frag_valid = 0;
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
    frag_valid = 0; in_valid = 0; frag = '0; in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 150; k++) send($urandom_range(1, 400), 20);
    send(1480, 0);
    repeat (30) @(posedge clk);
    bp_pct = 0;
    repeat (3) @(posedge clk); #1;
    t_first = -1; beats = 0;
    send(1480, 0);
    repeat (30) @(posedge clk);
    check(beats == 188 && t_last - t_first + 1 == 188, $sformatf("%0d beats in %0d cycles", beats, t_last - t_first + 1));
    check(e_len.size() == 0 && e_dst.size() == 0, "packets missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
