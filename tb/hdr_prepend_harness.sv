// Test harness for one hdr_prepend of a given header size, used by
// tb_hdr_prepend. Sends NPKT packets of random length (1..200 bytes) with
// random headers, random input gaps and random output back-pressure, then a
// run at full rate. The output bytes of each packet must be the header
// followed by the payload, framed by sop/eop with the right empty count; at
// full rate a packet must leave in ceil((HDR_BYTES+len)/8) beats with no
// idle cycle between them.
module hdr_prepend_harness #(
  parameter int HDR_BYTES = 20,
  parameter int NPKT      = 200
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);
  import injector_pkg::*;
  logic hdr_valid, hdr_ready, in_valid, in_ready, out_valid, out_ready;
  logic [8*HDR_BYTES-1:0] hdr;
  beat_t in, out;

  hdr_prepend #(.HDR_BYTES(HDR_BYTES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", HDR_BYTES, what); end
  endtask

  byte unsigned exp_q[$];     // expected output bytes, all packets
  int           exp_len[$];   // bytes per packet
  byte unsigned got[$];
  int           got_len = 0;
  bit           in_pkt = 0;
  int           bp_pct = 30;
  int           out_beats = 0, first_beat_cyc = -1, last_beat_cyc = 0, cyc = 0;

  always @(posedge clk) if (rst_n) cyc++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int n;
    n = out.eop ? 8 - int'(out.empty) : 8;
    check(out.sop == !in_pkt, "sop framing");
    in_pkt = !out.eop;
    out_beats++;
    if (first_beat_cyc < 0) first_beat_cyc = cyc;
    last_beat_cyc = cyc;
    for (int b = 0; b < n; b++) got.push_back(out.data[63 - 8*b -: 8]);
    got_len += n;
    if (out.eop) begin
      check(exp_len.size() > 0 && got_len == exp_len[0], $sformatf("packet length %0d", got_len));
      if (exp_len.size() > 0) void'(exp_len.pop_front());
      got_len = 0;
    end
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 99) >= bp_pct);

  task automatic send(input int len, input int gap_pct);
    byte unsigned pl[$];
    bit taken;
    for (int i = 0; i < HDR_BYTES; i++) begin
      hdr[8*HDR_BYTES-1 - 8*i -: 8] = 8'($urandom);
      exp_q.push_back(hdr[8*HDR_BYTES-1 - 8*i -: 8]);
    end
    for (int i = 0; i < len; i++) begin pl.push_back(8'($urandom)); exp_q.push_back(pl[i]); end
    exp_len.push_back(HDR_BYTES + len);
    hdr_valid = 1;
    do begin #1; taken = hdr_ready; @(posedge clk); #1; end while (!taken);
    hdr_valid = 0;
    for (int w = 0; w * 8 < len; w++) begin
      while ($urandom_range(0, 99) < gap_pct) begin in_valid = 0; @(posedge clk); #1; end
      in_valid = 1;
      in.data  = '0;
      for (int b = 0; b < 8 && w*8 + b < len; b++) in.data[63 - 8*b -: 8] = pl[w*8 + b];
      in.sop   = (w == 0);
      in.eop   = ((w + 1) * 8 >= len);
      in.empty = in.eop ? 3'((8 - len % 8) % 8) : 3'd0;
      do begin #1; taken = in_ready; @(posedge clk); #1; end while (!taken);
    end
    in_valid = 0;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    hdr_valid = 0; in_valid = 0; in = '0; hdr = '0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int k = 0; k < NPKT; k++) send($urandom_range(1, 200), 30);
    repeat (40) @(posedge clk);
    // full rate: back-to-back beats of one long packet
    bp_pct = 0;
    repeat (2) @(posedge clk); #1;
    out_beats = 0; first_beat_cyc = -1;
    send(1001, 0);
    repeat (10) @(posedge clk);
    check(out_beats == (HDR_BYTES + 1001 + 7) / 8, $sformatf("beats %0d", out_beats));
    check(last_beat_cyc - first_beat_cyc + 1 == out_beats, $sformatf("gaps: %0d cycles for %0d beats",
          last_beat_cyc - first_beat_cyc + 1, out_beats));
    check(got.size() == exp_q.size(), $sformatf("bytes %0d vs %0d", got.size(), exp_q.size()));
    for (int i = 0; i < got.size() && i < exp_q.size(); i++)
      if (got[i] != exp_q[i]) begin check(0, $sformatf("byte %0d: %h vs %h", i, got[i], exp_q[i])); break; end
    checks++;
    done = 1;
  end
endmodule
