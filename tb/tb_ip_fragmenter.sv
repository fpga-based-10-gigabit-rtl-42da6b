// Testbench of ip_fragmenter at its default piece size of 1480 bytes. MEPs
// of random length (multiples of 4, up to the 65512-byte maximum) and random
// content go in with random gaps; the output sees random back-pressure. For
// each piece the descriptor (payload length, offset in 8-byte units, MF flag,
// identification, destination) and the bytes are compared with the cut
// worked out here. At full rate a piece costs its beats plus one cycle.
module tb_ip_fragmenter;
  import injector_pkg::*;
  localparam int MAXP = 1480;
  logic clk = 0, rst_n = 0;
  logic desc_valid, desc_ready, in_valid, in_ready, frag_valid, frag_ready, out_valid, out_ready;
  mep_desc_t desc;
  frag_desc_t frag;
  beat_t in, out;
  int checks = 0, failures = 0;
  int bp_pct = 30;

  ip_fragmenter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pieces
  int          e_len[$], e_off[$], e_mf[$], e_id[$];
  int unsigned e_dst[$];
  byte unsigned e_bytes[$];
  int          got = 0, cur_len = 0, pieces = 0, cyc = 0, t_first = -1, t_last = 0;
  bit          in_piece = 0;

  always @(posedge clk) begin
    cyc++;
    out_ready  <= ($urandom_range(0, 99) >= bp_pct);
    frag_ready <= ($urandom_range(0, 99) >= bp_pct);
  end

  always @(posedge clk) if (rst_n && frag_valid && frag_ready) begin
    check(!in_piece, "descriptor inside a piece");
    if (e_len.size() == 0) check(0, "unexpected piece");
    else begin
      check(int'(frag.payload_len) == e_len[0], $sformatf("piece len %0d vs %0d", frag.payload_len, e_len[0]));
      check(int'(frag.frag_off) == e_off[0], $sformatf("offset %0d vs %0d", frag.frag_off, e_off[0]));
      check(int'(frag.more_frags) == e_mf[0], "MF");
      check(int'(frag.ident) == e_id[0], "ident");
      check(frag.dest_ip == e_dst[0], "dest");
      cur_len = e_len[0];
      void'(e_len.pop_front()); void'(e_off.pop_front()); void'(e_mf.pop_front());
      void'(e_id.pop_front()); void'(e_dst.pop_front());
      in_piece = 1; got = 0;
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int n;
    n = out.eop ? 8 - int'(out.empty) : 8;
    check(in_piece, "data outside a piece");
    check(out.sop == (got == 0), "sop");
    if (t_first < 0) t_first = cyc;
    t_last = cyc;
    for (int b = 0; b < n; b++) begin
      if (e_bytes.size() == 0 || e_bytes[0] != out.data[63 - 8*b -: 8]) begin
        check(0, $sformatf("byte %0d of piece", got + b)); break;
      end
      void'(e_bytes.pop_front());
    end
    got += n;
    if (out.eop) begin
      check(got == cur_len, $sformatf("piece has %0d bytes, expected %0d", got, cur_len));
      in_piece = 0; pieces++;
    end
  end

  int ident = 0;
  task automatic send_mep(input int len, input int gap_pct);
    bit taken;
    int unsigned dst = $urandom;
    byte unsigned m[$];
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
    for (int off = 0; off < len; off += MAXP) begin
      e_len.push_back(len - off > MAXP ? MAXP : len - off);
      e_off.push_back(off / 8);
      e_mf.push_back(len - off > MAXP);
      e_id.push_back(ident);
      e_dst.push_back(dst);
    end
    foreach (m[i]) e_bytes.push_back(m[i]);
    ident++;
    desc_valid = 1; desc.length = 16'(len); desc.dest_ip = dst;
    do begin #1; taken = desc_ready; @(posedge clk); #1; end while (!taken);
    desc_valid = 0;
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
    desc_valid = 0; in_valid = 0; desc = '0; in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 40; k++) send_mep(4 * $urandom_range(3, 1500), 20);
    send_mep(1480, 10);
    send_mep(1484, 10);
    send_mep(65512, 5);
    repeat (50) @(posedge clk);
    // full rate: 35016-byte MEP = 24 pieces, 4377 beats
    bp_pct = 0;
    repeat (3) @(posedge clk); #1;
    t_first = -1; pieces = 0;
    send_mep(35016, 0);
    repeat (50) @(posedge clk);
    check(pieces == 24, $sformatf("%0d pieces", pieces));
    check(t_last - t_first + 1 <= 4377 + 24, $sformatf("35016-byte MEP took %0d cycles", t_last - t_first + 1));
    check(e_len.size() == 0 && e_bytes.size() == 0, "pieces missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
