// End-to-end testbench of the injector at its default parameters.
//
// A MAC model takes the transmit stream with a random tx_ready. Every frame
// is decoded: Ethernet header (MAC addresses, EtherType), IPv4 header
// (version, length, protocol, addresses, checksum), then the IP pieces are
// put back together by identification and offset, and each complete MEP is
// parsed and compared with the reference model built from the event IDs it
// names (the dummy event bodies and lengths are known functions of the ID).
// Phases:
//   A  trigger emulator, 4 events per MEP, three HLT nodes, small events:
//      exact event and destination sequence, IP fragmentation of MEPs
//   B  emulator at one trigger per cycle: the trigger FIFO overflows; every
//      trigger must be either delivered or counted as dropped
//   C  external trigger input, 35 kB events (the average LHCb event): MEPs
//      closed early by the IP size limit, and the event rate at full speed
//      with 156.25 MHz, compared with the 10 Gb/s line rate
// Each mechanism is counted and one that never happened counts as a failure.
module tb_injector_top;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic        cfg_enable = 0, cfg_ext_trigger = 0;
  logic [31:0] cfg_trig_period = 400, cfg_trig_count = 0, cfg_first_id = 32'h0001_0000;
  logic [15:0] cfg_pf = 4, cfg_nodes = 3;
  logic [31:0] cfg_base_ip = 32'h0A_01_00_10, cfg_partition = 32'h0000_BEEF;
  logic [15:0] cfg_len_base = 200, cfg_len_mask = 16'hFF;
  logic [31:0] cfg_src_ip = 32'h0A_00_00_05;
  logic [47:0] cfg_src_mac = 48'h02_00_00_00_00_05;
  logic [23:0] cfg_dst_mac_prefix = 24'h02_00_01;
  logic        ext_trig_valid = 0;
  logic [31:0] ext_trig_event_id = 0, ext_trig_dest_ip = 0;
  logic        tx_valid, tx_ready, tx_sop, tx_eop;
  logic [63:0] tx_data;
  logic [2:0]  tx_empty;
  logic [31:0] stat_trig_accepted, stat_trig_dropped, stat_meps, stat_frames, stat_trig_issued;
  logic [6:0]  stat_trig_fifo_level;

  injector_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- MAC model and frame decoder ----
  int ready_pct = 80;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    tx_ready <= ($urandom_range(0, 99) < ready_pct);
  end

  // mechanism counters
  int n_packed = 0, n_fragmented = 0, n_early_close = 0, n_dropped_seen = 0, n_stall = 0,
      n_ext = 0, n_tail = 0;

  byte unsigned frame[$];
  byte unsigned dgram[$];
  int           dg_ident = -1;
  int unsigned  dg_dst;
  int           meps_ok = 0, frames = 0;
  int unsigned  events_seen[$];   // every event ID delivered, in order
  int unsigned  mep_dst[$];       // destination of every MEP
  int           mep_nev[$];
  int           t_sop = -1, t_eop = 0;

  always @(posedge clk) if (rst_n && tx_valid && !tx_ready) n_stall++;

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    int n;
    n = tx_eop ? 8 - int'(tx_empty) : 8;
    check(tx_sop == (frame.size() == 0), "sop framing");
    if (tx_sop && t_sop < 0) t_sop = cyc;
    for (int b = 0; b < n; b++) frame.push_back(tx_data[63 - 8*b -: 8]);
    if (tx_eop) begin
      t_eop = cyc;
      if (tx_empty != 0) n_tail++;
      decode_frame();
      frame = {};
    end
  end

  function automatic int unsigned be(input byte unsigned q[$], input int at, input int n);
    int unsigned v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | q[at + i];
    return v;
  endfunction

  task automatic decode_frame();
    int unsigned dst_ip, sum = 0;
    int tot, ident, flags_off, off8;
    bit mf;
    frames++;
    if (frame.size() < 34) begin check(0, "runt frame"); return; end
    dst_ip = be(frame, 30, 4);
    check(be(frame, 0, 3) == cfg_dst_mac_prefix && be(frame, 3, 3) == (dst_ip & 24'hFFFFFF),
          "destination MAC");
    check(be(frame, 6, 4) == cfg_src_mac[47:16] && be(frame, 10, 2) == cfg_src_mac[15:0], "source MAC");
    check(be(frame, 12, 2) == 16'h0800, "EtherType");
    check(frame[14] == 8'h45 && frame[22] == 8'd64 && frame[23] == 8'hF2, "IP version/TTL/protocol");
    for (int i = 0; i < 20; i += 2) sum += be(frame, 14 + i, 2);
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    check(sum == 16'hFFFF, "IP checksum");
    check(be(frame, 26, 4) == cfg_src_ip, "source IP");
    tot = be(frame, 16, 2);
    check(tot == frame.size() - 14, $sformatf("IP length %0d in a frame of %0d", tot, frame.size()));
    check(tot <= 1500, "IP packet larger than the MTU");
    ident = be(frame, 18, 2);
    flags_off = be(frame, 20, 2);
    mf = flags_off[13];
    off8 = flags_off & 16'h1FFF;
    if (off8 == 0) begin
      check(dgram.size() == 0, "new datagram before the previous one ended");
      dgram = {}; dg_ident = ident; dg_dst = dst_ip;
    end else begin
      check(ident == dg_ident && dst_ip == dg_dst, "piece of another datagram");
      check(off8 * 8 == dgram.size(), $sformatf("piece offset %0d, have %0d", off8 * 8, dgram.size()));
      n_fragmented += (off8 * 8 == 1480);   // second piece of a datagram
    end
    for (int i = 34; i < frame.size(); i++) dgram.push_back(frame[i]);
    if (!mf) begin
      check_mep();
      dgram = {};
    end
  endtask

  // Parse one MEP, rebuild its event IDs and compare it with the model.
  task automatic check_mep();
    int unsigned first_id, prev, ids[$];
    int n, total, at;
    bytes_t exp;
    first_id = be(dgram, 0, 4);
    n = be(dgram, 4, 2);
    total = be(dgram, 6, 2);
    check(total == dgram.size(), $sformatf("MEP length %0d, received %0d", total, dgram.size()));
    check(be(dgram, 8, 4) == cfg_partition, "partition ID");
    at = 12; prev = first_id - 1;
    for (int e = 0; e < n && at + 4 <= dgram.size(); e++) begin
      int unsigned lo = be(dgram, at, 2), id;
      int l = be(dgram, at + 2, 2);
      id = prev + 1;
      while ((id & 16'hFFFF) != lo) id++;   // next ID with these low bits
      if (e == 0) check(id == first_id, "first event ID");
      ids.push_back(id);
      events_seen.push_back(id);
      prev = id;
      at += 4 + l;
    end
    exp = mep(ids, cfg_len_base, cfg_len_mask, cfg_partition);
    check(exp.size() == dgram.size(), "MEP size against model");
    for (int i = 0; i < exp.size() && i < dgram.size(); i++)
      if (exp[i] != dgram[i]) begin check(0, $sformatf("MEP byte %0d", i)); break; end
    if (n > 1) n_packed++;
    mep_dst.push_back(dg_dst);
    mep_nev.push_back(n);
    meps_ok++;
  endtask

  task automatic wait_idle(input int quiet);
    int last = frames, q = 0;
    while (q < quiet) begin
      @(posedge clk);
      if (frames != last) begin last = frames; q = 0; end else q++;
    end
    #1;
  endtask

  initial begin
    int a0, d0, ev0, m0;
    tx_ready = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;

    // ---- A: emulator, pf 4, three nodes ----
    cfg_trig_count = 24; cfg_enable = 1;
    wait (stat_trig_accepted == 24);
    wait_idle(3000);
    cfg_enable = 0;
    check(stat_trig_dropped == 0, "drops in phase A");
    check(events_seen.size() == 24, $sformatf("phase A delivered %0d events", events_seen.size()));
    for (int i = 0; i < events_seen.size(); i++)
      check(events_seen[i] == cfg_first_id + i, $sformatf("event %0d is %h", i, events_seen[i]));
    check(mep_dst.size() == 6, $sformatf("phase A gave %0d MEPs", mep_dst.size()));
    foreach (mep_dst[i]) check(mep_dst[i] == cfg_base_ip + (i % 3), $sformatf("MEP %0d destination", i));

    // ---- B: one trigger per cycle overflows the trigger FIFO ----
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    events_seen = {}; mep_dst = {}; frames = 0;
    cfg_pf = 1; cfg_len_base = 64; cfg_len_mask = 16'h3; cfg_trig_period = 1; cfg_trig_count = 300;
    cfg_first_id = 32'h0002_0000;
    cfg_enable = 1;
    wait (stat_trig_accepted + stat_trig_dropped == 300);
    wait_idle(2000);
    cfg_enable = 0;
    n_dropped_seen = stat_trig_dropped;
    check(events_seen.size() == stat_trig_accepted, $sformatf("delivered %0d, accepted %0d",
          events_seen.size(), stat_trig_accepted));
    for (int i = 1; i < events_seen.size(); i++) check(events_seen[i] > events_seen[i-1], "event order");
    check(stat_meps == stat_trig_accepted, "one MEP per event with pf 1");
    check(stat_frames == 32'(frames), "frame counter");

    // ---- C: external triggers, 35 kB events, full speed ----
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    events_seen = {}; mep_dst = {}; mep_nev = {};
    ready_pct = 100;
    cfg_ext_trigger = 1; cfg_len_base = 35000; cfg_len_mask = 0; cfg_pf = 2;
    repeat (3) @(posedge clk); #1;
    t_sop = -1;
    for (int i = 0; i < 2; i++) begin
      ext_trig_valid = 1; ext_trig_event_id = 32'h0003_0000 + i; ext_trig_dest_ip = 32'h0A_01_00_40 + i;
      n_ext++;
      @(posedge clk); #1;
    end
    ext_trig_valid = 0;
    repeat (10) @(posedge clk); #1;
    // Two 35 kB events do not fit one MEP: the first MEP must have left with
    // one event while the packing factor was still 2.
    if (t_sop >= 0) n_early_close++;
    cfg_pf = 1;                        // the second event now fills its MEP
    wait_idle(3000);
    check(events_seen.size() == 2 && mep_nev.size() == 2, "phase C: two MEPs of one event");
    check(mep_dst.size() == 2 && mep_dst[0] == 32'h0A_01_00_40 && mep_dst[1] == 32'h0A_01_00_41,
          "phase C destinations");
    begin
      real cycles, rate_khz;
      cycles = real'(t_eop - t_sop + 1);
      rate_khz = 2.0 * 156.25e3 / cycles;
      // 2 x 35016 bytes of MEP in 24 frames each; at most 5 % above 8 bytes per cycle
      $display("35 kB events: %0d cycles for 2 events, %.1f kHz at 156.25 MHz", t_eop - t_sop + 1, rate_khz);
      check(cycles <= 1.05 * (2.0 * (35016 + 24 * 34) / 8.0), "full-speed event rate");
      check(rate_khz > 33.0, "event rate of 35 kB events below 33 kHz");
    end

    // ---- mechanisms ----
    $display("packed %0d, fragmented %0d, early close %0d, dropped %0d, stalls %0d, ext %0d, tails %0d",
             n_packed, n_fragmented, n_early_close, n_dropped_seen, n_stall, n_ext, n_tail);
    check(n_packed > 0, "no MEP with several events");
    check(n_fragmented > 0, "no fragmented MEP");
    check(n_early_close > 0, "no MEP closed by the size limit");
    check(n_dropped_seen > 0, "trigger FIFO never overflowed");
    check(n_stall > 0, "MAC never stalled the stream");
    check(n_ext > 0, "external triggers never used");
    check(n_tail > 0, "no frame ended in a partial beat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
