// Testbench of mep_core with the dummy event_source behind it. Triggers
// arrive with random gaps and the output sees random back-pressure. Every
// MEP descriptor (length, destination) and every MEP byte is compared with
// the reference model for the expected grouping of events: cfg_pf events per
// MEP, or fewer when large events would overflow the 65515-byte limit. A
// large MEP at full rate must stream at one beat per cycle plus the fixed
// header overhead.
module tb_mep_core;
  import injector_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] cfg_pf, cfg_len_base, cfg_len_mask;
  logic [31:0] cfg_partition;
  logic trig_valid, trig_ready;
  trigger_t trig;
  logic [31:0] len_id, req_id, meps_sent;
  logic [15:0] len_bytes;
  logic req_valid, req_ready, body_valid, body_ready;
  beat_t body;
  logic desc_valid, desc_ready, out_valid, out_ready;
  mep_desc_t desc;
  beat_t out;
  int checks = 0, failures = 0;
  int bp_pct = 30;

  event_source u_src (.clk, .rst_n, .cfg_len_base, .cfg_len_mask, .len_id, .len_bytes,
                      .req_valid, .req_ready, .req_id,
                      .out_valid(body_valid), .out_ready(body_ready), .out(body));
  mep_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t   exp_bytes;       // all expected MEPs, back to back
  int       exp_sizes[$];
  int       exp_dest[$];
  bytes_t   cur;
  int       cyc = 0, first_cyc = 0, last_cyc = 0;

  always @(posedge clk) begin
    cyc++;
    out_ready <= ($urandom_range(0, 99) >= bp_pct);
    desc_ready <= ($urandom_range(0, 99) >= bp_pct);
  end

  always @(posedge clk) if (rst_n && desc_valid && desc_ready) begin
    check(exp_sizes.size() > 0, "unexpected descriptor");
    if (exp_sizes.size() > 0) begin
      check(int'(desc.length) == exp_sizes[0], $sformatf("desc length %0d vs %0d", desc.length, exp_sizes[0]));
      check(int'(desc.dest_ip) == exp_dest[0], "desc dest");
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int n;
    n = out.eop ? 8 - int'(out.empty) : 8;
    if (out.sop) begin check(cur.size() == 0, "sop inside packet"); first_cyc = cyc; end
    for (int b = 0; b < n; b++) cur.push_back(out.data[63 - 8*b -: 8]);
    if (out.eop) begin
      last_cyc = cyc;
      if (exp_sizes.size() == 0) check(0, "unexpected MEP");
      else begin
        int sz;
        sz = exp_sizes.pop_front();
        void'(exp_dest.pop_front());
        check(cur.size() == sz, $sformatf("MEP size %0d vs %0d", cur.size(), sz));
        for (int i = 0; i < sz; i++) begin
          if (exp_bytes.size() == 0) break;
          if (i < cur.size() && cur[i] != exp_bytes[0]) begin
            check(0, $sformatf("MEP byte %0d: %h vs %h", i, cur[i], exp_bytes[0]));
            i = sz;
          end
          void'(exp_bytes.pop_front());
        end
        checks++;
      end
      cur = {};
    end
  end

  task automatic add_mep(input int unsigned grp[$]);
    bytes_t m = mep(grp, cfg_len_base, cfg_len_mask, cfg_partition);
    exp_sizes.push_back(m.size());
    foreach (m[i]) exp_bytes.push_back(m[i]);
  endtask

  // Events collected by the model for a MEP that is not closed yet.
  int unsigned grp[$];
  int          grp_total = 12;
  int unsigned grp_dst;

  // Sends n triggers starting at id0 and works out the MEPs they close: a MEP
  // closes when it holds pf events, or when the next event would not fit.
  task automatic run(input int unsigned id0, input int n, input int pf, input int gap_pct);
    for (int i = 0; i < n; i++) begin
      int unsigned id = id0 + i;
      int l = ev_len(id, cfg_len_base, cfg_len_mask);
      if (grp.size() > 0 && grp_total + l + 4 > 65515) begin
        add_mep(grp); exp_dest.push_back(grp_dst);
        grp = {}; grp_total = 12;
      end
      if (grp.size() == 0) grp_dst = 32'h0A000000 + id;
      grp.push_back(id); grp_total += l + 4;
      if (grp.size() == pf) begin
        add_mep(grp); exp_dest.push_back(grp_dst);
        grp = {}; grp_total = 12;
      end
    end
    cfg_pf = 16'(pf);
    for (int i = 0; i < n; i++) begin
      bit taken;
      while ($urandom_range(0, 99) < gap_pct) begin trig_valid = 0; @(posedge clk); #1; end
      trig_valid = 1; trig.event_id = id0 + i; trig.dest_ip = 32'h0A000000 + id0 + i;
      do begin #1; taken = trig_ready; @(posedge clk); #1; end while (!taken);
    end
    trig_valid = 0;
    while (exp_sizes.size() > 0 && cyc < 350000) @(posedge clk);
    repeat (5) @(posedge clk); #1;
  endtask

  initial begin
    trig_valid = 0; trig = '0; cfg_pf = 1; cfg_partition = 32'hCAFE_0001;
    cfg_len_base = 16'd40; cfg_len_mask = 16'h1F;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(32'h100, 40, 4, 30);     // small events, 4 per MEP
    run(32'h200, 13, 1, 50);     // one event per MEP
    run(32'h300, 32, 16, 10);    // largest packing factor
    cfg_len_base = 16'd35000; cfg_len_mask = 16'h0;
    run(32'h400, 4, 2, 0);       // two 35 kB events never fit one MEP: MEPs close early
    // full rate: the fifth event closes the MEP of the fourth, which is timed
    bp_pct = 0;
    repeat (3) @(posedge clk); #1;
    run(32'h404, 1, 2, 0);
    check(last_cyc - first_cyc + 1 <= (35000 + 16 + 7) / 8 + 3,
          $sformatf("35 kB MEP took %0d cycles", last_cyc - first_cyc + 1));
    check(meps_sent == 32'(10 + 13 + 2 + 3 + 1), $sformatf("meps_sent %0d", meps_sent));
    check(exp_sizes.size() == 0, "MEPs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
