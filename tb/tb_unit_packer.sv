// Testbench of unit_packer: random packets made of 4-byte and 8-byte pieces,
// with random gaps on the input and random back-pressure on the output. The
// output must carry the same 32-bit units in order, with sop on the first
// beat, eop on the last and empty 4 when the packet has an odd number of
// units. A packet of 8-byte pieces at full rate must leave at one beat per
// cycle.
module tb_unit_packer;
  import injector_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_two, in_last, out_valid, out_ready;
  logic [63:0] in_data;
  beat_t out;
  int checks = 0, failures = 0;

  unit_packer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected units of each packet, and what the output delivered.
  logic [31:0] exp_units[$];
  int          exp_ends[$];     // unit count of each packet
  logic [31:0] got_units[$];
  int          pkt_units = 0;
  bit          in_pkt = 0;
  int          beats_out = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    beats_out++;
    checks++;
    if (out.sop == in_pkt) begin failures++; $display("FAIL sop framing"); end
    in_pkt = !out.eop;
    got_units.push_back(out.data[63:32]);
    pkt_units++;
    if (!(out.eop && out.empty == 3'd4)) begin got_units.push_back(out.data[31:0]); pkt_units++; end
    if (out.eop) begin
      checks++;
      if (exp_ends.size() == 0 || pkt_units != exp_ends[0]) begin
        failures++; $display("FAIL packet of %0d units", pkt_units);
      end
      if (exp_ends.size() != 0) void'(exp_ends.pop_front());
      pkt_units = 0;
      checks++;
      if (out.empty != 3'd0 && out.empty != 3'd4) begin failures++; $display("FAIL empty"); end
    end
  end

  task automatic send_packet(input int pieces, input bit only_two, input int gap_pct, input int bp_pct);
    int units = 0;
    bit taken;
    for (int p = 0; p < pieces; p++) begin
      logic [63:0] d = {$urandom, $urandom};
      bit two = only_two ? 1'b1 : 1'($urandom_range(0, 1));
      while ($urandom_range(0, 99) < gap_pct) begin
        in_valid = 0; out_ready = ($urandom_range(0, 99) >= bp_pct);
        @(posedge clk); #1;
      end
      in_valid = 1; in_data = d; in_two = two; in_last = (p == pieces - 1);
      exp_units.push_back(d[63:32]); units++;
      if (two) begin exp_units.push_back(d[31:0]); units++; end
      do begin
        out_ready = ($urandom_range(0, 99) >= bp_pct);
        #1;
        taken = in_ready;
        @(posedge clk); #1;
      end while (!taken);
    end
    in_valid = 0;
    exp_ends.push_back(units);
  endtask

  initial begin
    int t0;
    in_valid = 0; in_two = 0; in_last = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 300; k++) send_packet($urandom_range(1, 12), 0, 30, 30);
    // full-rate run: 100 eight-byte pieces with an odd start (a 4-byte piece first)
    out_ready = 1;
    repeat (5) @(posedge clk); #1;
    t0 = beats_out;
    begin
      int c0 = 0;
      for (int p = 0; p < 101; p++) begin
        logic [63:0] d = {$urandom, $urandom};
        in_valid = 1; in_data = d; in_two = (p != 0); in_last = (p == 100);
        exp_units.push_back(d[63:32]);
        if (p != 0) exp_units.push_back(d[31:0]);
        #1; if (!in_ready) c0++;
        @(posedge clk); #1;
      end
      in_valid = 0;
      exp_ends.push_back(201);
      check(c0 == 0, "input stalled at full rate");
    end
    repeat (5) @(posedge clk);
    check(beats_out - t0 == 101, $sformatf("full-rate packet gave %0d beats", beats_out - t0));
    check(got_units.size() == exp_units.size(), $sformatf("units %0d vs %0d", got_units.size(), exp_units.size()));
    for (int i = 0; i < got_units.size() && i < exp_units.size(); i++)
      check(got_units[i] == exp_units[i], $sformatf("unit %0d: %h vs %h", i, got_units[i], exp_units[i]));
    check(exp_ends.size() == 0, "packets missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
