// Testbench of event_source: the length lookup against the length formula
// worked out here, and the body of a series of events with a random out_ready:
// data words, sop/eop/empty and the byte count. With out_ready held high a
// body must take exactly ceil(length/8) cycles.
module tb_event_source;
  import injector_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] cfg_len_base, cfg_len_mask;
  logic [31:0] len_id, req_id;
  logic [15:0] len_bytes;
  logic req_valid, req_ready, out_valid, out_ready;
  beat_t out;
  int checks = 0, failures = 0;

  event_source dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int exp_len(input int unsigned id);
    longint unsigned h = (longint'(id) * 64'h9E3779B1) & 64'hFFFF_FFFF;
    int l = cfg_len_base + 4 * int'((h >> 16) & cfg_len_mask);
    l = l - (l % 4);
    if (l > 65496) l = 65496;
    if (l < 4) l = 4;
    return l;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_event(input int unsigned id, input bit full_rate);
    int len = exp_len(id);
    int off = 0, cycles = 0;
    bit done = 0;
    req_valid = 1; req_id = id;
    check(req_ready, "req_ready while idle");
    @(posedge clk); #1;
    req_valid = 0;
    while (!done) begin
      out_ready = full_rate ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      #1;
      cycles++;
      if (out_valid && out_ready) begin
        check(out.data == {id, 16'h0, 16'(off)}, $sformatf("data %h at %0d", out.data, off));
        check(out.sop == (off == 0), "sop");
        check(out.eop == (len - off <= 8), "eop");
        if (out.eop) begin
          check(out.empty == 3'(8 - (len - off)), "empty");
          done = 1;
        end
        off += 8;
      end
      @(posedge clk); #1;
      if (cycles > 20000) begin check(0, "body never ended"); done = 1; end
    end
    if (full_rate) check(cycles == (len + 7) / 8, $sformatf("body took %0d cycles, len %0d", cycles, len));
    out_ready = 0;
  endtask

  initial begin
    req_valid = 0; out_ready = 0; req_id = 0; len_id = 0;
    cfg_len_base = 16'd100; cfg_len_mask = 16'h3F;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      len_id = $urandom; #1;
      check(int'(len_bytes) == exp_len(len_id), $sformatf("len of %h: %0d", len_id, len_bytes));
    end
    for (int i = 0; i < 20; i++) one_event(32'h100 + i, i % 2);
    cfg_len_base = 16'd35000; cfg_len_mask = 16'h0;
    one_event(32'd7, 1);
    cfg_len_base = 16'd60000; cfg_len_mask = 16'hFFFF;  // clamped to the largest event
    len_id = 32'h1234; #1;
    check(int'(len_bytes) == exp_len(len_id), "clamped length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
