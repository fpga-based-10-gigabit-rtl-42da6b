// Testbench of trigger_emulator: two runs with different period, packing
// factor and node count. Checks every trigger's event ID and destination
// node against the expected sequence, the exact spacing of cfg_period
// cycles between triggers, and that exactly cfg_count triggers are issued.
module tb_trigger_emulator;
  import injector_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_enable = 0;
  logic [31:0] cfg_period, cfg_count, cfg_first_id, cfg_base_ip;
  logic [15:0] cfg_pf, cfg_nodes;
  logic trig_valid;
  trigger_t trig;
  logic [31:0] issued;
  int checks = 0, failures = 0;

  trigger_emulator dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int period, input int count, input int pf, input int nodes);
    int seen = 0;
    longint last_cyc = -1, cyc = 0;
    rst_n = 0; cfg_enable = 0;
    cfg_period = period; cfg_count = count; cfg_first_id = 32'h1000_0000 + period;
    cfg_pf = 16'(pf); cfg_nodes = 16'(nodes); cfg_base_ip = 32'h0A00_0100;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; cfg_enable = 1;
    for (int c = 0; c < period * (count + 5) + 20; c++) begin
      @(posedge clk); #1; cyc++;
      if (trig_valid) begin
        check(trig.event_id == cfg_first_id + 32'(seen), $sformatf("event id %h", trig.event_id));
        check(trig.dest_ip == cfg_base_ip + 32'((seen / pf) % nodes),
              $sformatf("dest %h for trigger %0d", trig.dest_ip, seen));
        if (last_cyc >= 0) check(cyc - last_cyc == period, $sformatf("spacing %0d", cyc - last_cyc));
        last_cyc = cyc;
        seen++;
      end
    end
    check(seen == count, $sformatf("issued %0d of %0d", seen, count));
    check(issued == 32'(count), "issued counter");
  endtask

  initial begin
    run(5, 12, 3, 2);
    run(1, 20, 4, 3);
    run(17, 7, 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
