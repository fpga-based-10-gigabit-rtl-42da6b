// Workload testbench: sustained streams of 35 kB events (the average LHCb
// event size), one event per MEP, through the injector at its default
// parameters with a MAC that is always ready, at three trigger rates with a
// 156.25 MHz clock:
//   2 kHz     the HLT input rate the injector must exceed
//   34.5 kHz  just below what the injector sends on a 10 Gb/s link
//   40 kHz    above it: triggers queue up in the trigger FIFO
// For each rate it checks that every trigger became one MEP of 24 frames
// with no trigger lost, and how far the trigger FIFO filled: at most one
// waiting trigger below the link rate, a growing queue above it.
module tb_workload_35kb;
  logic clk = 0, rst_n = 0;
  logic        cfg_enable = 0, cfg_ext_trigger = 0;
  logic [31:0] cfg_trig_period = 0, cfg_trig_count = 0, cfg_first_id = 32'h10;
  logic [15:0] cfg_pf = 1, cfg_nodes = 4;
  logic [31:0] cfg_base_ip = 32'h0A_02_00_01, cfg_partition = 32'h1;
  logic [15:0] cfg_len_base = 35000, cfg_len_mask = 0;
  logic [31:0] cfg_src_ip = 32'h0A_00_00_09;
  logic [47:0] cfg_src_mac = 48'h02_00_00_00_00_09;
  logic [23:0] cfg_dst_mac_prefix = 24'h02_00_02;
  logic        ext_trig_valid = 0;
  logic [31:0] ext_trig_event_id = 0, ext_trig_dest_ip = 0;
  logic        tx_valid, tx_ready = 1, tx_sop, tx_eop;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int max_level = 0, frame_bytes = 0, bad_frames = 0, beats = 0;
  always @(posedge clk) if (rst_n) begin
    if (int'(stat_trig_fifo_level) > max_level) max_level = int'(stat_trig_fifo_level);
    if (tx_valid && tx_ready) begin
      beats++;
      frame_bytes += tx_eop ? 8 - int'(tx_empty) : 8;
      if (tx_eop) begin
        // 23 full frames of 1514 bytes, then one of 976 + 34 bytes
        if (frame_bytes != 1514 && frame_bytes != 1010) bad_frames++;
        frame_bytes = 0;
      end
    end
  end

  task automatic run(input int period, input int n, input string name, input bit above);
    int t0, t1;
    rst_n = 0; max_level = 0; bad_frames = 0; beats = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    cfg_trig_period = period; cfg_trig_count = n; cfg_enable = 1;
    t0 = $time;
    wait (stat_meps == 32'(n));
    wait (!tx_valid);
    repeat (50) @(posedge clk); #1;
    t1 = $time;
    cfg_enable = 0;
    $display("%s: %0d events, trigger period %0d cycles, %0d frames, deepest trigger queue %0d",
             name, n, period, stat_frames, max_level);
    check(stat_trig_dropped == 0, {name, ": triggers lost"});
    check(stat_trig_accepted == 32'(n) && stat_meps == 32'(n), {name, ": MEP count"});
    check(stat_frames == 32'(24 * n), {name, ": frame count"});
    check(bad_frames == 0, {name, ": frame sizes"});
    if (above) check(max_level >= n / 10, {name, ": expected a growing trigger queue"});
    else       check(max_level <= 1, {name, ": trigger queue grew below the link rate"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(78125, 3, "2 kHz", 0);       // 156.25 MHz / 2 kHz
    run(4530, 20, "34.5 kHz", 0);    // 156.25 MHz / 4530 = 34.49 kHz
    run(3906, 20, "40 kHz", 1);      // 156.25 MHz / 3906 = 40.0 kHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
