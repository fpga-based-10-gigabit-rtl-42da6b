// Testbench of sync_fifo: random pushes and pops against a queue model.
// Checks the order and value of every word, the full and empty flags and
// the occupancy count, including pushes while full.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int fulls = 0;

  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // first half: fill-heavy, second half: drain-heavy
      in_valid  = ($urandom_range(0, 99) < (cyc < 1500 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (cyc < 1500 ? 30 : 70));
      in_data   = 16'($urandom);
      #1;
      check(count == ($clog2(DEPTH)+1)'(model.size()), "count");
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      if (out_valid) check(out_data == model[0], $sformatf("data %h exp %h", out_data, model[0]));
      if (!in_ready) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    check(fulls > 0, "FIFO never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
