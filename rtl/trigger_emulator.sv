// Trigger emulator: stands in for the TTC trigger of the readout supervisor.
//
// When enabled it accepts one event every cfg_period clock cycles, for
// cfg_count events (0 = without end). Each accepted event gets the next event
// ID, starting from cfg_first_id, and a destination HLT node: the node changes
// after every cfg_pf events (one Multi-Event Packet) and cycles through
// cfg_nodes nodes whose IP addresses follow cfg_base_ip. The trigger is
// offered on trig_valid for one cycle and is not held back: like the real
// TTC signal it does not wait for the injector, so the consumer must take it
// (the top puts a FIFO here and counts what it cannot hold). The document
// asks that trigger information can be emulated before the TTC receiver is
// built; the period/count programming and the node sequence are this
// design's own.
module trigger_emulator
  import injector_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_enable,
  input  logic [31:0] cfg_period,    // cycles between accepts, >= 1
  input  logic [31:0] cfg_count,     // accepts to issue, 0 = unlimited
  input  logic [31:0] cfg_first_id,  // event ID of the first accept
  input  logic [15:0] cfg_pf,        // events per MEP, >= 1
  input  logic [15:0] cfg_nodes,     // number of HLT nodes, >= 1
  input  logic [31:0] cfg_base_ip,   // IP address of node 0
  output logic        trig_valid,
  output trigger_t    trig,
  output logic [31:0] issued         // accepts issued since reset
);
  logic [31:0] timer;
  logic [31:0] next_id;
  logic [15:0] in_pf;     // events already sent to the current node
  logic [15:0] node;
  logic        started;

  wire  more = (cfg_count == 0) || (issued < cfg_count);
  wire  fire = cfg_enable && more && (timer == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer      <= '0;
      next_id    <= '0;
      in_pf      <= '0;
      node       <= '0;
      issued     <= '0;
      started    <= 1'b0;
      trig_valid <= 1'b0;
      trig       <= '0;
    end else begin
      trig_valid <= 1'b0;
      if (!cfg_enable) begin
        timer <= '0;
      end else if (fire) begin
        timer      <= (cfg_period > 1) ? cfg_period - 1 : 32'd0;
        trig_valid <= 1'b1;
        trig.event_id <= started ? next_id : cfg_first_id;
        trig.dest_ip  <= cfg_base_ip + 32'(node);
        next_id    <= (started ? next_id : cfg_first_id) + 1;
        started    <= 1'b1;
        issued     <= issued + 1;
        if (in_pf + 1 >= cfg_pf) begin
          in_pf <= '0;
          node  <= (node + 1 >= cfg_nodes) ? 16'd0 : node + 1;
        end else begin
          in_pf <= in_pf + 1;
        end
      end else if (timer != 0) begin
        timer <= timer - 1;
      end
    end
  end

endmodule
