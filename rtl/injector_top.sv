// 10 Gigabit Ethernet data injector: sends events to the HLT farm as a readout board would.
//
// Triggers (event ID and destination HLT node) come either from the trigger
// emulator or, when cfg_ext_trigger is set, from an external TTC receiver on
// the ext_trig_* ports. They enter the trigger FIFO at once, one per cycle if
// need be; a trigger that finds the FIFO full is lost and counted in
// stat_trig_dropped. The events then pass a four-stage pipeline, every stage
// working on its own packet at the same time:
//   reading       event_source   dummy event data on request
//   formatting    mep_core       cfg_pf events per Multi-Event Packet (MEP)
//   encapsulating ip_fragmenter  MEP cut into pieces of MAX_IP_PAYLOAD bytes
//                 ip_tx          IPv4 header, protocol MEP, no fragmentation
//                 eth_tx         Ethernet II header
//   sending       tx_*           Avalon-ST stream to the 10GbE MAC (outside)
// Packets move as 64-bit beats; at 156.25 MHz one beat per cycle is 10 Gb/s.
// tx_ready from the MAC holds the whole pipeline back; the trigger FIFO is the
// only place where a trigger can wait. All of it runs on one clock with a
// synchronous active-low reset. The pipeline, the fragmentation before a
// send-only IP core and the MEP/IP/Ethernet stack follow the document; the
// configuration ports stand in for the control system, whose interface the
// document does not give.
module injector_top
  import injector_pkg::*;
#(
  parameter int unsigned MAX_PF          = 16,
  parameter int unsigned TRIG_FIFO_DEPTH = 64,
  parameter int unsigned MAX_IP_PAYLOAD  = 1480
) (
  input  logic        clk,
  input  logic        rst_n,
  // run configuration
  input  logic        cfg_enable,          // trigger emulator on
  input  logic        cfg_ext_trigger,     // 1: take triggers from ext_trig_*
  input  logic [31:0] cfg_trig_period,
  input  logic [31:0] cfg_trig_count,
  input  logic [31:0] cfg_first_id,
  input  logic [15:0] cfg_pf,
  input  logic [15:0] cfg_nodes,
  input  logic [31:0] cfg_base_ip,
  input  logic [31:0] cfg_partition,
  input  logic [15:0] cfg_len_base,
  input  logic [15:0] cfg_len_mask,
  input  logic [31:0] cfg_src_ip,
  input  logic [47:0] cfg_src_mac,
  input  logic [23:0] cfg_dst_mac_prefix,
  // external trigger (TTC receiver)
  input  logic        ext_trig_valid,
  input  logic [31:0] ext_trig_event_id,
  input  logic [31:0] ext_trig_dest_ip,
  // transmit stream to the 10GbE MAC
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [63:0] tx_data,
  output logic        tx_sop,
  output logic        tx_eop,
  output logic [2:0]  tx_empty,
  // counters
  output logic [31:0] stat_trig_accepted,
  output logic [31:0] stat_trig_dropped,
  output logic [31:0] stat_meps,
  output logic [31:0] stat_frames,
  output logic [31:0] stat_trig_issued,     // triggers made by the emulator
  output logic [$clog2(TRIG_FIFO_DEPTH):0] stat_trig_fifo_level
);
  // ---- trigger input ----
  logic     emu_valid;
  trigger_t emu_trig;

  trigger_emulator u_trig_emu (
    .clk, .rst_n,
    .cfg_enable(cfg_enable && !cfg_ext_trigger), .cfg_period(cfg_trig_period),
    .cfg_count(cfg_trig_count), .cfg_first_id, .cfg_pf, .cfg_nodes, .cfg_base_ip,
    .trig_valid(emu_valid), .trig(emu_trig), .issued(stat_trig_issued)
  );

  logic     t_valid, t_ready;
  trigger_t t_in;
  always_comb begin
    if (cfg_ext_trigger) begin
      t_valid       = ext_trig_valid;
      t_in.event_id = ext_trig_event_id;
      t_in.dest_ip  = ext_trig_dest_ip;
    end else begin
      t_valid = emu_valid;
      t_in    = emu_trig;
    end
  end

  logic     q_valid, q_ready;
  trigger_t q_trig;

  sync_fifo #(.T(trigger_t), .DEPTH(TRIG_FIFO_DEPTH)) u_trig_fifo (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_in),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_trig),
    .count(stat_trig_fifo_level)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_trig_accepted <= '0;
      stat_trig_dropped  <= '0;
      stat_frames        <= '0;
    end else begin
      if (t_valid &&  t_ready) stat_trig_accepted <= stat_trig_accepted + 1;
      if (t_valid && !t_ready) stat_trig_dropped  <= stat_trig_dropped + 1;
      if (tx_valid && tx_ready && tx_eop) stat_frames <= stat_frames + 1;
    end
  end

  // ---- reading and formatting ----
  logic [31:0] len_id, req_id;
  logic [15:0] len_bytes;
  logic        req_valid, req_ready, body_valid, body_ready;
  beat_t       body;

  event_source u_src (
    .clk, .rst_n, .cfg_len_base, .cfg_len_mask,
    .len_id, .len_bytes,
    .req_valid, .req_ready, .req_id,
    .out_valid(body_valid), .out_ready(body_ready), .out(body)
  );

  logic      md_valid, md_ready, mep_valid, mep_ready;
  mep_desc_t md;
  beat_t     mep;

  mep_core #(.MAX_PF(MAX_PF), .MAX_MEP_BYTES(65535 - IP_HDR_BYTES)) u_mep (
    .clk, .rst_n, .cfg_pf, .cfg_partition,
    .trig_valid(q_valid), .trig_ready(q_ready), .trig(q_trig),
    .len_id, .len_bytes, .req_valid, .req_ready, .req_id,
    .body_valid, .body_ready, .body,
    .desc_valid(md_valid), .desc_ready(md_ready), .desc(md),
    .out_valid(mep_valid), .out_ready(mep_ready), .out(mep),
    .meps_sent(stat_meps)
  );

  // ---- encapsulation ----
  logic       fd_valid, fd_ready, fr_valid, fr_ready;
  frag_desc_t fd;
  beat_t      fr;

  ip_fragmenter #(.MAX_PAYLOAD(MAX_IP_PAYLOAD)) u_frag (
    .clk, .rst_n,
    .desc_valid(md_valid), .desc_ready(md_ready), .desc(md),
    .in_valid(mep_valid), .in_ready(mep_ready), .in(mep),
    .frag_valid(fd_valid), .frag_ready(fd_ready), .frag(fd),
    .out_valid(fr_valid), .out_ready(fr_ready), .out(fr)
  );

  logic        ip_valid, ip_ready, meta_valid, meta_ready;
  logic [31:0] meta_dest;
  beat_t       ip;

  ip_tx u_ip (
    .clk, .rst_n, .cfg_src_ip,
    .frag_valid(fd_valid), .frag_ready(fd_ready), .frag(fd),
    .in_valid(fr_valid), .in_ready(fr_ready), .in(fr),
    .meta_valid, .meta_ready, .meta_dest_ip(meta_dest),
    .out_valid(ip_valid), .out_ready(ip_ready), .out(ip)
  );

  beat_t eth;

  eth_tx u_eth (
    .clk, .rst_n, .cfg_src_mac, .cfg_dst_mac_prefix,
    .meta_valid, .meta_ready, .meta_dest_ip(meta_dest),
    .in_valid(ip_valid), .in_ready(ip_ready), .in(ip),
    .out_valid(tx_valid), .out_ready(tx_ready), .out(eth)
  );

  assign tx_data  = eth.data;
  assign tx_sop   = eth.sop;
  assign tx_eop   = eth.eop;
  assign tx_empty = eth.empty;

  // A beat offered to the MAC stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   tx_valid && !tx_ready |=> tx_valid && $stable(eth));

endmodule
