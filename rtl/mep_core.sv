// MEP core: the formatting stage, packing accepted events into Multi-Event Packets.
//
// A MEP carries the data of up to cfg_pf consecutive events for one HLT node:
//   MEP header (12 bytes): event ID of the first event (32), number of
//     events (16), MEP length in bytes, header included (16), partition ID (32)
//   then per event: fragment header (4 bytes): low 16 bits of the event ID,
//     body length in bytes (16); followed by the event body.
// Control unit: a state machine that first collects the triggers of one MEP
// from the trigger queue, one per cycle, looking each event's length up in
// the event source; it stops early when one more event would push the MEP
// past MAX_MEP_BYTES, the most an IPv4 datagram can carry. It then offers a
// descriptor (length, destination) to the fragmentation module, and sends the
// header, the fragment headers and the bodies it requests from the event
// source. Processing unit: the trigger and length registers, the length sum
// and a unit packer that turns the 4-byte and 8-byte pieces into 64-bit beats.
// Bodies flow at one beat per cycle; each MEP costs pf collect cycles, two
// header cycles and one cycle per event. The destination is that of the
// first event of the MEP.
// The document gives the role of the MEP core (format events to the MEP
// protocol, with fragmentation at its output, done by ip_fragmenter); the
// header layout follows the LHCb MEP convention and the rest is this design's.
module mep_core
  import injector_pkg::*;
#(
  parameter int unsigned MAX_PF        = 16,
  parameter int unsigned MAX_MEP_BYTES = 65515   // 65535 minus the IP header
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_pf,          // events per MEP, 1..MAX_PF
  input  logic [31:0] cfg_partition,
  // accepted triggers
  input  logic        trig_valid,
  output logic        trig_ready,
  input  trigger_t    trig,
  // event source
  output logic [31:0] len_id,
  input  logic [15:0] len_bytes,
  output logic        req_valid,
  input  logic        req_ready,
  output logic [31:0] req_id,
  input  logic        body_valid,
  output logic        body_ready,
  input  beat_t       body,
  // MEP descriptor and MEP stream to the fragmentation module
  output logic        desc_valid,
  input  logic        desc_ready,
  output mep_desc_t   desc,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out,
  output logic [31:0] meps_sent
);
  localparam int unsigned IW = $clog2(MAX_PF + 1);   // counts 0..MAX_PF
  localparam int unsigned AW = $clog2(MAX_PF);       // indexes 0..MAX_PF-1

  typedef enum logic [2:0] {S_COLLECT, S_DESC, S_HDR0, S_HDR1, S_FHDR, S_BODY} state_t;
  state_t state;

  logic [31:0] ids  [MAX_PF];
  logic [15:0] lens [MAX_PF];
  logic [IW-1:0] n_ev;      // events in this MEP
  logic [IW-1:0] ev;        // event being sent
  logic [16:0]   total;     // MEP length so far
  logic [31:0]   dest;
  logic [31:0]   first_id;

  // packer input
  logic        pk_valid, pk_ready, pk_two, pk_last;
  logic [63:0] pk_data;

  unit_packer u_pack (
    .clk, .rst_n,
    .in_valid(pk_valid), .in_ready(pk_ready), .in_data(pk_data), .in_two(pk_two),
    .in_last(pk_last),
    .out_valid, .out_ready, .out
  );

  wire [15:0] pf_lim   = (cfg_pf == 0) ? 16'd1 : (cfg_pf > 16'(MAX_PF) ? 16'(MAX_PF) : cfg_pf);
  wire [17:0] with_new = 18'(total) + 18'(len_bytes) + 18'(FRAG_HDR_BYTES);
  wire        fits     = (n_ev == 0) || (with_new <= 18'(MAX_MEP_BYTES));
  wire        full     = (16'(n_ev) >= pf_lim);

  assign len_id     = trig.event_id;
  assign trig_ready = (state == S_COLLECT) && !full && fits;
  assign desc_valid = (state == S_DESC);
  assign desc.length  = total[15:0];
  assign desc.dest_ip = dest;
  assign req_id     = ids[AW'(ev)];
  assign req_valid  = (state == S_FHDR) && pk_ready;
  assign body_ready = (state == S_BODY) && pk_ready;

  always_comb begin
    pk_valid = 1'b0;
    pk_data  = '0;
    pk_two   = 1'b1;
    pk_last  = 1'b0;
    unique case (state)
      S_HDR0: begin
        pk_valid = 1'b1;
        pk_data  = {first_id, 16'(n_ev), total[15:0]};
      end
      S_HDR1: begin
        pk_valid = 1'b1;
        pk_data  = {cfg_partition, 32'h0};
        pk_two   = 1'b0;
      end
      S_FHDR: begin
        pk_valid = req_ready;
        pk_data  = {ids[AW'(ev)][15:0], lens[AW'(ev)], 32'h0};
        pk_two   = 1'b0;
      end
      S_BODY: begin
        pk_valid = body_valid;
        pk_data  = body.data;
        pk_two   = !(body.eop && body.empty == 3'd4);
        pk_last  = body.eop && (ev == n_ev - 1'b1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      n_ev      <= '0;
      ev        <= '0;
      total     <= 17'(MEP_HDR_BYTES);
      dest      <= '0;
      first_id  <= '0;
      meps_sent <= '0;
    end else begin
      unique case (state)
        S_COLLECT: begin
          if (trig_valid && trig_ready) begin
            ids[AW'(n_ev)]  <= trig.event_id;
            lens[AW'(n_ev)] <= len_bytes;
            total      <= with_new[16:0];
            n_ev       <= n_ev + 1'b1;
            if (n_ev == 0) begin
              dest     <= trig.dest_ip;
              first_id <= trig.event_id;
            end
          end else if (n_ev != 0 && (full || (trig_valid && !fits))) begin
            state <= S_DESC;
          end
        end
        S_DESC:  if (desc_ready) state <= S_HDR0;
        S_HDR0:  if (pk_ready) state <= S_HDR1;
        S_HDR1:  if (pk_ready) begin state <= S_FHDR; ev <= '0; end
        S_FHDR:  if (pk_valid && pk_ready) state <= S_BODY;
        S_BODY: begin
          if (body_valid && body_ready && body.eop) begin
            if (ev == n_ev - 1'b1) begin
              state     <= S_COLLECT;
              n_ev      <= '0;
              total     <= 17'(MEP_HDR_BYTES);
              meps_sent <= meps_sent + 1;
            end else begin
              ev    <= ev + 1'b1;
              state <= S_FHDR;
            end
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  // A MEP never outgrows one IP datagram, and a descriptor holds while offered.
  assert property (@(posedge clk) disable iff (!rst_n) total <= 17'(MAX_MEP_BYTES));
  assert property (@(posedge clk) disable iff (!rst_n)
                   desc_valid && !desc_ready |=> desc_valid && $stable(desc));

  initial assert (MAX_PF >= 2) else $error("mep_core: MAX_PF must be at least 2");

endmodule
