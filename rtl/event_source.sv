// Event source: the reading stage of the injector, producing dummy event data.
//
// The injector is meant to read simulated events from an external storage
// system; until that storage access exists, this block plays its part with
// generated data. For every event ID it gives a length and a body:
//   length = cfg_len_base + 4 * (H(event_id) & cfg_len_mask), H(x) = (x * 0x9E3779B1) >> 16,
//   rounded down to a multiple of 4 bytes and kept between 4 and 65496 (so one event with its
//   headers fits in one MEP of at most 65515 bytes),
//   body word k (bytes 8k..8k+7) = {event_id, 32-bit byte offset 8k}.
// len_id -> len_bytes is a combinational lookup, the index the MEP core uses
// to size a MEP before sending it. A request (req_valid/req_ready, req_id)
// starts the body; it then streams one 64-bit beat per cycle while out_ready
// is high, sop on the first beat, eop on the last, whose empty is 4 when the
// length is not a multiple of 8. A new request is taken in the cycle after
// the previous eop. Using dummy data and the length formula are this design's
// choices; events are kept 4-byte aligned as LHCb raw data is.
module event_source
  import injector_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_len_base,  // bytes
  input  logic [15:0] cfg_len_mask,  // random part, in 4-byte units
  // length lookup
  input  logic [31:0] len_id,
  output logic [15:0] len_bytes,
  // body request
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_id,
  // body stream
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out
);
  function automatic logic [15:0] ev_len(input logic [31:0] id, input logic [15:0] base,
                                         input logic [15:0] mask);
    logic [15:0] h;
    logic [17:0] l;
    h = 16'((id * 32'h9E3779B1) >> 16);
    l = 18'(base) + 18'({h & mask, 2'b00});
    l[1:0] = 2'b00;
    if (l > 18'd65496) l = 18'd65496;
    if (l < 18'd4)     l = 18'd4;
    return l[15:0];
  endfunction

  assign len_bytes = ev_len(len_id, cfg_len_base, cfg_len_mask);

  logic        busy;
  logic [31:0] cur_id;
  logic [15:0] cur_len;
  logic [15:0] offset;    // byte offset of the beat being offered

  wire [16:0] rest = 17'(cur_len) - 17'(offset);   // bytes left, > 0 while busy
  wire        last = (rest <= 17'd8);

  assign req_ready = !busy;
  assign out_valid = busy;
  always_comb begin
    out.data  = {cur_id, 16'h0, offset};
    out.sop   = (offset == 0);
    out.eop   = last;
    out.empty = last ? 3'(8 - rest[3:0]) : 3'd0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cur_id  <= '0;
      cur_len <= '0;
      offset  <= '0;
    end else if (!busy) begin
      if (req_valid) begin
        busy    <= 1'b1;
        cur_id  <= req_id;
        cur_len <= ev_len(req_id, cfg_len_base, cfg_len_mask);
        offset  <= '0;
      end
    end else if (out_ready) begin
      offset <= offset + 16'd8;
      if (last) busy <= 1'b0;
    end
  end

endmodule
