// Fragmentation module at the output of the MEP core.
//
// The IP core of this injector does not fragment: the MEP stream is cut into
// IP-sized pieces before it reaches it, so that no stage has to buffer a whole
// datagram. For each MEP (descriptor: length, destination) the module takes
// a new IP identification and cuts the stream into pieces of MAX_PAYLOAD bytes
// (the last one shorter). Before each piece it offers, on frag_valid/
// frag_ready, the header information the IP core needs to keep all pieces of
// one datagram consistent: payload length, offset in 8-byte units,
// more-fragments flag, identification and destination. The piece itself then
// passes through with its own sop/eop/empty. MAX_PAYLOAD is a multiple of 8,
// so every cut falls on a beat boundary and the data path is a plain
// pass-through: one beat per cycle, no added latency, one idle cycle per piece
// for the descriptor handshake.
// The document places fragmentation at the MEP core output and asks for the
// extra header signals; the piece size (a 1500-byte Ethernet MTU less the IP
// header) and the handshake are this design's choices.
module ip_fragmenter
  import injector_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD = 1480   // bytes, multiple of 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        desc_valid,
  output logic        desc_ready,
  input  mep_desc_t   desc,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in,
  output logic        frag_valid,
  input  logic        frag_ready,
  output frag_desc_t  frag,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out
);
  typedef enum logic [1:0] {S_IDLE, S_FDESC, S_DATA} state_t;
  state_t state;

  logic [15:0] remaining;   // bytes of the MEP not yet sent
  logic [15:0] offset;      // bytes of the MEP already sent
  logic [15:0] plen;        // payload of the current piece
  logic [12:0] words_left;
  logic        first;
  logic [31:0] dest;
  logic [15:0] ident, next_ident;

  wire [15:0] piece = (remaining > 16'(MAX_PAYLOAD)) ? 16'(MAX_PAYLOAD) : remaining;
  wire        last_word = (words_left == 13'd1);

  assign desc_ready = (state == S_IDLE);
  assign frag_valid = (state == S_FDESC);
  always_comb begin
    frag.payload_len = piece;
    frag.frag_off    = offset[15:3];
    frag.more_frags  = (remaining > 16'(MAX_PAYLOAD));
    frag.ident       = ident;
    frag.dest_ip     = dest;
  end

  assign in_ready  = (state == S_DATA) && out_ready;
  assign out_valid = (state == S_DATA) && in_valid;
  always_comb begin
    out.data  = in.data;
    out.sop   = first;
    out.eop   = last_word;
    out.empty = last_word ? 3'(3'd0 - plen[2:0]) : 3'd0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      remaining  <= '0;
      offset     <= '0;
      plen       <= '0;
      words_left <= '0;
      first      <= 1'b0;
      dest       <= '0;
      ident      <= '0;
      next_ident <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (desc_valid) begin
          remaining  <= desc.length;
          offset     <= '0;
          dest       <= desc.dest_ip;
          ident      <= next_ident;
          next_ident <= next_ident + 1'b1;
          state      <= S_FDESC;
        end
        S_FDESC: if (frag_ready) begin
          plen       <= piece;
          words_left <= 13'((piece + 16'd7) >> 3);
          first      <= 1'b1;
          state      <= S_DATA;
        end
        S_DATA: if (in_valid && out_ready) begin
          first      <= 1'b0;
          words_left <= words_left - 1'b1;
          if (last_word) begin
            remaining <= remaining - plen;
            offset    <= offset + plen;
            state     <= (remaining == plen) ? S_IDLE : S_FDESC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The MEP must end exactly where its descriptor says.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready |-> in.eop == (last_word && remaining == plen));

  initial assert (MAX_PAYLOAD % 8 == 0 && MAX_PAYLOAD >= 8)
    else $error("ip_fragmenter: MAX_PAYLOAD must be a multiple of 8");

endmodule
