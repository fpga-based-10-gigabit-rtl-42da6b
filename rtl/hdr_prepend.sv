// Header prepender: puts a fixed-size protocol header in front of a packet.
//
// Used by the IP core (20-byte header) and the Ethernet core (14-byte header).
// For each packet the header arrives on hdr_valid/hdr_ready, one header per
// packet, before the packet's first beat is taken. The full 8-byte words of
// the header leave first, sop on the first. The remaining R = HDR_BYTES mod 8
// header bytes are joined to the front of the payload, so every payload beat
// is shifted by R bytes: out = {R carried bytes, first 8-R bytes of in}, and
// the last R bytes of each input beat are carried into the next output beat.
// When the last input beat does not leave room for its carried bytes, one
// extra beat carries them out (empty = 16 - R - valid bytes). Output is
// registered; after the header words the payload flows at one beat per cycle.
// Bytes past the end of the eop beat are not defined.
module hdr_prepend
  import injector_pkg::*;
#(
  parameter int unsigned HDR_BYTES = 20   // >= 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   hdr_valid,
  output logic                   hdr_ready,
  input  logic [8*HDR_BYTES-1:0] hdr,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  beat_t                  in,
  output logic                   out_valid,
  input  logic                   out_ready,
  output beat_t                  out
);
  localparam int unsigned NFULL = HDR_BYTES / 8;   // whole header words
  localparam int unsigned R     = HDR_BYTES % 8;   // bytes joined to the payload
  localparam int unsigned HW    = 8 * HDR_BYTES;

  typedef enum logic [1:0] {S_IDLE, S_HWORD, S_BODY, S_TAIL} state_t;
  state_t state;

  logic [HW-1:0]          hbuf;     // header, consumed from the top
  logic [$clog2(NFULL+1)-1:0] hidx;
  logic [63:0]            carry;    // top R bytes hold carried data
  logic [2:0]             tail_empty;

  wire out_free = !out_valid || out_ready;
  assign hdr_ready = (state == S_IDLE);
  assign in_ready  = (state == S_BODY) && out_free;

  // Output word built from the carried bytes and the incoming beat.
  logic [63:0] joined, next_carry;
  logic [4:0]  total_bytes;   // R + valid bytes of the incoming beat
  always_comb begin
    total_bytes = 5'(R) + 5'(4'd8 - 4'(in.empty));
    if (R == 0) begin
      joined     = in.data;
      next_carry = '0;
    end else begin
      joined     = (carry & ~({64{1'b1}} >> (8 * R))) | (in.data >> (8 * R));
      next_carry = in.data << (8 * (8 - R));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      hbuf       <= '0;
      hidx       <= '0;
      carry      <= '0;
      tail_empty <= '0;
      out_valid  <= 1'b0;
      out        <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (hdr_valid) begin
          hbuf  <= hdr;
          hidx  <= '0;
          state <= S_HWORD;
        end
        S_HWORD: if (out_free) begin
          out_valid <= 1'b1;
          out.data  <= hbuf[HW-1 -: 64];
          out.sop   <= (hidx == 0);
          out.eop   <= 1'b0;
          out.empty <= '0;
          hbuf      <= hbuf << 64;
          hidx      <= hidx + 1'b1;
          if (32'(hidx) == NFULL - 1) begin
            // the R leftover header bytes are now at the top of hbuf << 64
            carry <= (HW > 64) ? 64'((hbuf << 64) >> (HW - 64)) : '0;
            state <= S_BODY;
          end
        end
        S_BODY: if (in_valid && out_free) begin
          out_valid <= 1'b1;
          out.data  <= joined;
          out.sop   <= 1'b0;
          carry     <= next_carry;
          if (!in.eop) begin
            out.eop   <= 1'b0;
            out.empty <= '0;
          end else if (total_bytes <= 5'd8) begin
            out.eop   <= 1'b1;
            out.empty <= 3'(5'd8 - total_bytes);
            state     <= S_IDLE;
          end else begin
            out.eop    <= 1'b0;
            out.empty  <= '0;
            tail_empty <= 3'(5'd16 - total_bytes);
            state      <= S_TAIL;
          end
        end
        S_TAIL: if (out_free) begin
          out_valid <= 1'b1;
          out.data  <= carry;
          out.sop   <= 1'b0;
          out.eop   <= 1'b1;
          out.empty <= tail_empty;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (HDR_BYTES >= 8) else $error("hdr_prepend: HDR_BYTES must be at least 8");

endmodule
