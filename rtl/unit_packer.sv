// Unit packer: joins 32-bit and 64-bit pieces into a stream of full 64-bit beats.
//
// The MEP core builds a packet from pieces of different sizes: the 12-byte MEP
// header, 4-byte fragment headers and event bodies whose last word may hold
// only 4 bytes. Each input piece is one or two 32-bit units (in_two), left
// aligned in in_data. The packer keeps at most one unit back and emits a
// 64-bit beat as soon as two units are there, so a packet of 4-byte aligned
// pieces leaves as back-to-back 64-bit beats. At in_last the held unit is
// flushed; if it does not fit in the beat leaving with the last piece, an
// extra cycle sends it alone (empty = 4) while the input is held off.
// The output is registered: one cycle from input to output, one beat per
// cycle at full rate. sop is set on the first beat of each packet.
module unit_packer
  import injector_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  input  logic        in_two,    // 1: both halves valid, 0: only in_data[63:32]
  input  logic        in_last,   // last piece of the packet
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out
);
  logic        have;      // one unit held back
  logic [31:0] held;
  logic        flush;     // held unit must leave as a lone eop beat
  logic        first;     // next beat out starts a packet

  wire out_free = !out_valid || out_ready;
  assign in_ready = out_free && !flush;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have      <= 1'b0;
      held      <= '0;
      flush     <= 1'b0;
      first     <= 1'b1;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (flush && out_free) begin
        out_valid <= 1'b1;
        out.data  <= {held, 32'h0};
        out.sop   <= first;
        out.eop   <= 1'b1;
        out.empty <= 3'd4;
        have      <= 1'b0;
        flush     <= 1'b0;
        first     <= 1'b1;
      end else if (in_valid && in_ready) begin
        unique case ({have, in_two})
          2'b00: begin                 // one unit, nothing held
            if (in_last) begin
              out_valid <= 1'b1;
              out.data  <= {in_data[63:32], 32'h0};
              out.sop   <= first;
              out.eop   <= 1'b1;
              out.empty <= 3'd4;
              first     <= 1'b1;
            end else begin
              have <= 1'b1;
              held <= in_data[63:32];
            end
          end
          2'b01: begin                 // two units, nothing held
            out_valid <= 1'b1;
            out.data  <= in_data;
            out.sop   <= first;
            out.eop   <= in_last;
            out.empty <= 3'd0;
            first     <= in_last;
          end
          2'b10: begin                 // one unit joins the held one
            out_valid <= 1'b1;
            out.data  <= {held, in_data[63:32]};
            out.sop   <= first;
            out.eop   <= in_last;
            out.empty <= 3'd0;
            first     <= in_last;
            have      <= 1'b0;
          end
          default: begin               // two units with one held: one is left over
            out_valid <= 1'b1;
            out.data  <= {held, in_data[63:32]};
            out.sop   <= first;
            out.eop   <= 1'b0;
            out.empty <= 3'd0;
            first     <= 1'b0;
            held      <= in_data[31:0];
            flush     <= in_last;
          end
        endcase
      end
    end
  end

endmodule
