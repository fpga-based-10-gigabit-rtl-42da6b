// Synchronous first-in first-out buffer with valid/ready handshakes.
//
// Used as the trigger FIFO between the trigger input and the MEP core, so that
// triggers from the readout supervisor are taken every cycle they arrive even
// while the formatting stage is busy, and for the small descriptor queues
// between the pipeline stages. Storage is an array of DEPTH entries addressed
// by read and write pointers that carry one extra wrap bit. A word written in
// one cycle can be read in the next; in_ready is low when full, out_valid is
// low when empty, and one push and one pop may happen in the same cycle.
// The depth and the use as a trigger buffer are this design's choices.
module sync_fifo #(
  parameter type         T     = logic [63:0],
  parameter int unsigned DEPTH = 64            // power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  T                         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output T                         out_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  T             mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;

  wire do_push = in_valid  && in_ready;
  wire do_pop  = out_valid && out_ready;

  assign count     = wr_ptr - rd_ptr;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");

endmodule
